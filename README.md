# RV32I processors: single-cycle and three-stage pipeline

This is a 32-bit RISC-V (RV32I) integer processor built two ways from one
set of datapath blocks.

* **`riscv_single_cycle`** runs every instruction in one clock cycle. Its
  clock period has to cover the slowest instruction, a load. That path runs
  PC → instruction memory → register read → ALU → data memory → write-back
  mux → register-file setup.
* **`riscv_pipe3`** splits that path at its three slowest parts: instruction
  memory, ALU and data memory. This gives three stages, **I**, **X** and
  **M**. One instruction completes per cycle, except where a hazard costs a
  bubble.

`riscv_top` instantiates both machines side by side. Each has its own
instruction memory (IMEM) and data memory (DMEM). They share only clock and
reset.

## Instruction set

The full RV32I base integer set is implemented:

* LUI and AUIPC
* JAL and JALR
* the six branches
* LB, LH, LW, LBU and LHU
* SB, SH and SW
* the nine register-immediate operations and the ten register-register
  operations
* CSRRW, CSRRS and CSRRC, with their immediate forms

FENCE, ECALL and EBREAK are accepted and do nothing. There are no traps or
interrupts. Misaligned accesses are not detected: the low address bits only
choose byte lanes. Only one CSR exists (see below).

## Datapath blocks shared by both machines

| module | role |
|---|---|
| `riscv_pkg` | opcodes, ALU operations, immediate formats, write-back selects, the control word `ctrl_t`, and the pipeline event flags |
| `riscv_control` | one case statement on the opcode, refined by `funct3` and `inst[30]`. It produces ImmSel, RegWEn, BrUn, ASel, BSel, ALUSel, MemRW, WBSel and load/store size, and computes PCSel from the comparator flags |
| `regfile` | 32 × 32 bits, two asynchronous read ports and one write port written at the clock edge. x0 reads as 0 |
| `imm_gen` | builds the I, S, B, U and J immediates, sign-extended from `inst[31]` |
| `alu` | ADD, SUB, SLL, SLT, SLTU, XOR, SRL, SRA, OR, AND, and pass-B (used by LUI) |
| `branch_comp` | BrEq, and BrLT signed or unsigned (chosen by BrUn) |
| `load_extend` | picks the addressed byte or halfword from the loaded word, then sign- or zero-extends it |
| `store_align` | copies SB/SH data onto every byte lane and raises only the byte enables of the addressed lanes |
| `csr_reg` | one 32-bit CSR. It returns the old value and writes, sets or clears bits |
| `imem` | word array with an asynchronous read, plus a program-load write port |
| `dmem` | word array with byte write enables. Its read is asynchronous (`SYNC_READ=0`) or registered (`SYNC_READ=1`) |

The ALU does more than arithmetic. It also computes every address:

* the ALU's A input is rs1 or the PC (ASel);
* its B input is rs2 or the immediate (BSel);
* so one adder produces load/store addresses, branch targets (PC +
  immediate), JAL targets and JALR targets (rs1 + immediate).

The branch comparator works beside the ALU on rs1 and rs2. The decoder
combines its two flags:

* BEQ and BNE use BrEq;
* BLT, BGE, BLTU and BGEU use BrLT;
* the greater-or-equal forms invert it;
* BrUn is `funct3[1]`.

PCSel is high for every jump and for every taken branch. The next PC is then
the ALU result with bit 0 cleared.

## Single-cycle machine

Every state element has an asynchronous read and a write at the clock edge:
PC, register file, DMEM and CSR. Within one cycle the current state flows
through the combinational datapath. At the rising edge the PC, the
destination register, the memory word and the CSR are all updated together.

The write-back mux chooses one of four values:

* the extended load data;
* the ALU result;
* PC+4, the link value of JAL and JALR;
* the old CSR value.

`retire` is high in every cycle out of reset: CPI is exactly 1.

## Three-stage pipeline

```
        I                      X                                   M
  PC ─► IMEM ─► IR  ─►  decode, regfile read, ALU,  ─►  DMEM data ─► extend ─► regfile write
                        branch compare, DMEM address      (registered             (end of M)
                        (clocked into DMEM at the         read)
                         X→M edge)
```

* **I:** the PC reads the IMEM asynchronously. The instruction is clocked
  into the instruction register `ir_x`, together with its PC.
* **X:** the instruction register is decoded by the same `riscv_control` as
  the single-cycle machine. The register file is read, the ALU and the branch
  comparator work, and the branch is resolved. The DMEM address, store data
  and byte enables leave X combinationally. The DMEM clocks them on the edge
  that starts M: stores write on that edge and loads register their word on
  it. CSR instructions update the CSR on the same edge. The non-load result
  (the ALU result, PC+4 or the old CSR value) goes into `result_m`.
* **M:** the DMEM shows the loaded word. `load_extend` narrows it, and the
  write-back value is written into the register file at the end of M.

The register file is read in X and written at the end of M. So only the
instruction in M can still owe a value to the instruction in X. An
instruction two or more places earlier has already written the register
file. `pipe3_hazard` handles the three cases this leaves.

### ALU bypass

Suppose the instruction in M writes a register that X reads, M is not a
load, and the register is not x0. Then `result_m` replaces the
register-file value. The substitution covers:

* both ALU inputs;
* the store data;
* the branch comparator inputs;
* the CSR source.

Back-to-back dependent instructions run without a bubble.

### Load-use stall

A load's data exists only during M. If X reads the load's destination:

* the PC and the instruction register hold for one cycle;
* a bubble goes into M;
* the load writes the register file at the end of its M cycle;
* in the next cycle X reads the value from the register file.

A load followed by an independent instruction costs nothing.

### Branches: predict not taken, kill on redirect

Fetch always continues at PC+4. A branch or jump resolves in X. If the branch
is taken, or the instruction is a jump (JAL or JALR):

* the instruction just fetched is squashed (`valid_x` cleared);
* the PC is loaded with the target.

A taken branch or any jump therefore costs one extra cycle. A branch that is
not taken costs nothing. If a branch also waits on a load, it stalls first
and redirects one cycle later.

### Timing rule

For a program of N executed instructions, from reset release the pipeline
retires its last instruction after this many cycles:

    N + 2 (filling I and X) + (loads whose result the next instruction reads)
      + (taken branches and jumps, except a final one)

The pipeline testbenches check this number exactly. They also check the
counts of stalls and kills.

### Event outputs

`events` (a `pipe3_events_t`) reports, every cycle:

* `fwd_a` / `fwd_b`: a bypass was used;
* `stall`: a load-use bubble;
* `kill`: the fetched instruction was squashed.

`retire` is high when a valid instruction leaves M. Together they are enough
to build performance counters.

## Memories and program loading

Each machine has its own IMEM and DMEM of 1024 words (4 KiB) each. Every
memory decodes only the low address bits of its own port. The program
therefore sees the DMEM at every 4 KiB-aligned alias. The IMEM is read-only
to the processor. Its write port (`*_prog_we/addr/data`) loads a program
while `rst` is high. Memory contents are not reset.

## CSR

A single CSR sits at address `CSR_ADDR` (default `0x51E`). A program can use
it to report a result or a done flag, which the top brings out as `sc_csr`
and `p3_csr`. Reads of other CSR addresses return 0, and writes to them are
ignored.

## Top-level ports (`riscv_top`)

| port | dir | meaning |
|---|---|---|
| `clk`, `rst` | in | clock; synchronous active-high reset. Reset sets PC = `RESET_PC` and empties the pipeline |
| `sc_prog_we/addr/data` | in | load a word into the single-cycle machine's IMEM |
| `sc_csr`, `sc_retire`, `sc_pc` | out | CSR value, instruction-completed strobe, current PC |
| `p3_prog_we/addr/data` | in | load a word into the pipeline's IMEM |
| `p3_csr`, `p3_retire`, `p3_events` | out | CSR value, retire strobe, hazard events |

Parameters:

| parameter | default |
|---|---|
| `IMEM_WORDS` | 1024 |
| `DMEM_WORDS` | 1024 |
| `RESET_PC` | 0 |
| `CSR_ADDR` | `12'h51E` |

## Simulating

All testbenches are self-checking. Each prints
`TB_RESULT checks=N failures=M` and has a watchdog. Build and run one with
Verilator 5. The packages must be listed ahead of the testbench; modules are
found through `-y`:

```
verilator --binary --timing --assert -y rtl -y tb +libext+.sv \
  rtl/riscv_pkg.sv tb/rv_asm_pkg.sv tb/rv_iss_pkg.sv tb/rv_prog_pkg.sv \
  tb/tb_riscv_top.sv --top-module tb_riscv_top -o sim
./obj_dir/sim
```

Testbench support packages:

* `rv_asm_pkg` has instruction encoders (`addi(5, 0, -50)`, `br(...)`, …).
* `rv_iss_pkg` is an instruction-level reference model of RV32I. It is
  written from the instruction definitions and shares no code with the RTL.
* `rv_prog_pkg` generates programs:
  * a directed program: an array sum called as a subroutine through JAL and
    JALR, plus byte and halfword traffic and CSR reporting;
  * random programs that always terminate. Branches and jumps only go
    forward, over whole instruction groups. The programs mix every
    instruction kind, load-use pairs and dependent pairs.

The testbenches:

* **`tb_riscv_top`** uses the top at its default sizes. It runs the
  directed program and eight random programs on both machines at once. It
  checks:
  * the single-cycle CPI of 1;
  * the pipeline's exact cycle, stall and kill counts;
  * all registers, the CSR and all of DMEM against the reference model.

  It also requires that each mechanism occurred: bypass, load-use stall,
  kill, JAL, JALR, a branch falling through, narrow loads and stores, and a
  CSR access.
* **`tb_riscv_single_cycle`** checks the single-cycle machine in lockstep
  with the reference model, comparing the PC every cycle.
* **`tb_riscv_pipe3`** checks the pipeline's state and exact timing on
  random programs.
* **`tb_pipe3_hazard_examples`** runs the four classic hazard sequences and
  checks at which cycle each instruction leaves M:
  * `add`/`add` with a bypass: no bubble;
  * `lw`/`add` dependent: one bubble;
  * `lw`/`add` independent: no bubble;
  * `beq` not taken: no bubble;
  * `beq` taken: the next instruction is killed, one bubble.
* `tb_<block>` tests each datapath block against values computed in the
  testbench.

Values the simulator leaves uninitialised start random
(`+verilator+rand+reset+2` is a good check). The testbenches initialise
everything they read.

## Design choices beyond the basic organisation

* Register read and decode happen in X. The load-use case therefore needs no
  separate load bypass: after the bubble the value is already in the
  register file.
* Bypass is taken from M only. That is the only stage that can hold an
  unwritten result.
* JAL and JALR resolve in X, just like taken branches. There is no early
  jump in I.
* The JALR target has bit 0 cleared, as RV32I requires.
* Reset is synchronous and active high. The register file and the memories
  are not reset.
* Memory sizes, the single CSR and its address, and the program-load ports
  are choices of this implementation.

## Limits

* There are no caches, memory-mapped I/O devices, traps or interrupts.
  Loads and stores always go to the local DMEM.
* The two DMEM styles differ only in read timing. An FPGA block RAM or an
  ASIC SRAM macro with a registered read can replace the `SYNC_READ=1`
  instance directly. The asynchronous-read memories of the single-cycle
  machine map to distributed RAM or flip-flops.
* No timing closure has been done. In the pipeline the X stage is the
  longest path: register read, bypass mux, ALU, then the DMEM address setup
  or the PC redirect.
