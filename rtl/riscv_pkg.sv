// riscv_pkg: types and constants shared by the RV32I machines.
//
// Holds the RV32I opcode values, the ALU operation and immediate-format
// enumerations, the write-back and operand selects of the datapath, and the
// control word (ctrl_t) that the decoder hands to the datapath. The select
// names (ImmSel, ASel, BSel, ALUSel, WBSel, PCSel, BrUn, RegWEn, MemRW)
// follow the single-cycle datapath; the encodings of the enumerations are
// this design's own choice. pipe3_events_t carries per-cycle event flags of
// the 3-stage pipeline (bypass used, load-use stall, fetch killed).
package riscv_pkg;

  localparam int XLEN = 32;

  typedef enum logic [6:0] {
    OP_LUI    = 7'b0110111,
    OP_AUIPC  = 7'b0010111,
    OP_JAL    = 7'b1101111,
    OP_JALR   = 7'b1100111,
    OP_BRANCH = 7'b1100011,
    OP_LOAD   = 7'b0000011,
    OP_STORE  = 7'b0100011,
    OP_IMM    = 7'b0010011,
    OP_REG    = 7'b0110011,
    OP_FENCE  = 7'b0001111,
    OP_SYSTEM = 7'b1110011
  } opcode_e;

  typedef enum logic [3:0] {
    ALU_ADD, ALU_SUB, ALU_SLL, ALU_SLT, ALU_SLTU,
    ALU_XOR, ALU_SRL, ALU_SRA, ALU_OR, ALU_AND, ALU_PASSB
  } alu_op_e;

  typedef enum logic [2:0] { IMM_I, IMM_S, IMM_B, IMM_U, IMM_J } imm_sel_e;

  typedef enum logic [1:0] { WB_MEM, WB_ALU, WB_PC4, WB_CSR } wb_sel_e;

  // Branch and load/store funct3 values.
  localparam logic [2:0] F3_BEQ  = 3'b000, F3_BNE  = 3'b001,
                         F3_BLT  = 3'b100, F3_BGE  = 3'b101,
                         F3_BLTU = 3'b110, F3_BGEU = 3'b111;
  localparam logic [2:0] F3_B = 3'b000, F3_H = 3'b001, F3_W = 3'b010,
                         F3_BU = 3'b100, F3_HU = 3'b101;

  typedef struct packed {
    imm_sel_e    imm_sel;
    logic        reg_wen;   // RegWEn
    logic        br_un;     // BrUn
    logic        a_sel;     // ASel: 0 = rs1, 1 = PC
    logic        b_sel;     // BSel: 0 = rs2, 1 = immediate
    alu_op_e     alu_op;    // ALUSel
    logic        mem_wen;   // MemRW = write
    logic        mem_ren;   // load
    wb_sel_e     wb_sel;    // WBSel
    logic        is_branch;
    logic        is_jump;   // JAL or JALR
    logic        is_csr;
    logic        csr_imm;   // source is zimm (inst[19:15]) instead of rs1
    logic        uses_rs1;
    logic        uses_rs2;
    logic [2:0]  funct3;
  } ctrl_t;

  typedef struct packed {
    logic fwd_a;  // rs1 of X taken from the M-stage result
    logic fwd_b;  // rs2 of X taken from the M-stage result
    logic stall;  // load-use bubble inserted
    logic kill;   // fetched instruction squashed by a taken branch/jump
  } pipe3_events_t;

endpackage
