// tb_riscv_pipe3: self-checking test of the 3-stage pipelined machine.
// Runs the directed program and several random programs. The reference
// model first executes the program alone and, from its instruction trace,
// predicts the pipeline's timing with the lecture's rules: one cycle per
// instruction, one extra cycle for a load whose result the next executed
// instruction reads, one extra cycle for a taken branch or a jump, plus two
// cycles to fill I and X. The machine must retire exactly the same number
// of instructions in exactly that many cycles, report exactly the predicted
// numbers of load-use stalls and kills, use its bypass, and end with the
// model's registers, CSR and data memory.
module tb_riscv_pipe3;
  import riscv_pkg::*;
  import rv_iss_pkg::*;
  import rv_prog_pkg::*;
  localparam int IW = 1024, DW = 1024;
  localparam int N_RANDOM = 6;

  logic clk = 0, rst = 1;
  logic [31:0] imem_addr, imem_rdata, dmem_addr, dmem_wdata, dmem_rdata, csr_value;
  logic [3:0] dmem_be;
  logic dmem_we, dmem_re, retire;
  pipe3_events_t events;
  logic pwe = 0;
  logic [31:0] paddr = 0, pdata = 0;
  int checks = 0, failures = 0;
  int tot_fwd = 0, tot_stall = 0, tot_kill = 0, tot_nt_branch = 0;

  riscv_pipe3 dut (.clk, .rst, .imem_addr, .imem_rdata, .dmem_addr, .dmem_wdata,
                   .dmem_be, .dmem_we, .dmem_re, .dmem_rdata, .csr_value, .retire, .events);
  imem #(.WORDS(IW)) u_imem (.clk, .addr(imem_addr), .rdata(imem_rdata), .we(pwe), .waddr(paddr), .wdata(pdata));
  dmem #(.WORDS(DW), .SYNC_READ(1'b1)) u_dmem (.clk, .addr(dmem_addr), .we(dmem_we), .be(dmem_be),
                                               .wdata(dmem_wdata), .re(dmem_re), .rdata(dmem_rdata));
  always #5 clk = ~clk;

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic chk(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 15) $display("FAIL %s", what);
    end
  endtask

  task automatic run(bit directed);
    logic [31:0] prog[$], end_pc;
    logic [31:0] init[];
    rv_iss iss;
    int n = 0, exp_stall = 0, exp_kill = 0, nt = 0, exp_cycles;
    int retired = 0, cycles = 0, n_fwd = 0, n_stall = 0, n_kill = 0;
    bit prev_load = 0; int prev_rd = 0;
    if (directed) gen_directed(prog, end_pc); else gen_random(150, prog, end_pc);
    init = new[DW];
    foreach (init[i]) init[i] = $urandom;
    // reference run and timing prediction
    iss = new(IW, DW, 0, 12'h51E);
    foreach (prog[i]) iss.imem[i] = prog[i];
    foreach (init[i]) iss.dmem[i] = init[i];
    while (iss.pc != end_pc && n < 5000) begin
      iss.step(); n++;
      if (prev_load && prev_rd != 0 &&
          ((iss.uses1 && iss.src1 == prev_rd) || (iss.uses2 && iss.src2 == prev_rd))) exp_stall++;
      if (iss.redirect) exp_kill++;
      if (iss.is_branch && !iss.redirect) nt++;
      prev_load = iss.is_load; prev_rd = iss.wr_rd;
    end
    // A redirect delays only what follows it: if the last instruction
    // redirects, its bubble is not seen before it retires. Otherwise the
    // final JAL-to-self is already in X, resolving (and killing), when the
    // last instruction retires, and that kill is counted too.
    if (iss.redirect) exp_cycles = n + 2 + exp_stall + exp_kill - 1;
    else begin
      exp_cycles = n + 2 + exp_stall + exp_kill;
      exp_kill++;
    end
    // machine run
    rst = 1;
    foreach (prog[i]) begin
      @(negedge clk); pwe = 1; paddr = 4 * i; pdata = prog[i];
    end
    @(negedge clk); pwe = 0;
    foreach (init[i]) u_dmem.mem[i] = init[i];
    @(negedge clk); rst = 0;
    while (retired < n && cycles < 20000) begin
      @(posedge clk);
      cycles++;
      if (retire) retired++;
      if (events.fwd_a || events.fwd_b) n_fwd++;
      if (events.stall) n_stall++;
      if (events.kill) n_kill++;
    end
    #1;
    chk(cycles == exp_cycles, $sformatf("cycles %0d expected %0d", cycles, exp_cycles));
    chk(n_stall == exp_stall, $sformatf("stalls %0d expected %0d", n_stall, exp_stall));
    chk(n_kill == exp_kill, $sformatf("kills %0d expected %0d", n_kill, exp_kill));
    for (int r = 1; r < 32; r++) begin
      if (directed && r > 13) break;
      chk(dut.u_rf.regs[r] === iss.x[r], $sformatf("x%0d=%h exp=%h", r, dut.u_rf.regs[r], iss.x[r]));
    end
    chk(csr_value === iss.csr_val, $sformatf("csr=%h exp=%h", csr_value, iss.csr_val));
    for (int i = 0; i < DW; i++)
      chk(u_dmem.mem[i] === iss.dmem[i], $sformatf("dmem[%0d]=%h exp=%h", i, u_dmem.mem[i], iss.dmem[i]));
    $display("%s program: %0d instructions, %0d cycles (expected %0d), bypass %0d, load stalls %0d, kills %0d, not-taken branches %0d",
             directed ? "directed" : "random", n, cycles, exp_cycles, n_fwd, n_stall, n_kill, nt);
    tot_fwd += n_fwd; tot_stall += n_stall; tot_kill += n_kill; tot_nt_branch += nt;
  endtask

  initial begin
    run(1);
    for (int k = 0; k < N_RANDOM; k++) run(0);
    chk(tot_fwd > 0, "bypass never used");
    chk(tot_stall > 0, "load-use stall never happened");
    chk(tot_kill > 0, "kill never happened");
    chk(tot_nt_branch > 0, "no branch fell through");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
