// tb_riscv_top: end-to-end test of riscv_top at its default sizes.
// Both machines are loaded through their program ports with the same
// program and the same data-memory contents, released from reset together
// and run to the program's final loop. Per program:
//  * the single-cycle machine must reach the final loop after exactly N
//    cycles for N executed instructions;
//  * the pipeline must retire N instructions in the cycle count predicted
//    from the reference trace (N + 2 fill + 1 per load-use pair + 1 per
//    taken branch or jump), with exactly the predicted stalls and kills;
//  * registers, CSR output and all of data memory of both machines must
//    match the reference model.
// Over the whole run every mechanism must occur at least once: ALU bypass,
// load-use stall, kill after a taken branch, JAL, JALR, fall-through of a
// not-taken branch, narrow load, narrow store and CSR write.
module tb_riscv_top;
  import riscv_pkg::*;
  import rv_iss_pkg::*;
  import rv_prog_pkg::*;
  localparam int IW = 1024, DW = 1024;   // the top's default sizes
  localparam int N_RANDOM = 8;

  logic clk = 0, rst = 1;
  logic sc_prog_we = 0, p3_prog_we = 0;
  logic [31:0] sc_prog_addr = 0, sc_prog_data = 0, p3_prog_addr = 0, p3_prog_data = 0;
  logic [31:0] sc_csr, sc_pc, p3_csr;
  logic sc_retire, p3_retire;
  pipe3_events_t p3_events;
  int checks = 0, failures = 0;
  // mechanism counters
  int c_fwd = 0, c_stall = 0, c_kill = 0, c_jal = 0, c_jalr = 0, c_nt = 0, c_nload = 0,
      c_nstore = 0, c_csr = 0;

  riscv_top dut (.*);
  always #5 clk = ~clk;

  initial begin
    repeat (400000) @(posedge clk);
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
    logic [31:0] prog[$], end_pc, init[];
    rv_iss iss;
    int n = 0, exp_stall = 0, exp_kill = 0, exp_cycles;
    int cycles = 0, sc_cycles = -1, retired = 0, n_stall = 0, n_kill = 0;
    bit prev_load = 0; int prev_rd = 0;
    if (directed) gen_directed(prog, end_pc); else gen_random(200, prog, end_pc);
    init = new[DW];
    foreach (init[i]) init[i] = $urandom;
    iss = new(IW, DW, 0, 12'h51E);
    foreach (prog[i]) iss.imem[i] = prog[i];
    foreach (init[i]) iss.dmem[i] = init[i];
    while (iss.pc != end_pc && n < 5000) begin
      logic [6:0] opc = iss.imem[iss.pc[11:2]][6:0];
      logic [2:0] f3  = iss.imem[iss.pc[11:2]][14:12];
      iss.step(); n++;
      if (prev_load && prev_rd != 0 &&
          ((iss.uses1 && iss.src1 == prev_rd) || (iss.uses2 && iss.src2 == prev_rd))) exp_stall++;
      if (iss.redirect) exp_kill++;
      if (iss.is_branch && !iss.redirect) c_nt++;
      if (opc == 7'b1101111) c_jal++;
      if (opc == 7'b1100111) c_jalr++;
      if (iss.is_load && f3[1:0] != 2'b10) c_nload++;
      if (iss.is_store && f3[1:0] != 2'b10) c_nstore++;
      if (iss.is_csr) c_csr++;
      prev_load = iss.is_load; prev_rd = iss.wr_rd;
    end
    if (iss.redirect) exp_cycles = n + 2 + exp_stall + exp_kill - 1;
    else begin
      exp_cycles = n + 2 + exp_stall + exp_kill;
      exp_kill++;
    end
    rst = 1;
    foreach (prog[i]) begin
      @(negedge clk);
      sc_prog_we = 1; sc_prog_addr = 4 * i; sc_prog_data = prog[i];
      p3_prog_we = 1; p3_prog_addr = 4 * i; p3_prog_data = prog[i];
    end
    @(negedge clk); sc_prog_we = 0; p3_prog_we = 0;
    foreach (init[i]) begin
      dut.u_sc_dmem.mem[i] = init[i];
      dut.u_p3_dmem.mem[i] = init[i];
    end
    @(negedge clk); rst = 0;
    #1;
    if (sc_pc == end_pc) sc_cycles = 0;
    while ((retired < n || sc_cycles < 0) && cycles < 20000) begin
      @(posedge clk);
      cycles++;
      if (retired < n) begin
        if (p3_retire) retired++;
        if (p3_events.fwd_a || p3_events.fwd_b) c_fwd++;
        if (p3_events.stall) n_stall++;
        if (p3_events.kill) n_kill++;
      end
      #1;
      if (sc_cycles < 0 && sc_pc == end_pc) sc_cycles = cycles;
      if (retired == n && exp_cycles != cycles && exp_cycles > 0) begin
        chk(0, $sformatf("pipeline cycles %0d expected %0d", cycles, exp_cycles));
        exp_cycles = 0;
      end
    end
    chk(sc_cycles == n, $sformatf("single-cycle took %0d cycles for %0d instructions", sc_cycles, n));
    chk(n_stall == exp_stall, $sformatf("stalls %0d expected %0d", n_stall, exp_stall));
    chk(n_kill == exp_kill, $sformatf("kills %0d expected %0d", n_kill, exp_kill));
    c_stall += n_stall; c_kill += n_kill;
    for (int r = 1; r < 32; r++) begin
      if (directed && r > 13) break;
      chk(dut.u_sc.u_rf.regs[r] === iss.x[r], $sformatf("sc x%0d=%h exp=%h", r, dut.u_sc.u_rf.regs[r], iss.x[r]));
      chk(dut.u_p3.u_rf.regs[r] === iss.x[r], $sformatf("p3 x%0d=%h exp=%h", r, dut.u_p3.u_rf.regs[r], iss.x[r]));
    end
    chk(sc_csr === iss.csr_val, "sc csr");
    chk(p3_csr === iss.csr_val, "p3 csr");
    for (int i = 0; i < DW; i++) begin
      chk(dut.u_sc_dmem.mem[i] === iss.dmem[i], $sformatf("sc dmem[%0d]", i));
      chk(dut.u_p3_dmem.mem[i] === iss.dmem[i], $sformatf("p3 dmem[%0d]", i));
    end
    if (directed) begin
      logic [31:0] sum = 0;
      for (int i = 0; i < 8; i++) sum += init[64 + i];
      chk(iss.dmem[96] === sum, "directed program sum");
    end
    $display("%s program: %0d instructions; single-cycle %0d cycles; pipeline %0d cycles, %0d stalls, %0d kills",
             directed ? "directed" : "random", n, sc_cycles, cycles, n_stall, n_kill);
  endtask

  initial begin
    run(1);
    for (int k = 0; k < N_RANDOM; k++) run(0);
    $display("mechanisms: bypass=%0d load-stall=%0d kill=%0d jal=%0d jalr=%0d not-taken=%0d narrow-load=%0d narrow-store=%0d csr=%0d",
             c_fwd, c_stall, c_kill, c_jal, c_jalr, c_nt, c_nload, c_nstore, c_csr);
    chk(c_fwd > 0, "bypass never happened");
    chk(c_stall > 0, "load-use stall never happened");
    chk(c_kill > 0, "kill never happened");
    chk(c_jal > 0, "no JAL executed");
    chk(c_jalr > 0, "no JALR executed");
    chk(c_nt > 0, "no branch fell through");
    chk(c_nload > 0, "no narrow load");
    chk(c_nstore > 0, "no narrow store");
    chk(c_csr > 0, "no CSR access");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
