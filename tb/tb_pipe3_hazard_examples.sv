// tb_pipe3_hazard_examples: the four hazard cases of the 3-stage pipeline,
// each as a short instruction sequence, with the cycle at which every
// instruction leaves M checked against the expected pipeline diagram:
//  1. add x5,x3,x4 ; add x7,x6,x5      -> bypass, no bubble
//  2. lw x5,0(x4)  ; add x7,x6,x5      -> one bubble (load-use)
//     lw x5,0(x4)  ; add x7,x6,x3      -> no bubble (independent)
//  3. beq x1,x2,L1 (not taken) ; add ; add ; L1: sub  -> no bubble
//  4. beq x1,x1,L1 (taken) ; add x5,x3,x4 ; L1: sub   -> the add is killed,
//     one bubble, x5 unchanged
// Register values are checked after each sequence.
module tb_pipe3_hazard_examples;
  import riscv_pkg::*;
  import rv_asm_pkg::*;

  logic clk = 0, rst = 1;
  logic [31:0] imem_addr, imem_rdata, dmem_addr, dmem_wdata, dmem_rdata, csr_value;
  logic [3:0] dmem_be;
  logic dmem_we, dmem_re, retire;
  pipe3_events_t events;
  logic pwe = 0;
  logic [31:0] paddr = 0, pdata = 0;
  int checks = 0, failures = 0;

  riscv_pipe3 dut (.clk, .rst, .imem_addr, .imem_rdata, .dmem_addr, .dmem_wdata,
                   .dmem_be, .dmem_we, .dmem_re, .dmem_rdata, .csr_value, .retire, .events);
  imem #(.WORDS(64)) u_imem (.clk, .addr(imem_addr), .rdata(imem_rdata), .we(pwe), .waddr(paddr), .wdata(pdata));
  dmem #(.WORDS(64), .SYNC_READ(1'b1)) u_dmem (.clk, .addr(dmem_addr), .we(dmem_we), .be(dmem_be),
                                               .wdata(dmem_wdata), .re(dmem_re), .rdata(dmem_rdata));
  always #5 clk = ~clk;

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic chk(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  // Setup: x1=1 x2=2 x3=3 x4=16 x6=6 x5=0 x7=0, mem[16]=100. Then the
  // sequence, then a self-loop. Returns the retire cycles of the sequence.
  task automatic run(string nm, logic [31:0] seq[$], int exp_gaps[$]);
    logic [31:0] prog[$];
    int base, rc[$], cyc = 0, nret = 0;
    prog = '{addi(1,0,1), addi(2,0,2), addi(3,0,3), addi(4,0,16), addi(5,0,0),
             addi(6,0,6), addi(7,0,0), nop(), nop()};
    base = prog.size();
    foreach (seq[i]) prog.push_back(seq[i]);
    prog.push_back(jal(0, 0));
    rst = 1;
    foreach (prog[i]) begin @(negedge clk); pwe = 1; paddr = 4 * i; pdata = prog[i]; end
    @(negedge clk); pwe = 0;
    u_dmem.mem[4] = 100;
    @(negedge clk); rst = 0;
    while (rc.size() < exp_gaps.size() + 1 && cyc < 200) begin
      @(posedge clk); cyc++;
      if (retire) begin
        if (nret >= base) rc.push_back(cyc);
        nret++;
      end
    end
    for (int i = 0; i < exp_gaps.size(); i++)
      chk(rc[i + 1] - rc[i] == exp_gaps[i],
          $sformatf("%s: gap after instruction %0d is %0d, expected %0d", nm, i, rc[i + 1] - rc[i], exp_gaps[i]));
    @(posedge clk); #1;   // the last write-back lands at the end of its M cycle
    $display("%s: retire cycles %p", nm, rc);
  endtask

  initial begin
    int g[$];
    g = '{1};       run("add-add bypass", '{add(5,3,4), add(7,6,5)}, g);
    chk(dut.u_rf.regs[7] == 25, "add-add result");
    g = '{2};       run("lw-add load-use", '{load(3'b010,5,4,0), add(7,6,5)}, g);
    chk(dut.u_rf.regs[7] == 106, "lw-add result");
    g = '{1};       run("lw-add independent", '{load(3'b010,5,4,0), add(7,6,3)}, g);
    chk(dut.u_rf.regs[7] == 9 && dut.u_rf.regs[5] == 100, "lw-add independent result");
    g = '{1, 1, 1}; run("beq not taken", '{br(3'b000,1,2,12), add(5,3,4), add(6,1,2), sub(7,6,5)}, g);
    chk(dut.u_rf.regs[7] == 32'(3 - 19), "beq not taken result");
    g = '{2};       run("beq taken", '{br(3'b000,1,1,8), add(5,3,4), sub(7,6,5)}, g);
    chk(dut.u_rf.regs[5] == 0 && dut.u_rf.regs[7] == 6, "beq taken: add killed");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
