// tb_riscv_single_cycle: self-checking test of the single-cycle machine.
// Runs the directed program and several random programs. The reference
// model executes in lockstep: after every clock edge the machine's PC must
// equal the model's, i.e. exactly one instruction per cycle. At the end the
// registers, the CSR and the whole data memory are compared.
module tb_riscv_single_cycle;
  import rv_iss_pkg::*;
  import rv_prog_pkg::*;
  localparam int IW = 1024, DW = 1024;
  localparam int N_RANDOM = 6;

  logic clk = 0, rst = 1;
  logic [31:0] imem_addr, imem_rdata, dmem_addr, dmem_wdata, dmem_rdata, csr_value;
  logic [3:0] dmem_be;
  logic dmem_we, dmem_re, retire;
  logic pwe = 0;
  logic [31:0] paddr = 0, pdata = 0;
  int checks = 0, failures = 0;

  riscv_single_cycle dut (.clk, .rst, .imem_addr, .imem_rdata, .dmem_addr, .dmem_wdata,
                          .dmem_be, .dmem_we, .dmem_re, .dmem_rdata, .csr_value, .retire);
  imem #(.WORDS(IW)) u_imem (.clk, .addr(imem_addr), .rdata(imem_rdata), .we(pwe), .waddr(paddr), .wdata(pdata));
  dmem #(.WORDS(DW), .SYNC_READ(1'b0)) u_dmem (.clk, .addr(dmem_addr), .we(dmem_we), .be(dmem_be),
                                               .wdata(dmem_wdata), .re(dmem_re), .rdata(dmem_rdata));
  always #5 clk = ~clk;

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic run(bit directed);
    logic [31:0] prog[$], end_pc;
    rv_iss iss;
    int n = 0;
    if (directed) gen_directed(prog, end_pc); else gen_random(150, prog, end_pc);
    iss = new(IW, DW, 0, 12'h51E);
    rst = 1;
    foreach (prog[i]) begin
      @(negedge clk); pwe = 1; paddr = 4 * i; pdata = prog[i]; iss.imem[i] = prog[i];
    end
    @(negedge clk); pwe = 0;
    for (int i = 0; i < DW; i++) begin
      logic [31:0] v = $urandom;
      u_dmem.mem[i] = v; iss.dmem[i] = v;
    end
    @(negedge clk); rst = 0;
    while (iss.pc != end_pc && n < 5000) begin
      @(posedge clk); #1;
      iss.step(); n++;
      checks++;
      if (imem_addr !== iss.pc) begin
        failures++;
        if (failures < 10) $display("FAIL step %0d pc=%h exp=%h", n, imem_addr, iss.pc);
        break;
      end
    end
    for (int r = 1; r < 32; r++) begin
      if (directed && r > 13) break;
      checks++;
      if (dut.u_rf.regs[r] !== iss.x[r]) begin
        failures++;
        if (failures < 10) $display("FAIL x%0d=%h exp=%h", r, dut.u_rf.regs[r], iss.x[r]);
      end
    end
    checks++; if (csr_value !== iss.csr_val) failures++;
    for (int i = 0; i < DW; i++) begin
      checks++;
      if (u_dmem.mem[i] !== iss.dmem[i]) begin
        failures++;
        if (failures < 10) $display("FAIL dmem[%0d]=%h exp=%h", i, u_dmem.mem[i], iss.dmem[i]);
      end
    end
    $display("%s program: %0d instructions in %0d cycles", directed ? "directed" : "random", n, n);
  endtask

  initial begin
    run(1);
    // directed program result: sum of the 8 array words
    for (int k = 0; k < N_RANDOM; k++) run(0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
