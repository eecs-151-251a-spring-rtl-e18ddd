// tb_imem: self-checking test of imem.
// Loads random words through the program port, then reads them back
// asynchronously (the word appears without a clock edge).
module tb_imem;
  localparam int W = 1024;   // the memory's default size
  logic clk = 0, we;
  logic [31:0] addr, rdata, waddr, wdata;
  logic [31:0] shadow [W];
  int checks = 0, failures = 0;

  imem dut (.clk, .addr, .rdata, .we, .waddr, .wdata);
  always #5 clk = ~clk;

  initial begin
    repeat (10000) @(posedge clk); failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    we = 0; addr = 0; waddr = 0; wdata = 0;
    for (int i = 0; i < W; i++) begin
      @(negedge clk); we = 1; waddr = 4 * i; wdata = $urandom; shadow[i] = wdata;
    end
    @(negedge clk); we = 0;
    for (int n = 0; n < 1000; n++) begin
      int i = $urandom % W;
      addr = 4 * i + ($urandom % 4);
      #1;
      checks++;
      if (rdata !== shadow[i]) begin
        failures++;
        if (failures < 10) $display("FAIL addr=%h rdata=%h exp=%h", addr, rdata, shadow[i]);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
