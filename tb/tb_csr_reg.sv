// tb_csr_reg: self-checking test of csr_reg.
// Random CSRRW/CSRRS/CSRRC operations to the implemented address and to
// other addresses, checked against a shadow value.
module tb_csr_reg;
  logic clk = 0, rst, en;
  logic [11:0] addr;
  logic [2:0] funct3;
  logic [31:0] src, rdata, value, shadow;
  int checks = 0, failures = 0;

  csr_reg dut (.clk, .rst, .en, .addr, .funct3, .src, .rdata, .value);
  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk); failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    rst = 1; en = 0; addr = 0; funct3 = 0; src = 0; shadow = 0;
    repeat (2) @(posedge clk);
    @(negedge clk); rst = 0;
    checks++; if (value !== 0) failures++;
    for (int n = 0; n < 3000; n++) begin
      @(negedge clk);
      en = $urandom % 2; addr = ($urandom % 3 == 0) ? 12'($urandom) : 12'h51E;
      funct3 = {1'($urandom), 2'($urandom % 3 + 1)}; src = $urandom;
      #1;
      checks++;
      if (rdata !== ((addr == 12'h51E) ? shadow : 0)) failures++;
      @(posedge clk); #1;
      if (en && addr == 12'h51E)
        case (funct3[1:0])
          2'b01: shadow = src;
          2'b10: shadow = shadow | src;
          default: shadow = shadow & ~src;
        endcase
      checks++;
      if (value !== shadow) begin
        failures++;
        if (failures < 10) $display("FAIL f3=%b val=%h exp=%h", funct3, value, shadow);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
