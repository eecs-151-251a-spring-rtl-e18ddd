// tb_regfile: self-checking test of regfile.
// Random writes and reads against a shadow array; x0 must read 0; reads
// are asynchronous and a write lands at the rising edge.
module tb_regfile;
  logic clk = 0;
  logic [4:0] ra1, ra2, wa;
  logic [31:0] rd1, rd2, wd;
  logic we;
  logic [31:0] shadow [32];
  int checks = 0, failures = 0;

  regfile dut (.clk, .ra1, .ra2, .rd1, .rd2, .we, .wa, .wd);
  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    we = 0; wa = 0; wd = 0; ra1 = 0; ra2 = 0;
    // write every register once so all reads are defined
    for (int r = 0; r < 32; r++) begin
      @(negedge clk); we = 1; wa = r; wd = $urandom; shadow[r] = (r == 0) ? 0 : wd;
    end
    for (int n = 0; n < 3000; n++) begin
      @(negedge clk);
      we = $urandom % 2; wa = $urandom; wd = $urandom;
      ra1 = $urandom; ra2 = (n % 4 == 0) ? wa : 5'($urandom);
      #1;
      // before the edge: old values
      checks += 2;
      if (rd1 !== shadow[ra1]) failures++;
      if (rd2 !== shadow[ra2]) failures++;
      @(posedge clk); #1;
      if (we && wa != 0) shadow[wa] = wd;
      checks += 2;
      if (rd1 !== shadow[ra1]) begin
        failures++;
        if (failures < 10) $display("FAIL ra1=%0d rd1=%h exp=%h", ra1, rd1, shadow[ra1]);
      end
      if (rd2 !== shadow[ra2]) failures++;
    end
    ra1 = 0; #1; checks++; if (rd1 !== 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
