// tb_dmem: self-checking test of dmem in both read modes.
// Random byte-enabled writes and reads against a shadow array. The
// asynchronous instance must show the word in the same cycle; the
// registered instance must show it in the cycle after the address edge.
module tb_dmem;
  localparam int W = 1024;   // the memory's default size
  logic clk = 0, we, re;
  logic [31:0] addr, wdata, rd_a, rd_s;
  logic [3:0] be;
  logic [31:0] shadow [W];
  int checks = 0, failures = 0;

  dmem #(.SYNC_READ(1'b0)) u_a (.clk, .addr, .we, .be, .wdata, .re, .rdata(rd_a));
  dmem #(.SYNC_READ(1'b1)) u_s (.clk, .addr, .we, .be, .wdata, .re, .rdata(rd_s));
  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk); failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    we = 0; re = 0; addr = 0; be = 0; wdata = 0;
    for (int i = 0; i < W; i++) begin
      @(negedge clk); we = 1; be = 4'hF; addr = 4 * i; wdata = $urandom; shadow[i] = wdata;
    end
    for (int n = 0; n < 3000; n++) begin
      int i;
      logic [31:0] prev;
      @(negedge clk);
      i = $urandom % W;
      we = $urandom % 2; re = !we; be = $urandom; addr = 4 * i; wdata = $urandom;
      #1;
      checks++;
      if (rd_a !== shadow[i]) failures++;
      prev = shadow[i];
      @(posedge clk); #1;
      if (we) for (int b = 0; b < 4; b++) if (be[b]) shadow[i][8*b +: 8] = wdata[8*b +: 8];
      checks += 2;
      if (rd_a !== shadow[i]) begin
        failures++;
        if (failures < 10) $display("FAIL async i=%0d rd=%h exp=%h", i, rd_a, shadow[i]);
      end
      // registered read returns the word as it was at the edge
      if (re && rd_s !== prev) begin
        failures++;
        if (failures < 10) $display("FAIL sync i=%0d rd=%h exp=%h", i, rd_s, prev);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
