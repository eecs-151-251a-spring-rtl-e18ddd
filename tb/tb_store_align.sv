// tb_store_align: self-checking test of store_align.
// Applies the byte enables and data to a random old word and compares the
// merged word with the expected SB/SH/SW result.
module tb_store_align;
  logic [31:0] data, wdata, old, merged, exp;
  logic [1:0] addr_lo;
  logic [2:0] funct3;
  logic [3:0] be;
  int checks = 0, failures = 0;

  store_align dut (.data, .addr_lo, .funct3, .wdata, .be);

  initial begin
    #100000; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int n = 0; n < 1000; n++) begin
      for (int s = 0; s < 3; s++) begin
        for (int l = 0; l < 4; l++) begin
          if (s == 1 && l[0]) continue;
          if (s == 2 && l != 0) continue;
          data = $urandom; old = $urandom; funct3 = 3'(s); addr_lo = l;
          #1;
          for (int i = 0; i < 4; i++) merged[8*i +: 8] = be[i] ? wdata[8*i +: 8] : old[8*i +: 8];
          exp = old;
          if (s == 0) exp[8*l +: 8] = data[7:0];
          else if (s == 1) exp[8*l +: 16] = data[15:0];
          else exp = data;
          checks++;
          if (merged !== exp) begin
            failures++;
            if (failures < 10) $display("FAIL s=%0d lo=%0d be=%b wd=%h exp=%h", s, l, be, wdata, exp);
          end
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
