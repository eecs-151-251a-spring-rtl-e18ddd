// tb_load_extend: self-checking test of load_extend.
// Every load type and lane for random words.
module tb_load_extend;
  logic [31:0] word, data, exp;
  logic [1:0] addr_lo;
  logic [2:0] funct3;
  int checks = 0, failures = 0;
  logic [2:0] types [5] = '{3'b000, 3'b001, 3'b010, 3'b100, 3'b101};

  load_extend dut (.word, .addr_lo, .funct3, .data);

  initial begin
    #100000; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int n = 0; n < 400; n++) begin
      for (int t = 0; t < 5; t++) begin
        for (int l = 0; l < 4; l++) begin
          logic [7:0] b8; logic [15:0] h16;
          word = $urandom; funct3 = types[t]; addr_lo = l;
          #1;
          b8 = 8'(word >> (8 * l));
          h16 = 16'(word >> (16 * (l / 2)));
          case (funct3)
            3'b000: exp = 32'(signed'(b8));
            3'b001: exp = 32'(signed'(h16));
            3'b100: exp = 32'(b8);
            3'b101: exp = 32'(h16);
            default: exp = word;
          endcase
          checks++;
          if (data !== exp) begin
            failures++;
            if (failures < 10) $display("FAIL f3=%b lo=%0d w=%h d=%h exp=%h", funct3, l, word, data, exp);
          end
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
