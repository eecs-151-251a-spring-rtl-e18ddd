// tb_alu: self-checking test of alu.
// Random and corner operands for every operation, compared with results
// computed here from the RV32I definitions.
module tb_alu;
  import riscv_pkg::*;
  logic [31:0] a, b, y, exp;
  alu_op_e op;
  int checks = 0, failures = 0;

  alu dut (.a, .b, .op, .y);

  function automatic logic [31:0] ref_alu(logic [31:0] a, logic [31:0] b, alu_op_e op);
    logic signed [31:0] sa = a;
    case (op)
      ALU_ADD:  return a + b;
      ALU_SUB:  return a + ~b + 1;
      ALU_SLL:  return a << (b % 32);
      ALU_SLT:  return (sa < $signed(b)) ? 1 : 0;
      ALU_SLTU: return (a < b) ? 1 : 0;
      ALU_XOR:  return a ^ b;
      ALU_SRL:  return a >> (b % 32);
      ALU_SRA:  begin
        logic [31:0] r = a >> (b % 32);
        if (a[31] && (b % 32) != 0) r |= ~(32'hFFFF_FFFF >> (b % 32));
        return r;
      end
      ALU_OR:   return a | b;
      ALU_AND:  return a & b;
      default:  return b;
    endcase
  endfunction

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [31:0] corners [6] = '{32'h0, 32'h1, 32'h7FFF_FFFF, 32'h8000_0000, 32'hFFFF_FFFF, 32'h1F};
    for (int k = 0; k < 11; k++) begin
      for (int n = 0; n < 300; n++) begin
        op = alu_op_e'(k);
        if (n < 36) begin a = corners[n / 6]; b = corners[n % 6]; end
        else begin a = $urandom; b = $urandom; end
        #1;
        exp = ref_alu(a, b, op);
        checks++;
        if (y !== exp) begin
          failures++;
          if (failures < 10) $display("FAIL op=%s a=%h b=%h y=%h exp=%h", op.name(), a, b, y, exp);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
