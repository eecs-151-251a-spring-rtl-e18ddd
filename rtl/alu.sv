// alu: the 32-bit arithmetic/logic unit of the RV32I datapath.
//
// Computes y = a OP b for the ten RV32I register-register operations (ADD,
// SUB, SLL, SLT, SLTU, XOR, SRL, SRA, OR, AND) and a pass-through of b used
// for LUI. Shift amounts are b[4:0]. Purely combinational. The datapath also
// uses the ADD operation for load/store addresses and branch/jump targets
// (A = PC or rs1, B = immediate). The set of operations follows the RV32I
// instruction table; the pass-B operation and the case-statement structure
// are this design's choice.
module alu
  import riscv_pkg::*;
(
  input  logic [XLEN-1:0] a,
  input  logic [XLEN-1:0] b,
  input  alu_op_e         op,
  output logic [XLEN-1:0] y
);
  always_comb begin
    unique case (op)
      ALU_ADD:   y = a + b;
      ALU_SUB:   y = a - b;
      ALU_SLL:   y = a << b[4:0];
      ALU_SLT:   y = {31'b0, $signed(a) < $signed(b)};
      ALU_SLTU:  y = {31'b0, a < b};
      ALU_XOR:   y = a ^ b;
      ALU_SRL:   y = a >> b[4:0];
      ALU_SRA:   y = $unsigned($signed(a) >>> b[4:0]);
      ALU_OR:    y = a | b;
      ALU_AND:   y = a & b;
      ALU_PASSB: y = b;
      default:   y = '0;
    endcase
  end
endmodule
