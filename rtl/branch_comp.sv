// branch_comp: branch comparator of the RV32I datapath.
//
// Compares the two register operands and reports br_eq (a == b) and br_lt
// (a < b), where br_un = 1 selects an unsigned and 0 a signed comparison.
// The control logic derives all six branch conditions from these two flags
// (BGE is !BrLT, BNE is !BrEq). Purely combinational, as in the lecture's
// datapath.
module branch_comp
  import riscv_pkg::*;
(
  input  logic [XLEN-1:0] a,
  input  logic [XLEN-1:0] b,
  input  logic            br_un,
  output logic            br_eq,
  output logic            br_lt
);
  always_comb begin
    br_eq = (a == b);
    br_lt = br_un ? (a < b) : ($signed(a) < $signed(b));
  end
endmodule
