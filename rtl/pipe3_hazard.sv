// pipe3_hazard: hazard unit of the 3-stage (I, X, M) RV32I pipeline.
//
// Only one instruction, the one in M, can still owe a register value to the
// instruction in X: the register file is written at the end of M and read
// in X. Three cases follow.
//  * Bypass: if M writes a register that X reads and M is not a load, the
//    M-stage result (ALU result, link address or CSR value) replaces the
//    register-file value (fwd_a for rs1, fwd_b for rs2).
//  * Load-use stall: if M is a load whose rd is read by X, the load data is
//    only known at the end of M. stall holds PC and the instruction
//    register for one cycle and sends a bubble into M; the next cycle X
//    reads the loaded value from the register file. Independent
//    instructions after a load are not delayed.
//  * Kill: branches are predicted not taken. When X resolves a taken branch
//    or a jump (x_redirect), kill squashes the instruction just fetched
//    into the instruction register and the PC is loaded with the target. A
//    stalled instruction does not redirect until its operands are valid.
// Register x0 never creates a dependence. Purely combinational.
module pipe3_hazard (
  input  logic       x_valid,
  input  logic [4:0] x_rs1,
  input  logic [4:0] x_rs2,
  input  logic       x_uses_rs1,
  input  logic       x_uses_rs2,
  input  logic       x_redirect,
  input  logic       m_valid,
  input  logic       m_reg_wen,
  input  logic [4:0] m_rd,
  input  logic       m_is_load,
  output logic       fwd_a,
  output logic       fwd_b,
  output logic       stall,
  output logic       kill
);
  logic m_writes, dep_a, dep_b;

  always_comb begin
    m_writes = m_valid && m_reg_wen && (m_rd != 5'd0);
    dep_a    = x_valid && x_uses_rs1 && m_writes && (x_rs1 == m_rd);
    dep_b    = x_valid && x_uses_rs2 && m_writes && (x_rs2 == m_rd);
    stall    = m_is_load && (dep_a || dep_b);
    fwd_a    = dep_a && !m_is_load;
    fwd_b    = dep_b && !m_is_load;
    kill     = x_valid && x_redirect && !stall;
  end
endmodule
