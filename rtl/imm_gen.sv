// imm_gen: immediate generator of the RV32I datapath.
//
// Builds the 32-bit immediate selected by ImmSel from the fixed bit
// positions of the instruction formats: I (inst[31:20]), S (inst[31:25],
// inst[11:7]), B (13-bit even offset), U (inst[31:12] << 12) and J (21-bit
// even offset). All but U are sign-extended from inst[31], which is why
// every format keeps the sign in bit 31. Combinational.
module imm_gen
  import riscv_pkg::*;
(
  input  logic [31:0] inst,
  input  imm_sel_e    sel,
  output logic [31:0] imm
);
  always_comb begin
    unique case (sel)
      IMM_I:   imm = {{20{inst[31]}}, inst[31:20]};
      IMM_S:   imm = {{20{inst[31]}}, inst[31:25], inst[11:7]};
      IMM_B:   imm = {{19{inst[31]}}, inst[31], inst[7], inst[30:25], inst[11:8], 1'b0};
      IMM_U:   imm = {inst[31:12], 12'b0};
      IMM_J:   imm = {{11{inst[31]}}, inst[31], inst[19:12], inst[20], inst[30:21], 1'b0};
      default: imm = '0;
    endcase
  end
endmodule
