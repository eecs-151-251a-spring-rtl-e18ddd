// riscv_control: control decoder shared by both RV32I machines.
//
// A single case statement on the opcode, refined by funct3 and inst[30],
// produces the datapath selects of the single-cycle machine: ImmSel,
// RegWEn, BrUn, ASel (rs1 or PC), BSel (rs2 or immediate), ALUSel, MemRW,
// WBSel (memory, ALU, PC+4 or CSR), plus the flags the pipeline needs
// (which source registers are read, branch/jump/CSR). Signals default to a
// harmless value first, so an unknown opcode decodes as a no-operation; so
// do FENCE, ECALL and EBREAK. Branch and jump targets are computed by the
// ALU (A = PC, B = immediate; JALR uses rs1). pc_sel combines the decoded
// branch condition with the comparator flags: BEQ/BNE use br_eq, BLT/BGE/
// BLTU/BGEU use br_lt (signed or unsigned by BrUn = funct3[1]).
// Combinational; the pipeline uses the same decoder in its X stage.
module riscv_control
  import riscv_pkg::*;
(
  input  logic [31:0] inst,
  input  logic        br_eq,
  input  logic        br_lt,
  output ctrl_t       ctrl,
  output logic        pc_sel
);
  logic [6:0] opcode;
  logic [2:0] funct3;
  logic       alt;   // inst[30]: SUB / SRA
  logic       cond;

  assign opcode = inst[6:0];
  assign funct3 = inst[14:12];
  assign alt    = inst[30];

  function automatic alu_op_e alu_from_funct(input logic [2:0] f3, input logic f7b5, input logic is_reg);
    unique case (f3)
      3'b000:  return (is_reg && f7b5) ? ALU_SUB : ALU_ADD;
      3'b001:  return ALU_SLL;
      3'b010:  return ALU_SLT;
      3'b011:  return ALU_SLTU;
      3'b100:  return ALU_XOR;
      3'b101:  return f7b5 ? ALU_SRA : ALU_SRL;
      3'b110:  return ALU_OR;
      default: return ALU_AND;
    endcase
  endfunction

  always_comb begin
    ctrl           = '0;
    ctrl.imm_sel   = IMM_I;
    ctrl.alu_op    = ALU_ADD;
    ctrl.wb_sel    = WB_ALU;
    ctrl.funct3    = funct3;
    unique case (opcode)
      OP_LUI: begin
        ctrl.imm_sel = IMM_U; ctrl.b_sel = 1'b1; ctrl.alu_op = ALU_PASSB;
        ctrl.reg_wen = 1'b1;
      end
      OP_AUIPC: begin
        ctrl.imm_sel = IMM_U; ctrl.a_sel = 1'b1; ctrl.b_sel = 1'b1;
        ctrl.reg_wen = 1'b1;
      end
      OP_JAL: begin
        ctrl.imm_sel = IMM_J; ctrl.a_sel = 1'b1; ctrl.b_sel = 1'b1;
        ctrl.reg_wen = 1'b1; ctrl.wb_sel = WB_PC4; ctrl.is_jump = 1'b1;
      end
      OP_JALR: begin
        ctrl.imm_sel = IMM_I; ctrl.b_sel = 1'b1; ctrl.uses_rs1 = 1'b1;
        ctrl.reg_wen = 1'b1; ctrl.wb_sel = WB_PC4; ctrl.is_jump = 1'b1;
      end
      OP_BRANCH: begin
        ctrl.imm_sel = IMM_B; ctrl.a_sel = 1'b1; ctrl.b_sel = 1'b1;
        ctrl.is_branch = 1'b1; ctrl.br_un = funct3[1];
        ctrl.uses_rs1 = 1'b1; ctrl.uses_rs2 = 1'b1;
      end
      OP_LOAD: begin
        ctrl.imm_sel = IMM_I; ctrl.b_sel = 1'b1; ctrl.uses_rs1 = 1'b1;
        ctrl.mem_ren = 1'b1; ctrl.reg_wen = 1'b1; ctrl.wb_sel = WB_MEM;
      end
      OP_STORE: begin
        ctrl.imm_sel = IMM_S; ctrl.b_sel = 1'b1;
        ctrl.uses_rs1 = 1'b1; ctrl.uses_rs2 = 1'b1; ctrl.mem_wen = 1'b1;
      end
      OP_IMM: begin
        ctrl.imm_sel = IMM_I; ctrl.b_sel = 1'b1; ctrl.uses_rs1 = 1'b1;
        ctrl.alu_op = alu_from_funct(funct3, alt, 1'b0); ctrl.reg_wen = 1'b1;
      end
      OP_REG: begin
        ctrl.uses_rs1 = 1'b1; ctrl.uses_rs2 = 1'b1;
        ctrl.alu_op = alu_from_funct(funct3, alt, 1'b1); ctrl.reg_wen = 1'b1;
      end
      OP_SYSTEM: begin
        if (funct3[1:0] != 2'b00) begin
          ctrl.is_csr   = 1'b1;
          ctrl.csr_imm  = funct3[2];
          ctrl.uses_rs1 = !funct3[2];
          ctrl.reg_wen  = 1'b1;
          ctrl.wb_sel   = WB_CSR;
        end
      end
      default: ;  // FENCE and unknown opcodes: no-operation
    endcase
  end

  always_comb begin
    unique case (funct3)
      F3_BEQ:           cond = br_eq;
      F3_BNE:           cond = !br_eq;
      F3_BLT, F3_BLTU:  cond = br_lt;
      F3_BGE, F3_BGEU:  cond = !br_lt;
      default:          cond = 1'b0;
    endcase
    pc_sel = ctrl.is_jump || (ctrl.is_branch && cond);
  end
endmodule
