// tb_riscv_control: self-checking test of riscv_control.
// For each RV32I instruction kind, random register fields and comparator
// flags; the expected selects are the single-cycle datapath's settings for
// that instruction, written out here per instruction.
module tb_riscv_control;
  import riscv_pkg::*;
  import rv_asm_pkg::*;
  logic [31:0] inst;
  logic br_eq, br_lt, pc_sel;
  ctrl_t ctrl;
  int checks = 0, failures = 0;

  riscv_control dut (.inst, .br_eq, .br_lt, .ctrl, .pc_sel);

  // expected: {reg_wen, mem_wen, mem_ren, a_sel, b_sel}, wb_sel, imm_sel, alu_op, pc_sel
  task automatic chk(string nm, logic [31:0] i, logic [4:0] flags, wb_sel_e wb, imm_sel_e is,
                     alu_op_e aop, logic psel, bit check_imm = 1);
    inst = i; #1;
    checks++;
    if ({ctrl.reg_wen, ctrl.mem_wen, ctrl.mem_ren, ctrl.a_sel, ctrl.b_sel} !== flags ||
        (flags[4] && ctrl.wb_sel !== wb) || (check_imm && ctrl.imm_sel !== is) ||
        ctrl.alu_op !== aop || pc_sel !== psel) begin
      failures++;
      if (failures < 15)
        $display("FAIL %s inst=%h flags=%b wb=%s imm=%s alu=%s pc_sel=%b", nm, i,
                 {ctrl.reg_wen, ctrl.mem_wen, ctrl.mem_ren, ctrl.a_sel, ctrl.b_sel},
                 ctrl.wb_sel.name(), ctrl.imm_sel.name(), ctrl.alu_op.name(), pc_sel);
    end
  endtask

  initial begin
    #1000000; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    alu_op_e rops [8] = '{ALU_ADD, ALU_SLL, ALU_SLT, ALU_SLTU, ALU_XOR, ALU_SRL, ALU_OR, ALU_AND};
    for (int n = 0; n < 200; n++) begin
      int rd = $urandom % 32, r1 = $urandom % 32, r2 = $urandom % 32, im = $urandom % 2048;
      logic eq, lt, t;
      eq = $urandom; lt = $urandom; br_eq = eq; br_lt = lt;
      chk("lui",   lui(rd, $urandom),      5'b10001, WB_ALU, IMM_U, ALU_PASSB, 0);
      chk("auipc", auipc(rd, $urandom),    5'b10011, WB_ALU, IMM_U, ALU_ADD, 0);
      chk("jal",   jal(rd, 2 * im),        5'b10011, WB_PC4, IMM_J, ALU_ADD, 1);
      chk("jalr",  jalr(rd, r1, im),       5'b10001, WB_PC4, IMM_I, ALU_ADD, 1);
      for (int f = 0; f < 8; f++) begin
        if (f == 2 || f == 3) continue;
        case (f)
          0: t = eq; 1: t = !eq; 4, 6: t = lt; default: t = !lt;
        endcase
        chk("branch", br(3'(f), r1, r2, 2 * im), 5'b00011, WB_ALU, IMM_B, ALU_ADD, t);
        checks++; if (ctrl.br_un !== (f >= 6)) failures++;
      end
      foreach (rops[f]) begin
        chk("op",  op(3'(f), 1'b0, rd, r1, r2), 5'b10000, WB_ALU, IMM_I, rops[f], 0, 0);
        chk("opi", opi(3'(f), rd, r1, (f == 1 || f == 5) ? im % 32 : im), 5'b10001, WB_ALU, IMM_I, rops[f], 0);
      end
      chk("sub",  op(3'b000, 1'b1, rd, r1, r2), 5'b10000, WB_ALU, IMM_I, ALU_SUB, 0, 0);
      chk("sra",  op(3'b101, 1'b1, rd, r1, r2), 5'b10000, WB_ALU, IMM_I, ALU_SRA, 0, 0);
      chk("srai", opi(3'b101, rd, r1, 1024 + im % 32), 5'b10001, WB_ALU, IMM_I, ALU_SRA, 0);
      chk("addi-neg", addi(rd, r1, -1), 5'b10001, WB_ALU, IMM_I, ALU_ADD, 0);
      foreach (rops[f]) if (f != 3 && f != 6 && f != 7) begin
        chk("load", load(3'(f), rd, r1, im), 5'b10101, WB_MEM, IMM_I, ALU_ADD, 0);
      end
      for (int f = 0; f < 3; f++)
        chk("store", store(3'(f), r2, r1, im), 5'b01001, WB_ALU, IMM_S, ALU_ADD, 0);
      chk("csrrw", csr(3'b001, rd, r1, 12'h51E), 5'b10000, WB_CSR, IMM_I, ALU_ADD, 0);
      checks++; if (!ctrl.is_csr || ctrl.csr_imm || !ctrl.uses_rs1) failures++;
      chk("csrrsi", csr(3'b110, rd, r1, 12'h51E), 5'b10000, WB_CSR, IMM_I, ALU_ADD, 0);
      checks++; if (!ctrl.is_csr || !ctrl.csr_imm || ctrl.uses_rs1) failures++;
      chk("ecall", 32'h0000_0073, 5'b00000, WB_ALU, IMM_I, ALU_ADD, 0);
      chk("fence", 32'h0ff0_000f, 5'b00000, WB_ALU, IMM_I, ALU_ADD, 0);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
