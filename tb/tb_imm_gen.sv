// tb_imm_gen: self-checking test of imm_gen.
// Encodes random offsets with the assembler helpers (which place the bits
// per format) and checks that the generator recovers them.
module tb_imm_gen;
  import riscv_pkg::*;
  import rv_asm_pkg::*;
  logic [31:0] inst, imm;
  imm_sel_e sel;
  int checks = 0, failures = 0;

  imm_gen dut (.inst, .sel, .imm);

  task automatic chk(logic [31:0] i, imm_sel_e s, logic [31:0] exp);
    inst = i; sel = s; #1;
    checks++;
    if (imm !== exp) begin
      failures++;
      if (failures < 10) $display("FAIL sel=%s inst=%h imm=%h exp=%h", s.name(), i, imm, exp);
    end
  endtask

  initial begin
    #100000; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    chk(addi(15, 1, -50), IMM_I, -32'sd50);
    chk(store(3'b010, 14, 2, 8), IMM_S, 32'd8);
    chk(br(3'b000, 1, 2, -4096), IMM_B, -32'sd4096);
    chk(br(3'b000, 1, 2, 4094), IMM_B, 32'd4094);
    chk(jal(1, -1048576), IMM_J, -32'sd1048576);
    for (int n = 0; n < 500; n++) begin
      int v;
      v = $signed(12'($urandom));           chk(addi($urandom % 32, $urandom % 32, v), IMM_I, v);
      v = $signed(12'($urandom));           chk(store(3'b010, $urandom % 32, $urandom % 32, v), IMM_S, v);
      v = $signed({12'($urandom), 1'b0});   chk(br(3'b001, $urandom % 32, $urandom % 32, v), IMM_B, v);
      v = $signed({20'($urandom), 1'b0});   chk(jal($urandom % 32, v), IMM_J, v);
      v = $urandom;                         chk(lui($urandom % 32, v), IMM_U, {v[19:0], 12'b0});
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
