// tb_pipe3_hazard: self-checking test of pipe3_hazard.
// Random stage contents; the expected bypass, stall and kill are worked
// out from the pipeline rules: bypass a non-load M result, stall one cycle
// on a load result, kill on a redirect unless stalled, never for x0.
module tb_pipe3_hazard;
  logic x_valid, x_uses_rs1, x_uses_rs2, x_redirect, m_valid, m_reg_wen, m_is_load;
  logic [4:0] x_rs1, x_rs2, m_rd;
  logic fwd_a, fwd_b, stall, kill;
  int checks = 0, failures = 0;
  int n_fwd = 0, n_stall = 0, n_kill = 0;

  pipe3_hazard dut (.*);

  initial begin
    #100000; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int n = 0; n < 5000; n++) begin
      logic ea, eb, es, ek, wr;
      {x_valid, x_uses_rs1, x_uses_rs2, x_redirect, m_valid, m_reg_wen, m_is_load} = $urandom;
      m_rd = $urandom % 4; x_rs1 = $urandom % 4; x_rs2 = $urandom % 4;
      #1;
      wr = m_valid & m_reg_wen & (m_rd != 0);
      ea = x_valid & x_uses_rs1 & wr & (x_rs1 == m_rd);
      eb = x_valid & x_uses_rs2 & wr & (x_rs2 == m_rd);
      es = m_is_load & (ea | eb);
      ek = x_valid & x_redirect & !es;
      ea = ea & !m_is_load; eb = eb & !m_is_load;
      checks += 4;
      if (fwd_a !== ea) failures++;
      if (fwd_b !== eb) failures++;
      if (stall !== es) failures++;
      if (kill !== ek) failures++;
      n_fwd += int'(ea | eb); n_stall += int'(es); n_kill += int'(ek);
    end
    checks++;
    if (n_fwd == 0 || n_stall == 0 || n_kill == 0) failures++;
    $display("bypass=%0d stall=%0d kill=%0d", n_fwd, n_stall, n_kill);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
