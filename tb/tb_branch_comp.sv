// tb_branch_comp: self-checking test of branch_comp.
// Random and corner operand pairs, signed and unsigned.
module tb_branch_comp;
  logic [31:0] a, b;
  logic br_un, br_eq, br_lt;
  int checks = 0, failures = 0;

  branch_comp dut (.a, .b, .br_un, .br_eq, .br_lt);

  initial begin
    #100000; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic exp_lt;
    for (int n = 0; n < 2000; n++) begin
      a = $urandom; b = (n % 5 == 0) ? a : $urandom;
      if (n % 7 == 0) b = {~a[31], a[30:0]};
      br_un = n[0];
      #1;
      // signed: flip sign bits and compare unsigned
      exp_lt = br_un ? (a < b) : ({~a[31], a[30:0]} < {~b[31], b[30:0]});
      checks += 2;
      if (br_eq !== (a == b)) failures++;
      if (br_lt !== exp_lt) begin
        failures++;
        if (failures < 10) $display("FAIL a=%h b=%h un=%b lt=%b", a, b, br_un, br_lt);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
