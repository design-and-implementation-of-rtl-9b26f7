// tb_sign_calc: exhaustive check of the product sign (XOR of operand signs).
module tb_sign_calc;
  int checks = 0, failures = 0;
  logic sa, sb, s;
  sign_calc dut (.sign_a(sa), .sign_b(sb), .sign(s));
  initial begin
    for (int i = 0; i < 4; i++) begin
      {sa, sb} = 2'(i);
      #1;
      checks++;
      // negative exactly when one operand is negative
      if (s !== ((i == 1) || (i == 2))) begin
        failures++; $display("FAIL sa=%0b sb=%0b s=%0b", sa, sb, s);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    #1000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
