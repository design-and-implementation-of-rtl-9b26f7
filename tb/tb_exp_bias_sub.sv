// tb_exp_bias_sub: exhaustive check of E_temp - 127 for every 9-bit E_temp.
module tb_exp_bias_sub;
  int checks = 0, failures = 0;
  logic [8:0]        e_temp;
  logic signed [9:0] e_temp1;
  exp_bias_sub dut (.e_temp(e_temp), .e_temp1(e_temp1));
  initial begin
    for (int e = 0; e < 512; e++) begin
      e_temp = 9'(e);
      #1;
      checks++;
      if (int'(e_temp1) != e - 127) begin
        failures++; $display("FAIL %0d - 127 = %0d", e, e_temp1);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
