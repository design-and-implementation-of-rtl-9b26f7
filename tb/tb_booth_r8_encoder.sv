// tb_booth_r8_encoder: all sixteen quartets against the radix-8 digit value
// -4*q3 + 2*q2 + q1 + q0.
module tb_booth_r8_encoder;
  import fpm_pkg::*;
  int checks = 0, failures = 0;
  logic [3:0]   q;
  booth_digit_t d;
  booth_r8_encoder dut (.quartet(q), .digit(d));
  initial begin
    for (int i = 0; i < 16; i++) begin
      int want, got;
      q = 4'(i);
      #1;
      want = -4 * int'(q[3]) + 2 * int'(q[2]) + int'(q[1]) + int'(q[0]);
      got  = d.neg ? -int'(d.mag) : int'(d.mag);
      checks++;
      if (got != want || d.mag > 4) begin
        failures++; $display("FAIL quartet %b: digit %0d expected %0d", q, got, want);
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
