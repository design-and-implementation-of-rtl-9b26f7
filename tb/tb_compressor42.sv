// tb_compressor42: all 32 input combinations. Checks the counting identity
// i1+i2+i3+i4+cin == sum + 2*(carry + cout) and that cout does not depend
// on cin (so a row of compressors does not ripple).
module tb_compressor42;
  int checks = 0, failures = 0;
  logic i1, i2, i3, i4, cin, cout, sum, carry;
  compressor42 dut (.i1(i1), .i2(i2), .i3(i3), .i4(i4), .cin(cin),
                    .cout(cout), .sum(sum), .carry(carry));
  initial begin
    for (int v = 0; v < 16; v++) begin
      logic cout0;
      for (int c = 0; c < 2; c++) begin
        int ones;
        {i1, i2, i3, i4} = 4'(v); cin = 1'(c);
        #1;
        ones = int'(i1) + int'(i2) + int'(i3) + int'(i4) + int'(cin);
        checks++;
        if (ones != int'(sum) + 2 * (int'(carry) + int'(cout))) begin
          failures++; $display("FAIL in=%b cin=%0b -> cout=%0b carry=%0b sum=%0b", 4'(v), cin, cout, carry, sum);
        end
        if (c == 0) cout0 = cout;
        else begin
          checks++;
          if (cout !== cout0) begin
            failures++; $display("FAIL cout depends on cin for in=%b", 4'(v));
          end
        end
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
