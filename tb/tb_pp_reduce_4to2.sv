// tb_pp_reduce_4to2: sum + carry must equal the four input vectors plus the
// correction partial product (mod 2^48). Random and all-ones vectors.
module tb_pp_reduce_4to2;
  int checks = 0, failures = 0;
  logic [3:0][47:0] v4;
  logic [47:0] pp8, sum, carry;
  pp_reduce_4to2 dut (.v4(v4), .pp8(pp8), .sum(sum), .carry(carry));

  task automatic check();
    logic [47:0] want;
    #1;
    want = v4[0] + v4[1] + v4[2] + v4[3] + pp8;
    checks++;
    if (sum + carry !== want) begin
      failures++; $display("FAIL %h expected %h", sum + carry, want);
    end
  endtask

  initial begin
    for (int i = 0; i < 4; i++) v4[i] = '1;
    pp8 = '1;
    check();
    for (int k = 0; k < 3000; k++) begin
      for (int i = 0; i < 4; i++) v4[i] = {$urandom, $urandom} >> 16;
      pp8 = (k % 2) ? 48'({$urandom} & 32'hFF_FFFF) << 24 : {$urandom, $urandom} >> 16;
      check();
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
