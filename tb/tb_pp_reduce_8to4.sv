// tb_pp_reduce_8to4: the four output vectors must keep the sum of the eight
// input partial products (mod 2^48). Random and all-ones vectors.
module tb_pp_reduce_8to4;
  int checks = 0, failures = 0;
  logic [7:0][47:0] pp;
  logic [3:0][47:0] v4;
  pp_reduce_8to4 dut (.pp(pp), .v4(v4));

  task automatic check();
    logic [47:0] in_sum, out_sum, lo_in, lo_out;
    #1;
    in_sum = '0; out_sum = '0;
    for (int i = 0; i < 8; i++) in_sum += pp[i];
    for (int i = 0; i < 4; i++) out_sum += v4[i];
    // each row of compressors keeps the sum of its own four inputs
    lo_in  = pp[0] + pp[1] + pp[2] + pp[3];
    lo_out = v4[0] + v4[1];
    checks += 2;
    if (out_sum !== in_sum) begin
      failures++; $display("FAIL total %h expected %h", out_sum, in_sum);
    end
    if (lo_out !== lo_in) begin
      failures++; $display("FAIL low group %h expected %h", lo_out, lo_in);
    end
  endtask

  initial begin
    for (int i = 0; i < 8; i++) pp[i] = '1;
    check();
    for (int k = 0; k < 3000; k++) begin
      for (int i = 0; i < 8; i++) pp[i] = {$urandom, $urandom} >> 16;
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
