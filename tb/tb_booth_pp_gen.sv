// tb_booth_pp_gen: the nine partial products must add up (mod 2^48) to the
// integer product of the two 24-bit significands. Corner operands plus
// random ones, including multipliers whose quartets select every multiple.
module tb_booth_pp_gen;
  import fpm_pkg::*;
  int checks = 0, failures = 0;
  logic [23:0] x, y;
  logic [8:0][47:0] pp;
  booth_pp_gen dut (.x(x), .y(y), .pp(pp));

  task automatic check();
    logic [47:0] acc, want;
    #1;
    acc = '0;
    for (int i = 0; i < 9; i++) acc += pp[i];
    want = 48'(x) * 48'(y);
    checks++;
    if (acc !== want) begin
      failures++; $display("FAIL %h * %h: pp sum %h expected %h", x, y, acc, want);
    end
  endtask

  initial begin
    x = 24'hFFFFFF; y = 24'hFFFFFF; check();
    x = 24'h800000; y = 24'h800000; check();
    x = 24'hA00000; y = 24'hF00000; check();   // 1.25 * 1.875
    x = 24'hFFFFFF; y = 24'h924924; check();
    x = 24'h000000; y = 24'hFFFFFF; check();
    x = 24'h123456; y = 24'h000000; check();
    for (int k = 0; k < 5000; k++) begin
      x = 24'($urandom); y = 24'($urandom);
      if (k % 3 == 0) begin x[23] = 1'b1; y[23] = 1'b1; end
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
