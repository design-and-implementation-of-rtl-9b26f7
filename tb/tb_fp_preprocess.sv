// tb_fp_preprocess: field split, hidden bit and classification of normal,
// zero, denormal, infinite and NaN operands.
module tb_fp_preprocess;
  import fpm_pkg::*;
  int checks = 0, failures = 0;
  logic  v;
  fp32_t f1, f2;
  s1_t   o;
  fp_preprocess dut (.in_valid(v), .f1(f1), .f2(f2), .out(o));

  // expected class bits {zero, denorm, inf, nan}
  task automatic check(input logic [31:0] a, input logic [31:0] b,
                       input logic [3:0] ca, input logic [3:0] cb);
    logic [23:0] siga, sigb;
    f1 = a; f2 = b; v = 1'($urandom);
    #1;
    siga = {a[30:23] != 0, a[22:0]};
    sigb = {b[30:23] != 0, b[22:0]};
    checks++;
    if (o.valid !== v || o.sign_a !== a[31] || o.sign_b !== b[31] ||
        o.exp_a !== a[30:23] || o.exp_b !== b[30:23] ||
        o.sig_a !== siga || o.sig_b !== sigb ||
        o.cls_a !== ca || o.cls_b !== cb) begin
      failures++; $display("FAIL %h %h -> cls %b %b sig %h %h", a, b, o.cls_a, o.cls_b, o.sig_a, o.sig_b);
    end
  endtask

  initial begin
    check(32'h4220_0000, 32'hC0F0_0000, 4'b0000, 4'b0000);  // 40, -7.5
    check(32'h0000_0000, 32'h8000_0000, 4'b1000, 4'b1000);  // +0, -0
    check(32'h0040_0000, 32'h0000_0001, 4'b1100, 4'b1100);  // denormals
    check(32'h7F80_0000, 32'hFF80_0000, 4'b0010, 4'b0010);  // +inf, -inf
    check(32'h7FC0_0000, 32'hFF80_0001, 4'b0001, 4'b0001);  // qNaN, sNaN
    check(32'h0080_0000, 32'h7F7F_FFFF, 4'b0000, 4'b0000);  // min / max normal
    for (int k = 0; k < 200; k++) begin
      logic [31:0] a, b;
      a = $urandom; b = $urandom;
      a[30:23] = 8'(1 + $urandom_range(0, 253));
      b[30:23] = 8'(1 + $urandom_range(0, 253));
      check(a, b, 4'b0000, 4'b0000);
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
