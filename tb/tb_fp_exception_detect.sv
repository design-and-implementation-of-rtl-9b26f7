// tb_fp_exception_detect: every pair of operand kinds (normal, zero,
// denormal, infinity, NaN) against the expected special-case outcome.
module tb_fp_exception_detect;
  import fpm_pkg::*;
  int checks = 0, failures = 0;
  fp_class_t   ca, cb;
  fp_special_t sp;
  fp_exception_detect dut (.cls_a(ca), .cls_b(cb), .spec(sp));

  typedef enum int {NORM, ZERO, DEN, INF, NAN} kind_e;

  function automatic fp_class_t cls_of(kind_e k);
    fp_class_t c = '0;
    c.zero   = (k == ZERO) || (k == DEN);
    c.denorm = (k == DEN);
    c.inf    = (k == INF);
    c.nan    = (k == NAN);
    return c;
  endfunction

  initial begin
    for (int i = 0; i < 5; i++) for (int j = 0; j < 5; j++) begin
      kind_e ka, kb;
      fp_special_t want;
      ka = kind_e'(i); kb = kind_e'(j);
      ca = cls_of(ka); cb = cls_of(kb);
      #1;
      want = '0;
      if (ka == NAN || kb == NAN ||
          (ka == INF && (kb == ZERO || kb == DEN)) ||
          (kb == INF && (ka == ZERO || ka == DEN)))
        want.nan = 1;
      else if (ka == INF || kb == INF)
        want.inf = 1;
      else if (ka == ZERO || ka == DEN || kb == ZERO || kb == DEN) begin
        want.zero = 1;
        want.und  = (ka == DEN) || (kb == DEN);
      end
      checks++;
      if (sp !== want) begin
        failures++; $display("FAIL %s x %s -> %b expected %b", ka.name(), kb.name(), sp, want);
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
