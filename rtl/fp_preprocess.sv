// fp_preprocess: first pipeline stage. Splits the two binary32 operands into
// sign, biased exponent and 24-bit significand, prepending the hidden bit
// (1 for a normal number, 0 when the exponent is 0), and classifies each
// operand as zero, denormal, infinity or NaN for the exception logic.
// Denormal operands are not given a significand of their own: they are
// marked zero here and flushed to a signed zero with the underflow flag
// later on.
// Combinational; in_valid is carried along in the output record.
module fp_preprocess
  import fpm_pkg::*;
(
  input  logic  in_valid,
  input  fp32_t f1,        // multiplicand
  input  fp32_t f2,        // multiplier
  output s1_t   out
);
  function automatic fp_class_t classify(fp32_t f);
    fp_class_t c;
    c.zero   = (f.exp == '0);
    c.denorm = (f.exp == '0) && (f.frac != '0);
    c.inf    = (f.exp == '1) && (f.frac == '0);
    c.nan    = (f.exp == '1) && (f.frac != '0);
    return c;
  endfunction

  always_comb begin
    out.valid  = in_valid;
    out.sign_a = f1.sign;
    out.sign_b = f2.sign;
    out.exp_a  = f1.exp;
    out.exp_b  = f2.exp;
    out.sig_a  = {f1.exp != '0, f1.frac};
    out.sig_b  = {f2.exp != '0, f2.frac};
    out.cls_a  = classify(f1);
    out.cls_b  = classify(f2);
  end
endmodule
