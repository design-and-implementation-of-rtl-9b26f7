// fp_exception_detect: decides, from the classes of the two operands, which
// special result a multiplication must give regardless of the datapath:
//   nan  - either operand is NaN, or zero (or denormal) times infinity;
//   inf  - otherwise, either operand is infinity;
//   zero - otherwise, either operand is zero or denormal;
//   und  - the zero result comes from flushing a denormal operand.
// Overflow and underflow of normal operands are found later, after the
// exponent has been normalized (fp_normalize).
// Combinational; sits in the second pipeline stage.
module fp_exception_detect
  import fpm_pkg::*;
(
  input  fp_class_t   cls_a,
  input  fp_class_t   cls_b,
  output fp_special_t spec
);
  always_comb begin
    spec.nan  = cls_a.nan | cls_b.nan
              | (cls_a.inf & cls_b.zero) | (cls_b.inf & cls_a.zero);
    spec.inf  = ~spec.nan & (cls_a.inf | cls_b.inf);
    spec.zero = ~spec.nan & ~spec.inf & (cls_a.zero | cls_b.zero);
    spec.und  = spec.zero & (cls_a.denorm | cls_b.denorm);
  end
endmodule
