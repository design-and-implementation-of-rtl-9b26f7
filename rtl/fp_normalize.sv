// fp_normalize: exponent normalization, significand normalization and the
// final exception decision of the last pipeline stage.
//
// For normal operands the 48-bit significand product has its leading one at
// bit 47 or bit 46 (binary point between bits 45 and 46). When bit 47 is
// set the product is shifted right by one and the exponent is incremented;
// otherwise it is already normalized. The 23 fraction bits below the
// leading one are kept and the rest are dropped (rounding toward zero).
// The normalized exponent e = E1 + E2 - 127 + bit47 then decides:
//   e >= 255 -> overflow:  signed infinity, ovf flag;
//   e <= 0   -> underflow: signed zero, und flag;
// Special operands override the datapath: NaN -> quiet NaN with the nan
// flag, infinity -> signed infinity with the inf flag, zero -> signed zero
// (und flag when a denormal operand was flushed).
// Combinational.
module fp_normalize
  import fpm_pkg::*;
(
  input  logic                     sign,
  input  logic signed [EADJ_W-1:0] e_temp1,  // E1 + E2 - 127
  input  logic [PROD_W-1:0]        prod,     // significand product
  input  fp_special_t              spec,
  output fp32_t                    result,
  output fp_flags_t                flags
);
  logic                     msb;
  logic signed [EADJ_W-1:0] e_norm;
  logic [FRAC_W-1:0]        frac;

  assign msb    = prod[PROD_W-1];
  assign e_norm = e_temp1 + EADJ_W'(msb);
  assign frac   = msb ? prod[PROD_W-2 -: FRAC_W] : prod[PROD_W-3 -: FRAC_W];

  always_comb begin
    result = '{sign: sign, exp: e_norm[EXP_W-1:0], frac: frac};
    flags  = '0;
    if (spec.nan) begin
      result    = '{sign: sign, exp: '1, frac: QNAN_FRAC};
      flags.nan = 1'b1;
    end else if (spec.inf) begin
      result    = '{sign: sign, exp: '1, frac: '0};
      flags.inf = 1'b1;
    end else if (spec.zero) begin
      result    = '{sign: sign, exp: '0, frac: '0};
      flags.und = spec.und;
    end else if (e_norm >= EADJ_W'(255)) begin
      result    = '{sign: sign, exp: '1, frac: '0};
      flags.ovf = 1'b1;
    end else if (e_norm <= 0) begin
      result    = '{sign: sign, exp: '0, frac: '0};
      flags.und = 1'b1;
    end
  end
endmodule
