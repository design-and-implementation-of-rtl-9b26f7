// fpm_pkg: widths, constants and the stage-to-stage record types shared by
// the pipelined single precision floating point multiplier.
//
// Operands and result use the IEEE-754 binary32 layout: one sign bit, an
// 8-bit exponent biased by 127 and a 23-bit fraction with a hidden leading 1.
// The significand product is 24 x 24 = 48 bits. The radix-8 Booth recoder
// produces eight signed partial products from the 24 significand bits plus a
// ninth one (0 or +X) that makes the recoding of an unsigned multiplier exact.
// The pipeline records (s1_t .. s4_t) are this design's own grouping of the
// signals that cross each register boundary of the five-stage pipeline.
package fpm_pkg;

  localparam int EXP_W  = 8;
  localparam int FRAC_W = 23;
  localparam int SIG_W  = FRAC_W + 1;   // significand with hidden bit
  localparam int PROD_W = 2 * SIG_W;    // 48-bit significand product
  localparam int NPP    = 9;            // 8 Booth partial products + 1 correction
  localparam int BIAS   = 127;
  localparam int ETMP_W = EXP_W + 1;    // E1 + E2, 9 bits
  localparam int EADJ_W = EXP_W + 2;    // E1 + E2 - bias, signed, 10 bits

  // Canonical quiet NaN fraction (MSB of the fraction set).
  localparam logic [FRAC_W-1:0] QNAN_FRAC = 23'h40_0000;

  typedef struct packed {
    logic              sign;
    logic [EXP_W-1:0]  exp;
    logic [FRAC_W-1:0] frac;
  } fp32_t;

  // Classification of one operand.
  typedef struct packed {
    logic zero;     // exponent 0: true zero or denormal (denormals flush to zero)
    logic denorm;   // exponent 0 with non-zero fraction
    logic inf;      // exponent 255, fraction 0
    logic nan;      // exponent 255, fraction non-zero
  } fp_class_t;

  // Special-case outcome for one multiplication.
  typedef struct packed {
    logic nan;      // NaN operand, or zero times infinity
    logic inf;      // infinite result from an infinite operand
    logic zero;     // zero result from a zero or denormal operand
    logic und;      // a denormal operand was flushed to zero
  } fp_special_t;

  // Exception flags at the output.
  typedef struct packed {
    logic und;
    logic ovf;
    logic nan;
    logic inf;
  } fp_flags_t;

  // One radix-8 Booth digit: sign and magnitude 0..4.
  typedef struct packed {
    logic       neg;
    logic [2:0] mag;
  } booth_digit_t;

  // After stage 1 (pre-processing).
  typedef struct packed {
    logic              valid;
    logic              sign_a, sign_b;
    logic [EXP_W-1:0]  exp_a, exp_b;
    logic [SIG_W-1:0]  sig_a, sig_b;
    fp_class_t         cls_a, cls_b;
  } s1_t;

  // After stage 2 (sign, E1+E2, Booth partial products).
  typedef struct packed {
    logic              valid;
    logic              sign;
    logic [ETMP_W-1:0] e_temp;
    logic [NPP-1:0][PROD_W-1:0] pp;
    fp_special_t       spec;
  } s2_t;

  // After stage 3 (bias subtracted, partial products compressed to 4).
  typedef struct packed {
    logic              valid;
    logic              sign;
    logic [EADJ_W-1:0] e_temp1;
    logic [3:0][PROD_W-1:0] v4;
    logic [PROD_W-1:0] pp8;
    fp_special_t       spec;
  } s3_t;

  // After stage 4 (partial products compressed to 2).
  typedef struct packed {
    logic              valid;
    logic              sign;
    logic [EADJ_W-1:0] e_temp1;
    logic [PROD_W-1:0] sum, carry;
    fp_special_t       spec;
  } s4_t;

  // After stage 5 (final adder, normalization): the result.
  typedef struct packed {
    logic      valid;
    fp32_t     result;
    fp_flags_t flags;
  } s5_t;

endpackage
