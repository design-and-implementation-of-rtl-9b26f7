// fp_mult_pipe: pipelined IEEE-754 single precision floating point
// multiplier, prod_f = f1 * f2.
//
// The sign, exponent and significand paths run side by side:
//   stage 1  pre-processing: split fields, add hidden bits, classify;
//   stage 2  sign XOR, E_temp = E1 + E2 (8-bit ripple carry adder),
//            radix-8 Booth partial products (8 + 1 correction);
//   stage 3  E_temp1 = E_temp - 127, 4:2 compressors 8 -> 4 vectors;
//   stage 4  compressors 4 -> 2 vectors (correction product merged here);
//   stage 5  48-bit ripple carry final adder, normalization (shift by one
//            and exponent + 1 when bit 47 is set), truncation, overflow,
//            underflow and special-operand results.
// A register follows each stage. STAGES selects which boundaries exist:
//   5 - all five (default, the main configuration): latency 5 cycles;
//   3 - after stages 1, 3 and 5: latency 3 cycles;
//   0 - none: a purely combinational multiplier.
// In every configuration a new operand pair can enter on every clock and
// results leave in order, one per clock, STAGES cycles later; out_valid is
// in_valid delayed by the same amount. Reset (rst_n, asynchronous, active
// low) clears every pipeline register.
//
// Interface timing: f1, f2 and in_valid are sampled on a rising edge of clk;
// the matching prod_f, flags and out_valid appear after the STAGES-th
// following edge. The stage split, the Booth/4:2/ripple datapath and the
// flag names follow the source design; the valid bit, the reset, the
// truncating rounding and the exact special-value encodings are this
// design's choices.
module fp_mult_pipe
  import fpm_pkg::*;
#(
  parameter int unsigned STAGES = 5
) (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        in_valid,
  input  logic [31:0] f1,          // multiplicand
  input  logic [31:0] f2,          // multiplier
  output logic        out_valid,
  output logic [31:0] prod_f,      // product
  output logic        s_und_out,   // underflow (result flushed to zero)
  output logic        s_ovf_out,   // overflow (result set to infinity)
  output logic        s_nan_out,   // invalid operation / NaN operand
  output logic        s_inf_out    // infinite operand, infinite result
);
  if (!(STAGES inside {0, 3, 5})) begin : g_bad_stages
    $error("fp_mult_pipe: STAGES must be 0, 3 or 5");
  end

  localparam bit EN1 = (STAGES >= 3);
  localparam bit EN2 = (STAGES == 5);
  localparam bit EN3 = (STAGES >= 3);
  localparam bit EN4 = (STAGES == 5);
  localparam bit EN5 = (STAGES >= 3);

  // ---------------------------------------------------------------- stage 1
  s1_t s1_d, s1_q;
  fp_preprocess u_pre (.in_valid(in_valid), .f1(f1), .f2(f2), .out(s1_d));
  pipe_reg #(.T(s1_t), .EN(EN1)) u_r1 (.clk(clk), .rst_n(rst_n), .d(s1_d), .q(s1_q));

  // ---------------------------------------------------------------- stage 2
  s2_t  s2_d, s2_q;
  logic e_cout;
  logic [EXP_W-1:0] e_sum;

  sign_calc u_sign (.sign_a(s1_q.sign_a), .sign_b(s1_q.sign_b), .sign(s2_d.sign));
  ripple_carry_adder #(.N(EXP_W)) u_eadd (
    .a(s1_q.exp_a), .b(s1_q.exp_b), .cin(1'b0), .sum(e_sum), .cout(e_cout)
  );
  booth_pp_gen u_booth (.x(s1_q.sig_a), .y(s1_q.sig_b), .pp(s2_d.pp));
  fp_exception_detect u_exc (.cls_a(s1_q.cls_a), .cls_b(s1_q.cls_b), .spec(s2_d.spec));
  assign s2_d.valid  = s1_q.valid;
  assign s2_d.e_temp = {e_cout, e_sum};
  pipe_reg #(.T(s2_t), .EN(EN2)) u_r2 (.clk(clk), .rst_n(rst_n), .d(s2_d), .q(s2_q));

  // ---------------------------------------------------------------- stage 3
  s3_t s3_d, s3_q;
  exp_bias_sub u_bias (.e_temp(s2_q.e_temp), .e_temp1(s3_d.e_temp1));
  pp_reduce_8to4 u_red1 (.pp(s2_q.pp[7:0]), .v4(s3_d.v4));
  assign s3_d.valid = s2_q.valid;
  assign s3_d.sign  = s2_q.sign;
  assign s3_d.pp8   = s2_q.pp[8];
  assign s3_d.spec  = s2_q.spec;
  pipe_reg #(.T(s3_t), .EN(EN3)) u_r3 (.clk(clk), .rst_n(rst_n), .d(s3_d), .q(s3_q));

  // ---------------------------------------------------------------- stage 4
  s4_t s4_d, s4_q;
  pp_reduce_4to2 u_red2 (.v4(s3_q.v4), .pp8(s3_q.pp8), .sum(s4_d.sum), .carry(s4_d.carry));
  assign s4_d.valid   = s3_q.valid;
  assign s4_d.sign    = s3_q.sign;
  assign s4_d.e_temp1 = s3_q.e_temp1;
  assign s4_d.spec    = s3_q.spec;
  pipe_reg #(.T(s4_t), .EN(EN4)) u_r4 (.clk(clk), .rst_n(rst_n), .d(s4_d), .q(s4_q));

  // ---------------------------------------------------------------- stage 5
  s5_t s5_d, s5_q;
  logic [PROD_W-1:0] prod;
  logic              prod_cout;
  ripple_carry_adder #(.N(PROD_W)) u_cpa (
    .a(s4_q.sum), .b(s4_q.carry), .cin(1'b0), .sum(prod), .cout(prod_cout)
  );
  fp_normalize u_norm (
    .sign(s4_q.sign), .e_temp1(s4_q.e_temp1), .prod(prod), .spec(s4_q.spec),
    .result(s5_d.result), .flags(s5_d.flags)
  );
  assign s5_d.valid = s4_q.valid;
  pipe_reg #(.T(s5_t), .EN(EN5)) u_r5 (.clk(clk), .rst_n(rst_n), .d(s5_d), .q(s5_q));

  assign out_valid = s5_q.valid;
  assign prod_f    = s5_q.result;
  assign s_und_out = s5_q.flags.und;
  assign s_ovf_out = s5_q.flags.ovf;
  assign s_nan_out = s5_q.flags.nan;
  assign s_inf_out = s5_q.flags.inf;
endmodule
