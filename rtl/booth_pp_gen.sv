// booth_pp_gen: the "Booth processor". Generates the partial products of the
// unsigned 24 x 24-bit significand product X * Y with radix-8 modified Booth
// recoding of Y.
//
// Y is zero-extended to 27 bits and cut into nine overlapping quartets
// (bit y[-1] = 0); quartet i covers bits 3i+2 .. 3i-1 and gives a digit d_i
// in -4..+4 with Y = sum d_i * 8^i. Digits 0..7 are the eight Booth partial
// products of the 24-bit significand. Because the hidden bit y[23] is the
// top bit of quartet 7, that digit is negative for a normal number; the
// ninth digit, quartet {0,0,0,y[23]}, is then +1 and restores the unsigned
// value (partial product 8 is X or 0, shifted by 24).
//
// For each digit a multiplexer picks 0, X, 2X, 3X or 4X; 2X and 4X are
// shifts, 3X = 2X + X comes from one ripple carry adder shared by all
// digits. A negative digit takes the two's complement of the shifted
// multiple. Every partial product is a 48-bit two's complement vector, so
// their sum modulo 2^48 is exactly X * Y.
// Combinational.
module booth_pp_gen
  import fpm_pkg::*;
(
  input  logic [SIG_W-1:0]            x,    // multiplicand significand
  input  logic [SIG_W-1:0]            y,    // multiplier significand
  output logic [NPP-1:0][PROD_W-1:0]  pp
);
  localparam int MW = SIG_W + 2;            // width of 0..4X multiples

  // 3X = 2X + X
  logic [MW-1:0] x1, x2, x3, x4;
  logic          x3_cout;
  assign x1 = MW'(x);
  assign x2 = MW'(x) << 1;
  assign x4 = MW'(x) << 2;
  ripple_carry_adder #(.N(MW)) u_x3 (
    .a(x2), .b(x1), .cin(1'b0), .sum(x3), .cout(x3_cout)
  );

  // Multiplier zero-extended to 27 bits with y[-1] = 0 appended below.
  logic [3*NPP:0] y_ext;
  assign y_ext = {{(3*NPP - SIG_W){1'b0}}, y, 1'b0};

  for (genvar i = 0; i < NPP; i++) begin : g_pp
    booth_digit_t  digit;
    logic [MW-1:0] mult;
    logic [PROD_W-1:0] shifted;

    booth_r8_encoder u_enc (.quartet(y_ext[3*i +: 4]), .digit(digit));

    always_comb begin
      unique case (digit.mag)
        3'd1:    mult = x1;
        3'd2:    mult = x2;
        3'd3:    mult = x3;
        3'd4:    mult = x4;
        default: mult = '0;
      endcase
    end

    assign shifted = PROD_W'(mult) << (3 * i);
    assign pp[i]   = (shifted ^ {PROD_W{digit.neg}}) + PROD_W'(digit.neg);
  end
endmodule
