// booth_r8_encoder: radix-8 modified Booth recoding of one multiplier
// quartet {y[i+2], y[i+1], y[i], y[i-1]} into a signed digit in -4..+4,
// value = -4*q[3] + 2*q[2] + q[1] + q[0]. The digit is given as a sign
// (neg) and a magnitude (mag, 0..4) that steer the partial product
// multiplexer. Quartets 0000 and 1111 give 0 with neg = 0.
// Combinational.
module booth_r8_encoder
  import fpm_pkg::*;
(
  input  logic [3:0]   quartet,
  output booth_digit_t digit
);
  always_comb begin
    unique case (quartet)
      4'b0000: digit = '{neg: 1'b0, mag: 3'd0};
      4'b0001: digit = '{neg: 1'b0, mag: 3'd1};
      4'b0010: digit = '{neg: 1'b0, mag: 3'd1};
      4'b0011: digit = '{neg: 1'b0, mag: 3'd2};
      4'b0100: digit = '{neg: 1'b0, mag: 3'd2};
      4'b0101: digit = '{neg: 1'b0, mag: 3'd3};
      4'b0110: digit = '{neg: 1'b0, mag: 3'd3};
      4'b0111: digit = '{neg: 1'b0, mag: 3'd4};
      4'b1000: digit = '{neg: 1'b1, mag: 3'd4};
      4'b1001: digit = '{neg: 1'b1, mag: 3'd3};
      4'b1010: digit = '{neg: 1'b1, mag: 3'd3};
      4'b1011: digit = '{neg: 1'b1, mag: 3'd2};
      4'b1100: digit = '{neg: 1'b1, mag: 3'd2};
      4'b1101: digit = '{neg: 1'b1, mag: 3'd1};
      4'b1110: digit = '{neg: 1'b1, mag: 3'd1};
      default: digit = '{neg: 1'b0, mag: 3'd0};   // 4'b1111
    endcase
  end
endmodule
