// exp_bias_sub: subtracts the exponent bias (127) from the 9-bit sum of the
// two biased exponents, giving the intermediate exponent E_temp1 as a 10-bit
// two's complement number (range -127 .. 383). Built as a chain of ripple
// borrow full subtractors whose second operand is the constant 127, which a
// synthesis tool simplifies cell by cell.
// Combinational.
module exp_bias_sub
  import fpm_pkg::*;
(
  input  logic [ETMP_W-1:0]        e_temp,   // E1 + E2
  output logic signed [EADJ_W-1:0] e_temp1   // E1 + E2 - 127
);
  localparam logic [EADJ_W-1:0] B = EADJ_W'(BIAS);

  logic [EADJ_W-1:0] a;
  logic [EADJ_W:0]   bw;                      // borrow chain
  assign a     = EADJ_W'(e_temp);
  assign bw[0] = 1'b0;

  for (genvar i = 0; i < EADJ_W; i++) begin : g_fs
    assign e_temp1[i] = a[i] ^ B[i] ^ bw[i];
    assign bw[i+1]    = (~a[i] & B[i]) | (~(a[i] ^ B[i]) & bw[i]);
  end
endmodule
