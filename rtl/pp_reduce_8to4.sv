// pp_reduce_8to4: first level of the partial product tree. Two rows of 4:2
// compressors work side by side: partial products 0..3 become one
// sum/carry pair and partial products 4..7 another, leaving four vectors
// whose sum equals the sum of the eight inputs (mod 2^48).
// Combinational, one 4:2 compressor delay.
module pp_reduce_8to4
  import fpm_pkg::*;
(
  input  logic [7:0][PROD_W-1:0] pp,
  output logic [3:0][PROD_W-1:0] v4     // {carry1, sum1, carry0, sum0}
);
  csa42_row #(.W(PROD_W)) u_lo (
    .a(pp[0]), .b(pp[1]), .c(pp[2]), .d(pp[3]), .sum(v4[0]), .carry(v4[1])
  );
  csa42_row #(.W(PROD_W)) u_hi (
    .a(pp[4]), .b(pp[5]), .c(pp[6]), .d(pp[7]), .sum(v4[2]), .carry(v4[3])
  );
endmodule
