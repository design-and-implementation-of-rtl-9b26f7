// pp_reduce_4to2: second level of the partial product tree. The four vectors
// of the first level are compressed to a final sum and carry pair by a row
// of 4:2 compressors. The ninth (correction) partial product of the Booth
// recoder, X << 24 or 0, is first merged with the first pair by one row of
// full adders (3:2 carry-save adder), so the row of 4:2 compressors still
// sees four vectors. Output: sum + carry == v4[0..3] + pp8 (mod 2^48).
// Combinational, one full-adder plus one 4:2 compressor delay.
module pp_reduce_4to2
  import fpm_pkg::*;
(
  input  logic [3:0][PROD_W-1:0] v4,
  input  logic [PROD_W-1:0]      pp8,
  output logic [PROD_W-1:0]      sum,
  output logic [PROD_W-1:0]      carry
);
  logic [PROD_W-1:0] t_sum, t_carry;

  csa32_row #(.W(PROD_W)) u_csa (
    .a(pp8), .b(v4[0]), .c(v4[1]), .sum(t_sum), .carry(t_carry)
  );
  csa42_row #(.W(PROD_W)) u_c42 (
    .a(t_sum), .b(t_carry), .c(v4[2]), .d(v4[3]), .sum(sum), .carry(carry)
  );
endmodule
