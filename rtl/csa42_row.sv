// csa42_row: a W-bit row of 4:2 compressors that reduces four W-bit vectors
// to a sum vector and a carry vector with a + b + c + d == sum + carry
// (mod 2^W). Column j takes its lateral cin from column j-1's cout (0 at
// column 0), so a column's cout is absorbed by its neighbour; the column
// carries weigh 2^(j+1) and form the carry vector shifted up by one. What
// leaves the top column weighs 2^W and is dropped: all arithmetic is modulo
// 2^W, which is exact for the 48-bit significand product.
// Combinational, one compressor (four XOR) delay: cout does not depend on
// cin, so nothing ripples along the row.
module csa42_row #(
  parameter int W = 48
) (
  input  logic [W-1:0] a,
  input  logic [W-1:0] b,
  input  logic [W-1:0] c,
  input  logic [W-1:0] d,
  output logic [W-1:0] sum,
  output logic [W-1:0] carry
);
  logic [W-1:0] col_cout;
  logic [W-1:0] col_carry;

  for (genvar j = 0; j < W; j++) begin : g_col
    logic cin_j;
    if (j == 0) begin : g_first
      assign cin_j = 1'b0;
    end else begin : g_rest
      assign cin_j = col_cout[j-1];
    end
    compressor42 u_c42 (
      .i1(a[j]), .i2(b[j]), .i3(c[j]), .i4(d[j]), .cin(cin_j),
      .cout(col_cout[j]), .sum(sum[j]), .carry(col_carry[j])
    );
  end

  // Carries out of the top column weigh 2^W and fall outside the product.
  assign carry = {col_carry[W-2:0], 1'b0};
endmodule
