// csa32_row: a W-bit carry-save adder, a row of full adders with no carry
// chain. It reduces three vectors to two with a + b + c == sum + carry
// (mod 2^W); the carry vector is the column carries shifted up by one.
// Combinational, one full-adder delay.
module csa32_row #(
  parameter int W = 48
) (
  input  logic [W-1:0] a,
  input  logic [W-1:0] b,
  input  logic [W-1:0] c,
  output logic [W-1:0] sum,
  output logic [W-1:0] carry
);
  logic [W-1:0] col_carry;

  for (genvar j = 0; j < W; j++) begin : g_col
    full_adder u_fa (.a(a[j]), .b(b[j]), .cin(c[j]), .s(sum[j]), .cout(col_carry[j]));
  end

  assign carry = {col_carry[W-2:0], 1'b0};
endmodule
