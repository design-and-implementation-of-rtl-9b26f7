// ripple_carry_adder: N-bit carry-propagate adder built as a chain of full
// adders, each carry-out feeding the next cell's carry-in. The multiplier
// uses it twice: N = 8 to add the two biased exponents (sum and carry-out
// form the 9-bit E1 + E2) and N = 48 as the final stage adder that merges the
// sum and carry vectors left by the compressor tree.
// Combinational; the delay grows linearly with N (carry chain from bit 0 to
// bit N-1). The ripple structure follows the source design; a faster adder
// could be swapped in without changing the interface.
module ripple_carry_adder #(
  parameter int N = 8
) (
  input  logic [N-1:0] a,
  input  logic [N-1:0] b,
  input  logic         cin,
  output logic [N-1:0] sum,
  output logic         cout
);
  logic [N:0] c;
  assign c[0] = cin;

  for (genvar i = 0; i < N; i++) begin : g_fa
    full_adder u_fa (.a(a[i]), .b(b[i]), .cin(c[i]), .s(sum[i]), .cout(c[i+1]));
  end

  assign cout = c[N];
endmodule
