// compressor42: 4:2 compressor built from two full adders in series.
// The first adder sums I1, I2, I3; its carry leaves sideways as cout, which
// is the cin of the neighbouring compressor one bit higher. The second adder
// sums the first adder's sum bit with I4 and cin to give sum (weight j) and
// carry (weight j+1). cout does not depend on cin, so a row of these does
// not ripple. Invariant: i1+i2+i3+i4+cin = sum + 2*(carry + cout).
// Combinational, four XOR delays from I1..I3 to sum.
module compressor42 (
  input  logic i1,
  input  logic i2,
  input  logic i3,
  input  logic i4,
  input  logic cin,
  output logic cout,
  output logic sum,
  output logic carry
);
  logic s1;
  full_adder u_fa1 (.a(i1), .b(i2), .cin(i3), .s(s1), .cout(cout));
  full_adder u_fa2 (.a(s1), .b(i4), .cin(cin), .s(sum), .cout(carry));
endmodule
