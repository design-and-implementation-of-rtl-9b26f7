// full_adder: one-bit full adder, the cell from which the ripple carry
// adders, the carry-save rows and the 4:2 compressors are built.
// Combinational: s = a ^ b ^ cin and cout = majority(a, b, cin), written
// as generate | (propagate & cin) so that cin appears once in each output
// and a chain of these cells stays linear in size when flattened.
module full_adder (
  input  logic a,
  input  logic b,
  input  logic cin,
  output logic s,
  output logic cout
);
  logic p;
  assign p    = a ^ b;
  assign s    = p ^ cin;
  assign cout = (a & b) | (p & cin);
endmodule
