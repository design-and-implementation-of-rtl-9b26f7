// sign_calc: sign of the product. A product is negative when exactly one
// operand is negative, so the result sign is the XOR of the operand signs.
// Combinational; sits in the second pipeline stage beside the exponent adder.
module sign_calc (
  input  logic sign_a,
  input  logic sign_b,
  output logic sign
);
  assign sign = sign_a ^ sign_b;
endmodule
