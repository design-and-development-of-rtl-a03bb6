// full_adder: the one-bit adder cell of the multiplier arrays and of the ripple adder.
// sum = x ^ y ^ z, carry = majority(x, y, z). Purely combinational.
module full_adder (
  input  logic x,
  input  logic y,
  input  logic z,
  output logic s,
  output logic c
);
  assign s = x ^ y ^ z;
  assign c = (x & y) | (z & (x ^ y));
endmodule
