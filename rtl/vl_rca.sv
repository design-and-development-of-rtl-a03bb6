// vl_rca: variable-latency ripple-carry adder with hold logic, the example behind the
// variable-latency idea. A W-bit ripple-carry adder of full_adder cells is clocked
// with a period shorter than its worst case; the hold logic spots the operands that
// could start a long carry chain through the middle of the adder and asks for a
// second cycle. For the 8-bit adder the hold function is (A4 xor B4)(A5 xor B5), with
// bits numbered from 1: only when both of those bits propagate can a carry run
// through them. HOLD_LO is the 0-based index of the first of the two bits.
// Combinational: hold = 1 means the sum needs two cycles to settle.
module vl_rca #(
  parameter int unsigned W       = 8,
  parameter int unsigned HOLD_LO = 3
) (
  input  logic [W-1:0] a,
  input  logic [W-1:0] b,
  input  logic         cin,
  output logic [W-1:0] s,
  output logic         cout,
  output logic         hold
);
  logic [W:0] c;

  assign c[0] = cin;
  for (genvar i = 0; i < W; i++) begin : g_bit
    full_adder u_fa (.x(a[i]), .y(b[i]), .z(c[i]), .s(s[i]), .c(c[i+1]));
  end
  assign cout = c[W];

  assign hold = (a[HOLD_LO] ^ b[HOLD_LO]) & (a[HOLD_LO+1] ^ b[HOLD_LO+1]);
endmodule
