// fa_bypass_row: full-adder bypassing cell of the row-bypassing multiplier.
// The multiplicator bit b_j is the select. With b_j = 1 the cell is an ordinary
// carry-save adder cell: it adds a_i*b_j, the sum from above-right (sin) and the
// carry from above (cin). With b_j = 0 its inputs are isolated (AND gating in place
// of tri-state gates) and two multiplexers pass the previous row's state down
// unchanged: sout takes sin, and cout takes cin_byp, the carry that the previous row
// produced one column further left. Passing that neighbour's carry keeps every bit at
// its binary weight, since a row's carries weigh twice its sums. The second carry
// multiplexer is how this RTL keeps the bypass exact. Combinational.
module fa_bypass_row (
  input  logic a,        // multiplicand bit
  input  logic b,        // multiplicator bit, also the bypass select
  input  logic sin,      // sum from the previous row (column i+1)
  input  logic cin,      // carry from the previous row (column i)
  input  logic cin_byp,  // carry from the previous row (column i+1), used when bypassed
  output logic sout,
  output logic cout
);
  logic fs, fc;

  full_adder u_fa (
    .x(a & b),
    .y(b & sin),
    .z(b & cin),
    .s(fs),
    .c(fc)
  );

  assign sout = b ? fs : sin;
  assign cout = b ? fc : cin_byp;
endmodule
