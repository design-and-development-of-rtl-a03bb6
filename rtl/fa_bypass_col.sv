// fa_bypass_col: full-adder bypassing cell of the column-bypassing multiplier.
// The cell at row j, column i adds the partial product a_i*b_j, the sum from the
// cell above-right (sin) and the carry from the cell above (cin). The multiplicand
// bit a_i is the select: when it is 0 the two gates in front of the adder isolate
// its inputs (modelled as AND gating, so the adder sees all zeros and does not
// toggle) and the multiplexer passes sin straight to sout; the carry out is then 0.
// When a_i is 1 the adder's own sum and carry are used. Exactness of the bypass
// relies on cin being 0 in a bypassed column, which holds because every cell of that
// column is bypassed. The tri-state gates of the transistor-level cell become AND
// gates here, a choice of this RTL. Combinational.
module fa_bypass_col (
  input  logic a,     // multiplicand bit, also the bypass select
  input  logic b,     // multiplicator bit
  input  logic sin,   // sum from the previous row
  input  logic cin,   // carry from the previous row, same column
  output logic sout,
  output logic cout
);
  logic fs, fc;

  full_adder u_fa (
    .x(a & b),
    .y(a & sin),
    .z(a & cin),
    .s(fs),
    .c(fc)
  );

  assign sout = a ? fs : sin;
  assign cout = fc;
endmodule
