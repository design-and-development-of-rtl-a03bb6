// rbm_multiplier: N x N unsigned row-bypassing array multiplier.
// Same carry-save array as the column-bypassing multiplier, built from
// fa_bypass_row cells whose select is the multiplicator bit of their row: a row with
// b_j = 0 is idle and hands the previous row's sums and carries down unchanged
// (each carry moved one column to keep its weight). The one carry a bypassed row
// cannot hand on is the rightmost one, c[j-1][0], at weight j: it would have been
// added into product bit j. These carries are collected in a correction word and
// added to the low product half by a small extra adder on the right of the array;
// its carry out enters the final carry look-ahead adder, which merges the last row
// into the upper N product bits. The correction adder is this RTL's own way of
// keeping row bypassing exact. Purely combinational.
module rbm_multiplier #(
  parameter int unsigned N = 64
) (
  input  logic [N-1:0]   a,   // multiplicand
  input  logic [N-1:0]   b,   // multiplicator
  output logic [2*N-1:0] p
);
  logic [N-1:0] s [N];   // s[j][i]: sum of cell (j,i), weight i+j
  logic [N-1:0] c [N];   // c[j][i]: carry of cell (j,i), weight i+j+1
  logic [N-1:0] low_raw; // rightmost sums, product bits 0..N-1 before correction
  logic [N-1:0] orphan;  // carries dropped by bypassed rows, orphan[j] has weight j

  assign s[0] = a & {N{b[0]}};
  assign c[0] = '0;
  assign orphan[0] = 1'b0;

  for (genvar j = 1; j < N; j++) begin : g_row
    for (genvar i = 0; i < N; i++) begin : g_col
      logic sin, cbyp;
      if (i < N - 1) begin : g_in
        assign sin  = s[j-1][i+1];
        assign cbyp = c[j-1][i+1];
      end else begin : g_top
        assign sin  = 1'b0;
        assign cbyp = 1'b0;
      end
      fa_bypass_row u_cell (
        .a      (a[i]),
        .b      (b[j]),
        .sin    (sin),
        .cin    (c[j-1][i]),
        .cin_byp(cbyp),
        .sout   (s[j][i]),
        .cout   (c[j][i])
      );
    end
    assign orphan[j] = ~b[j] & c[j-1][0];
  end

  for (genvar j = 0; j < N; j++) begin : g_low
    assign low_raw[j] = s[j][0];
  end

  // Right-hand correction adder for the carries of bypassed rows.
  logic [N:0] low_fix;
  assign low_fix = {1'b0, low_raw} + {1'b0, orphan};
  assign p[N-1:0] = low_fix[N-1:0];

  logic cout_unused;
  cla_adder #(.W(N)) u_final (
    .a   ({1'b0, s[N-1][N-1:1]}),
    .b   (c[N-1]),
    .cin (low_fix[N]),
    .s   (p[2*N-1:N]),
    .cout(cout_unused)
  );
endmodule
