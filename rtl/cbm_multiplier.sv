// cbm_multiplier: N x N unsigned column-bypassing array multiplier.
// Row 0 is the partial product a*b_0. Rows 1..N-1 are carry-save rows of N
// fa_bypass_col cells; cell (j,i) sits at binary weight i+j, takes the sum of cell
// (j-1,i+1) and the carry of cell (j-1,i), and passes its sum down-right and its
// carry straight down, so a column of cells shares one multiplicand bit a_i. When
// a_i is 0 the whole column is idle: sums flow through and carries stay 0. Product
// bit j is the rightmost sum of row j; the last row's sums and carries are merged by
// a carry look-ahead adder (cla_adder) into the upper N product bits.
// Purely combinational; the path delay grows with the number of 1s in a.
module cbm_multiplier #(
  parameter int unsigned N = 64
) (
  input  logic [N-1:0]   a,   // multiplicand
  input  logic [N-1:0]   b,   // multiplicator
  output logic [2*N-1:0] p
);
  logic [N-1:0] s [N];   // s[j][i]: sum of cell (j,i), weight i+j
  logic [N-1:0] c [N];   // c[j][i]: carry of cell (j,i), weight i+j+1

  assign s[0] = a & {N{b[0]}};
  assign c[0] = '0;

  for (genvar j = 1; j < N; j++) begin : g_row
    for (genvar i = 0; i < N; i++) begin : g_col
      logic sin;
      if (i < N - 1) begin : g_in
        assign sin = s[j-1][i+1];
      end else begin : g_top
        assign sin = 1'b0;
      end
      fa_bypass_col u_cell (
        .a   (a[i]),
        .b   (b[j]),
        .sin (sin),
        .cin (c[j-1][i]),
        .sout(s[j][i]),
        .cout(c[j][i])
      );
    end
  end

  for (genvar j = 0; j < N; j++) begin : g_low
    assign p[j] = s[j][0];
  end

  // Final addition: sums at weights N..2N-2, carries at weights N..2N-1.
  logic cout_unused;
  cla_adder #(.W(N)) u_final (
    .a   ({1'b0, s[N-1][N-1:1]}),
    .b   (c[N-1]),
    .cin (1'b0),
    .s   (p[2*N-1:N]),
    .cout(cout_unused)
  );
endmodule
