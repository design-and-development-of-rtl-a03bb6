// cla_adder: W-bit carry look-ahead adder, the final adder of both multipliers.
// W/4 cla4 blocks produce the sums; their group generate/propagate feed a tree of
// cla_logic4 units (cla_tree) that returns each block's carry in. At the default
// W = 64 that is sixteen 4-bit adders, four look-ahead units and one look-ahead unit
// above them. cout = GG + PG*cin of the whole word. W must be a multiple of 4.
// Combinational.
module cla_adder #(
  parameter int unsigned W = 64
) (
  input  logic [W-1:0] a,
  input  logic [W-1:0] b,
  input  logic         cin,
  output logic [W-1:0] s,
  output logic         cout
);
  localparam int unsigned NG = W / 4;

  logic [NG-1:0] g, p, c;
  logic          gg, pg;

  for (genvar k = 0; k < NG; k++) begin : g_blk
    cla4 u_cla4 (
      .a  (a[4*k +: 4]),
      .b  (b[4*k +: 4]),
      .cin(c[k]),
      .s  (s[4*k +: 4]),
      .gg (g[k]),
      .pg (p[k])
    );
  end

  cla_tree #(.NG(NG)) u_tree (.g(g), .p(p), .cin(cin), .c(c), .gg(gg), .pg(pg));

  assign cout = gg | (pg & cin);

  initial assert (W % 4 == 0 && W >= 4) else $error("cla_adder: W must be a multiple of 4");
endmodule
