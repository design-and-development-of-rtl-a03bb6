// cla_tree: look-ahead carry network over NG groups.
// The groups are padded to a power of four (padding groups have generate 0 and
// propagate 1, which leaves the group signals unchanged) and combined four at a
// time, level by level: each cla_logic4 at level l turns four group signals into one
// for level l+1 (the fifth carry of each unit, c4, is not needed here) and, from the carry it receives from level l+1, gives each of its four
// groups its carry in. The top unit takes cin. For sixteen groups that is four
// look-ahead units under one more. Combinational.
module cla_tree #(
  parameter int unsigned NG = 16
) (
  input  logic [NG-1:0] g,
  input  logic [NG-1:0] p,
  input  logic          cin,
  output logic [NG-1:0] c,    // carry into each group
  output logic          gg,
  output logic          pg
);
  // number of levels: smallest L >= 1 with 4**L >= NG
  localparam int unsigned L  = ($clog2(NG) + 1) / 2 < 1 ? 1 : ($clog2(NG) + 1) / 2;
  localparam int unsigned NP = 1 << (2 * L);

  logic [NP-1:0] g0, p0;

  always_comb begin
    g0 = '0;
    p0 = '1;
    g0[NG-1:0] = g;
    p0[NG-1:0] = p;
  end

  for (genvar l = 0; l < L; l++) begin : g_lvl
    localparam int unsigned UNITS = NP >> (2 * (l + 1));
    logic [4*UNITS-1:0] gi, pi, co;   // this level's groups and their carries in
    logic [UNITS-1:0]   go, po, ci;   // the next level's groups and their carries in

    if (l == 0) begin : g_in0
      assign gi = g0;
      assign pi = p0;
    end else begin : g_in
      assign gi = g_lvl[l-1].go;
      assign pi = g_lvl[l-1].po;
    end

    if (l == L - 1) begin : g_top
      assign ci = cin;
    end else begin : g_mid
      assign ci = g_lvl[l+1].co;
    end

    for (genvar u = 0; u < UNITS; u++) begin : g_unit
      logic [4:0] cu;
      cla_logic4 u_lcu (
        .g  (gi[4*u +: 4]),
        .p  (pi[4*u +: 4]),
        .cin(ci[u]),
        .c  (cu),
        .gg (go[u]),
        .pg (po[u])
      );
      assign co[4*u +: 4] = cu[3:0];
    end
  end

  assign c  = g_lvl[0].co[NG-1:0];
  assign gg = g_lvl[L-1].go[0];
  assign pg = g_lvl[L-1].po[0];
endmodule
