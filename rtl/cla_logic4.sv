// cla_logic4: four-group carry look-ahead unit.
// From four generate/propagate pairs and a carry in it forms every carry in two
// logic levels:
//   c1 = g0 + p0 c0,  c2 = g1 + p1 g0 + p1 p0 c0,  c3 = ...,  c4 = ...
// and the group signals GG = g3 + p3 g2 + p3 p2 g1 + p3 p2 p1 g0, PG = p3 p2 p1 p0.
// Used for the carries inside a 4-bit adder and, one level up, for the carries
// between 4-bit adders or between groups of them. Combinational.
module cla_logic4 (
  input  logic [3:0] g,
  input  logic [3:0] p,
  input  logic       cin,
  output logic [4:0] c,    // c[0] = cin, c[k] = carry into position k
  output logic       gg,
  output logic       pg
);
  assign c[0] = cin;
  assign c[1] = g[0] | (p[0] & cin);
  assign c[2] = g[1] | (p[1] & g[0]) | (p[1] & p[0] & cin);
  assign c[3] = g[2] | (p[2] & g[1]) | (p[2] & p[1] & g[0]) | (p[2] & p[1] & p[0] & cin);
  assign c[4] = g[3] | (p[3] & g[2]) | (p[3] & p[2] & g[1]) | (p[3] & p[2] & p[1] & g[0])
              | (p[3] & p[2] & p[1] & p[0] & cin);
  assign gg   = g[3] | (p[3] & g[2]) | (p[3] & p[2] & g[1]) | (p[3] & p[2] & p[1] & g[0]);
  assign pg   = &p;
endmodule
