// cla4: 4-bit carry look-ahead adder.
// Bit generate g = a & b and propagate p = a | b (the OR form, which is valid for
// carries); the carries come from cla_logic4 and each sum bit is a ^ b ^ c. The
// adder also hands its group generate/propagate to the next look-ahead level, so it
// has no carry out of its own. Combinational.
module cla4 (
  input  logic [3:0] a,
  input  logic [3:0] b,
  input  logic       cin,
  output logic [3:0] s,
  output logic       gg,
  output logic       pg
);
  logic [4:0] c;

  cla_logic4 u_lcu (
    .g  (a & b),
    .p  (a | b),
    .cin(cin),
    .c  (c),
    .gg (gg),
    .pg (pg)
  );

  assign s = a ^ b ^ c[3:0];
endmodule
