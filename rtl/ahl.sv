// ahl: adaptive hold logic.
// Two judging blocks look at the operand that is about to enter the input register:
// the first says "one cycle is enough" when it has more than N_ZERO zeros, the
// second, stricter one when it has more than N_ZERO+1. The aging indicator selects
// between them: before the circuit is flagged as aged the first is used, afterwards
// the second, so fewer patterns are trusted to finish in one cycle. The D flip-flop
// holds the input-register enable (the inverse of the gating signal): when a pattern
// that needs two cycles is loaded it goes to 0 for exactly one cycle, freezing the
// input register, and returns to 1 on the next edge.
// The clock gate of the original circuit (an AND gate on the input register's clock)
// is replaced here by a clock enable, and the enable stays 1 while nothing is loaded.
// Timing: one_cycle is combinational from operand and aging; en and aging change on
// the rising edge of clk.
module ahl #(
  parameter int unsigned W      = 64,
  parameter int unsigned N_ZERO = W / 2,
  parameter int unsigned WINDOW = 1024,
  parameter int unsigned THRESH = 32
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic [W-1:0] operand,    // multiplicand (column) or multiplicator (row)
  input  logic         load,       // the input register takes operand on this edge
  input  logic         op_done,    // an operation finished (for the aging indicator)
  input  logic         err,        // the Razor register caught an error
  output logic         one_cycle,  // multiplexer output: 1 = operand needs one cycle
  output logic         en,         // input-register enable, the inverse of gating
  output logic         aging
);
  logic jb1, jb2;

  judging_block #(.W(W), .TH(N_ZERO))     u_jb1 (.x(operand), .one_cycle(jb1));
  judging_block #(.W(W), .TH(N_ZERO + 1)) u_jb2 (.x(operand), .one_cycle(jb2));

  aging_indicator #(.WINDOW(WINDOW), .THRESH(THRESH)) u_aging (
    .clk    (clk),
    .rst_n  (rst_n),
    .op_done(op_done),
    .err    (err),
    .aging  (aging)
  );

  assign one_cycle = aging ? jb2 : jb1;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) en <= 1'b1;
    else        en <= one_cycle | ~load;
  end
endmodule
