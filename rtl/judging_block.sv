// judging_block: decides whether an operand lets the multiplier finish in one cycle.
// It counts the 0 bits of the operand (the multiplicand for column bypassing, the
// multiplicator for row bypassing) and outputs 1 when that count is larger than
// TH. Many zeros mean many bypassed cells and a short path. Combinational.
// The default TH = W/2 is this design's choice; the method leaves n open and only
// requires the second judging block to use n+1.
module judging_block #(
  parameter int unsigned W  = 64,
  parameter int unsigned TH = 32
) (
  input  logic [W-1:0] x,
  output logic         one_cycle
);
  logic [$clog2(W+1)-1:0] zeros;

  always_comb begin
    zeros = '0;
    for (int k = 0; k < W; k++) zeros += {{($clog2(W+1)-1){1'b0}}, ~x[k]};
  end

  assign one_cycle = (32'(zeros) > TH);
endmodule
