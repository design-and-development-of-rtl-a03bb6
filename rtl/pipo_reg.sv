// pipo_reg: parallel-in parallel-out register that holds the multiplier's operands.
// It loads d on a rising clk edge when en is 1 and holds otherwise; reset clears it.
// The hold is a clock enable here, where the adaptive hold logic of the original
// circuit gates the register's clock; the asynchronous reset is this design's choice.
module pipo_reg #(
  parameter int unsigned W = 64
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         en,
  input  logic [W-1:0] d,
  output logic [W-1:0] q
);
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)  q <= '0;
    else if (en) q <= d;
  end
endmodule
