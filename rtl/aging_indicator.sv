// aging_indicator: flags a circuit that has slowed down with age.
// It counts Razor errors over a window of WINDOW completed operations. At the end
// of each window both counters return to zero; if the window held more than THRESH
// errors, the output aging goes to 1 and stays there until reset (ageing does not
// reverse). Inputs are single-cycle strobes on clk: op_done once per finished
// operation, err once per operation caught by the Razor register.
// Counting errors per window and clearing at its end follows the method; the window
// length, the threshold and the sticky output are this design's choices.
module aging_indicator #(
  parameter int unsigned WINDOW = 1024,
  parameter int unsigned THRESH = 32
) (
  input  logic clk,
  input  logic rst_n,
  input  logic op_done,
  input  logic err,
  output logic aging
);
  localparam int unsigned CW = $clog2(WINDOW + 1);

  logic [CW-1:0] ops, errs, errs_next;

  assign errs_next = errs + CW'(err);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      ops   <= '0;
      errs  <= '0;
      aging <= 1'b0;
    end else begin
      if (op_done && 32'(ops) == WINDOW - 1) begin
        ops  <= '0;
        errs <= '0;
        if (32'(errs_next) > THRESH) aging <= 1'b1;
      end else begin
        errs <= errs_next;
        if (op_done) ops <= ops + 1'b1;
      end
    end
  end
endmodule
