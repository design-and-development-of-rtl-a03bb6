// razor_ff: W-bit Razor register that detects late-arriving data.
// Each bit has a main flip-flop, a shadow latch, an XOR and a multiplexer. The main
// flip-flop samples d on the rising edge of clk. The shadow latch is transparent
// while clk_del is low and closes on its rising edge, so it holds d as it stood a
// delay later than the main sample. If the two differ, the datapath was still
// settling when the main flip-flop sampled it, and error is 1 (XOR of the bits,
// ORed over the word). Driving restore for one clk edge reloads the main flip-flop
// from the shadow latch, which repairs the stored value.
// Timing: clk_del is clk delayed by less than half a period. error is valid from
// the rising edge of clk_del until the next rising edge of clk. The shadow element
// is a level-sensitive latch on purpose: that is how the Razor register works.
module razor_ff #(
  parameter int unsigned W = 128
) (
  input  logic         clk,
  input  logic         clk_del,
  input  logic         rst_n,
  input  logic [W-1:0] d,
  input  logic         restore,
  output logic [W-1:0] q,
  output logic         error
);
  logic [W-1:0] shadow;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)       q <= '0;
    else if (restore) q <= shadow;
    else              q <= d;
  end

  always_latch begin
    if (!clk_del) shadow = d;
  end

  assign error = |(q ^ shadow);
endmodule
