// reliable_multiplier: aging-aware variable-latency multiplier with adaptive hold
// logic (AHL) and a Razor output register.
//
// Datapath: input register (pipo_reg) -> bypassing array multiplier with a carry
// look-ahead final adder (column or row bypassing, parameter BYPASS) -> Razor
// register (razor_ff) -> result register.
//
// Variable latency: the AHL judges each operand as it is loaded. A pattern with many
// zeros in the watched operand (the multiplicand for column bypassing, the
// multiplicator for row bypassing) is given one cycle; any other pattern two, in
// which case the AHL drops the input-register enable for one cycle. The Razor
// register checks the result of the final cycle. If the main flip-flops sampled a
// value that was still changing, the operation is re-executed: one extra cycle in
// which the main flip-flops are reloaded from the shadow latches, with the input
// register held. Each such error is counted by the aging indicator; once a window
// of operations holds too many, the AHL switches to the stricter judging block and
// sends more patterns down the two-cycle path.
//
// Clocks: clk_del is clk delayed by less than half a period. The input register, the
// AHL, the controller and the result register run on clk_del; the Razor main
// flip-flops sample the product on clk, a little before the operands change, and
// the shadow latches close on clk_del. Operands launched on clk_del therefore reach
// the shadow latches only after they have closed, which is the Razor hold condition.
//
// Interface (all on clk_del): in_valid/in_ready handshake for operands md, mr;
// res_valid pulses for one cycle with the product in res. Latency from the loading
// edge to the res_valid edge: 2 edges for a one-cycle pattern, 3 for a two-cycle
// pattern, plus 1 when the Razor register caught an error. One-cycle patterns can
// be accepted back to back.
//
// The handshake, the result register, the reset and the clock enable in place of a
// gated clock are this design's own choices.
module reliable_multiplier
  import mult_pkg::*;
#(
  parameter int unsigned N      = 64,
  parameter bypass_e     BYPASS = BYPASS_COLUMN,
  parameter int unsigned N_ZERO = N / 2,
  parameter int unsigned WINDOW = 1024,
  parameter int unsigned THRESH = 32
) (
  input  logic           clk,
  input  logic           clk_del,
  input  logic           rst_n,
  input  logic           in_valid,
  output logic           in_ready,
  input  logic [N-1:0]   md,          // multiplicand
  input  logic [N-1:0]   mr,          // multiplicator
  output logic           res_valid,
  output logic [2*N-1:0] res,
  output logic           two_cycle,   // the operation in flight takes two cycles
  output logic           razor_err,   // the Razor register caught an error (strobe)
  output logic           aging        // aging indicator output
);
  logic [N-1:0]   md_q, mr_q;
  logic [2*N-1:0] prod, q;
  logic           load, en, one_cycle, rz_error;
  logic           busy, redo, final_now, done;

  // ---- input register ----
  pipo_reg #(.W(N)) u_md_reg (.clk(clk_del), .rst_n(rst_n), .en(load), .d(md), .q(md_q));
  pipo_reg #(.W(N)) u_mr_reg (.clk(clk_del), .rst_n(rst_n), .en(load), .d(mr), .q(mr_q));

  // ---- bypassing multiplier ----
  if (BYPASS == BYPASS_COLUMN) begin : g_cbm
    cbm_multiplier #(.N(N)) u_mult (.a(md_q), .b(mr_q), .p(prod));
  end else begin : g_rbm
    rbm_multiplier #(.N(N)) u_mult (.a(md_q), .b(mr_q), .p(prod));
  end

  // ---- adaptive hold logic ----
  ahl #(.W(N), .N_ZERO(N_ZERO), .WINDOW(WINDOW), .THRESH(THRESH)) u_ahl (
    .clk      (clk_del),
    .rst_n    (rst_n),
    .operand  (BYPASS == BYPASS_COLUMN ? md : mr),
    .load     (load),
    .op_done  (done),
    .err      (razor_err),
    .one_cycle(one_cycle),
    .en       (en),
    .aging    (aging)
  );

  // ---- Razor register ----
  razor_ff #(.W(2*N)) u_razor (
    .clk    (clk),
    .clk_del(clk_del),
    .rst_n  (rst_n),
    .d      (prod),
    .restore(redo),
    .q      (q),
    .error  (rz_error)
  );

  // ---- controller ----
  // busy: an operation is in flight. en = 0: first cycle of a two-cycle operation.
  // redo: the final sample was wrong; this cycle re-executes from the shadow latches.
  assign final_now = busy & en & ~redo;
  assign razor_err = final_now & rz_error;
  assign done      = (final_now & ~rz_error) | (busy & redo);
  assign in_ready  = en & ~razor_err;
  assign load      = in_valid & in_ready;
  assign two_cycle = busy & ~en;

  always_ff @(posedge clk_del or negedge rst_n) begin
    if (!rst_n) begin
      busy      <= 1'b0;
      redo      <= 1'b0;
      res_valid <= 1'b0;
      res       <= '0;
    end else begin
      busy      <= load | (busy & ~done);
      redo      <= razor_err;
      res_valid <= done;
      if (done) res <= q;
    end
  end

  // A two-cycle operation never accepts new operands in its first cycle.
  a_hold: assert property (@(posedge clk_del) disable iff (!rst_n) two_cycle |-> !load);
  // Operands are only taken when the previous operation is finishing or gone.
  a_one_op: assert property (@(posedge clk_del) disable iff (!rst_n) load |-> (!busy || done));
endmodule
