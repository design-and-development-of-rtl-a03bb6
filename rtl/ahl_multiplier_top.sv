// ahl_multiplier_top: the two reliable multipliers side by side, plus the
// variable-latency ripple adder example.
//   col_*: 64x64 reliable multiplier on the column-bypassing array; its adaptive hold
//          logic watches the multiplicand.
//   row_*: 64x64 reliable multiplier on the row-bypassing array; its adaptive hold
//          logic watches the multiplicator.
//   rca_*: 8-bit ripple-carry adder with the hold function (A4 xor B4)(A5 xor B5).
// Both multipliers share clk, its delayed copy clk_del (for the Razor shadow
// latches, delayed by less than half a period) and the active-low reset; their
// handshakes are independent. See reliable_multiplier for timing.
module ahl_multiplier_top
  import mult_pkg::*;
#(
  parameter int unsigned N      = DEFAULT_WIDTH,
  parameter int unsigned N_ZERO = N / 2,
  parameter int unsigned WINDOW = 1024,
  parameter int unsigned THRESH = 32
) (
  input  logic           clk,
  input  logic           clk_del,
  input  logic           rst_n,
  // column-bypassing reliable multiplier
  input  logic           col_in_valid,
  output logic           col_in_ready,
  input  logic [N-1:0]   col_md,
  input  logic [N-1:0]   col_mr,
  output logic           col_res_valid,
  output logic [2*N-1:0] col_res,
  output logic           col_two_cycle,
  output logic           col_razor_err,
  output logic           col_aging,
  // row-bypassing reliable multiplier
  input  logic           row_in_valid,
  output logic           row_in_ready,
  input  logic [N-1:0]   row_md,
  input  logic [N-1:0]   row_mr,
  output logic           row_res_valid,
  output logic [2*N-1:0] row_res,
  output logic           row_two_cycle,
  output logic           row_razor_err,
  output logic           row_aging,
  // variable-latency ripple-carry adder example
  input  logic [7:0]     rca_a,
  input  logic [7:0]     rca_b,
  input  logic           rca_cin,
  output logic [7:0]     rca_s,
  output logic           rca_cout,
  output logic           rca_hold
);
  reliable_multiplier #(
    .N(N), .BYPASS(BYPASS_COLUMN), .N_ZERO(N_ZERO), .WINDOW(WINDOW), .THRESH(THRESH)
  ) u_col (
    .clk(clk), .clk_del(clk_del), .rst_n(rst_n),
    .in_valid(col_in_valid), .in_ready(col_in_ready), .md(col_md), .mr(col_mr),
    .res_valid(col_res_valid), .res(col_res), .two_cycle(col_two_cycle),
    .razor_err(col_razor_err), .aging(col_aging)
  );

  reliable_multiplier #(
    .N(N), .BYPASS(BYPASS_ROW), .N_ZERO(N_ZERO), .WINDOW(WINDOW), .THRESH(THRESH)
  ) u_row (
    .clk(clk), .clk_del(clk_del), .rst_n(rst_n),
    .in_valid(row_in_valid), .in_ready(row_in_ready), .md(row_md), .mr(row_mr),
    .res_valid(row_res_valid), .res(row_res), .two_cycle(row_two_cycle),
    .razor_err(row_razor_err), .aging(row_aging)
  );

  vl_rca #(.W(8), .HOLD_LO(3)) u_vlrca (
    .a(rca_a), .b(rca_b), .cin(rca_cin), .s(rca_s), .cout(rca_cout), .hold(rca_hold)
  );
endmodule
