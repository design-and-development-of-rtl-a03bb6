// rm_bench: one reliable multiplier with its stimulus/scoreboard agent and Razor
// error injection, for testbenches that run several sizes side by side. The
// aging window and threshold are left at the multiplier's defaults. While inject is 1,
// INJECT_PCT percent of final captures are corrupted around the clk edge (see
// reliable_multiplier_tb). Counts come out as ports.
module rm_bench #(
  parameter int unsigned N          = 32,
  parameter bit          ROW        = 1'b0,
  parameter int unsigned INJECT_PCT = 5
) (
  input  logic clk,
  input  logic clk_del,
  input  logic rst_n,
  input  logic run,
  input  logic inject,
  output int   checks,
  output int   failures,
  output int   n_one,
  output int   n_two,
  output int   n_err,
  output int   n_b2b,
  output int   n_done
);
  import mult_pkg::*;

  logic           iv, ir, rv, tc, re, ag, inj = 0, mag;
  logic [N-1:0]   md, mr;
  logic [2*N-1:0] res, bad;
  int             n_switch;

  reliable_multiplier #(.N(N), .BYPASS(ROW ? BYPASS_ROW : BYPASS_COLUMN)) dut (
    .clk(clk), .clk_del(clk_del), .rst_n(rst_n), .in_valid(iv), .in_ready(ir),
    .md(md), .mr(mr), .res_valid(rv), .res(res), .two_cycle(tc),
    .razor_err(re), .aging(ag));

  rm_agent #(.N(N), .ROW(ROW), .WINDOW(1024), .THRESH(32)) agent (
    .clk_del(clk_del), .rst_n(rst_n), .run(run), .injected(inj), .in_valid(iv),
    .in_ready(ir), .md(md), .mr(mr), .res_valid(rv), .res(res), .two_cycle(tc),
    .razor_err(re), .aging(ag), .checks(checks), .failures(failures), .n_one(n_one),
    .n_two(n_two), .n_err(n_err), .n_b2b(n_b2b), .n_switch(n_switch),
    .n_done(n_done), .m_aging(mag));

  always @(posedge clk_del) begin
    #1 inj = 0;
    #5;
    if (inject && dut.final_now && $urandom_range(99) < INJECT_PCT) begin
      bad = dut.prod ^ ((2*N)'(1) << $urandom_range(2*N - 1));
      force dut.prod = bad;
      inj = 1;
    end
    #2;
    release dut.prod;
  end
endmodule
