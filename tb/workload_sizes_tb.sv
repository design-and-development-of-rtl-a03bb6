// workload_sizes_tb: the 16x16 and 32x32 configurations of both reliable multipliers
// (column and row bypassing, carry look-ahead final adder), with the aging window and
// threshold at their defaults. The 64x64 configuration is run by ahl_multiplier_top_tb.
// Each of the four multipliers gets 1500 cycles of random traffic, with 5% of final
// captures hit by an injected Razor error, and every product and latency is checked.
// Fails if any multiplier never ran a one-cycle, a two-cycle, a back-to-back or a
// re-executed operation.
module workload_sizes_tb;
  logic clk = 0, clk_del = 0, rst_n = 1, run = 0, inject = 0;
  always #5 clk = ~clk;
  initial begin #3; forever #5 clk_del = ~clk_del; end

  int ck[4], fl[4], one[4], two[4], err[4], b2b[4], done[4];

  rm_bench #(.N(16), .ROW(1'b0)) b16c (.clk(clk), .clk_del(clk_del), .rst_n(rst_n), .run(run), .inject(inject),
    .checks(ck[0]), .failures(fl[0]), .n_one(one[0]), .n_two(two[0]), .n_err(err[0]), .n_b2b(b2b[0]), .n_done(done[0]));
  rm_bench #(.N(16), .ROW(1'b1)) b16r (.clk(clk), .clk_del(clk_del), .rst_n(rst_n), .run(run), .inject(inject),
    .checks(ck[1]), .failures(fl[1]), .n_one(one[1]), .n_two(two[1]), .n_err(err[1]), .n_b2b(b2b[1]), .n_done(done[1]));
  rm_bench #(.N(32), .ROW(1'b0)) b32c (.clk(clk), .clk_del(clk_del), .rst_n(rst_n), .run(run), .inject(inject),
    .checks(ck[2]), .failures(fl[2]), .n_one(one[2]), .n_two(two[2]), .n_err(err[2]), .n_b2b(b2b[2]), .n_done(done[2]));
  rm_bench #(.N(32), .ROW(1'b1)) b32r (.clk(clk), .clk_del(clk_del), .rst_n(rst_n), .run(run), .inject(inject),
    .checks(ck[3]), .failures(fl[3]), .n_one(one[3]), .n_two(two[3]), .n_err(err[3]), .n_b2b(b2b[3]), .n_done(done[3]));

  task automatic finish_tb(int extra);
    int checks = 1, failures = extra;
    for (int k = 0; k < 4; k++) begin
      checks   += ck[k];
      failures += fl[k];
      $display("%0d-bit %s: one=%0d two=%0d err=%0d b2b=%0d done=%0d", k < 2 ? 16 : 32,
               (k % 2 != 0) ? "row" : "column", one[k], two[k], err[k], b2b[k], done[k]);
      if (one[k] == 0 || two[k] == 0 || err[k] == 0 || b2b[k] == 0) begin
        failures++;
        $display("FAIL a mechanism never occurred");
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  endtask

  initial begin
    #100000;
    finish_tb(1);
  end

  initial begin
    #1 rst_n = 0;
    #20 rst_n = 1;
    run = 1;
    inject = 1;
    repeat (1500) @(posedge clk_del);
    run = 0;
    inject = 0;
    repeat (10) @(posedge clk_del);
    finish_tb(0);
  end
endmodule
