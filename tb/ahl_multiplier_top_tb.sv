// ahl_multiplier_top_tb: end-to-end test of the whole design at its default size
// (two 64x64 reliable multipliers, aging window 1024 operations, threshold 32 errors)
// with no parameter overridden. Both multipliers get random traffic for 3600 clk_del
// cycles, about 1500 operations each. During the first 1000 cycles one in five final
// captures is hit by an injected Razor error (the product is corrupted for the
// instant around the clk edge, as a path slowed by ageing would be), enough to make
// the first window exceed the threshold; after that the design runs error-free on
// the stricter judging block. rm_agent checks every product, every latency, every
// error report and the aging flag. The ripple-adder example is checked alongside on
// random operands. Fails if any mechanism never occurred: one-cycle and two-cycle
// operations, back-to-back loads, Razor re-execution, the aging switch, an operand
// judged two-cycle only because of ageing, hold = 0 and hold = 1 of the adder.
module ahl_multiplier_top_tb;
  localparam int unsigned N = 64;

  logic clk = 0, clk_del = 0, rst_n = 1, run = 0;
  always #5 clk = ~clk;
  initial begin #3; forever #5 clk_del = ~clk_del; end

  logic           c_iv, c_ir, c_rv, c_tc, c_re, c_ag, c_inj = 0;
  logic [N-1:0]   c_md, c_mr;
  logic [2*N-1:0] c_res;
  logic           r_iv, r_ir, r_rv, r_tc, r_re, r_ag, r_inj = 0;
  logic [N-1:0]   r_md, r_mr;
  logic [2*N-1:0] r_res;
  logic [7:0]     ra, rb, rs;
  logic           rcin, rcout, rhold;

  ahl_multiplier_top dut (
    .clk(clk), .clk_del(clk_del), .rst_n(rst_n),
    .col_in_valid(c_iv), .col_in_ready(c_ir), .col_md(c_md), .col_mr(c_mr),
    .col_res_valid(c_rv), .col_res(c_res), .col_two_cycle(c_tc),
    .col_razor_err(c_re), .col_aging(c_ag),
    .row_in_valid(r_iv), .row_in_ready(r_ir), .row_md(r_md), .row_mr(r_mr),
    .row_res_valid(r_rv), .row_res(r_res), .row_two_cycle(r_tc),
    .row_razor_err(r_re), .row_aging(r_ag),
    .rca_a(ra), .rca_b(rb), .rca_cin(rcin), .rca_s(rs), .rca_cout(rcout), .rca_hold(rhold));

  int c_checks, c_fail, c_one, c_two, c_err, c_b2b, c_sw, c_done;
  int r_checks, r_fail, r_one, r_two, r_err, r_b2b, r_sw, r_done;
  logic c_mag, r_mag;

  rm_agent #(.N(N), .ROW(1'b0), .WINDOW(1024), .THRESH(32)) ag_c (
    .clk_del(clk_del), .rst_n(rst_n), .run(run), .injected(c_inj), .in_valid(c_iv),
    .in_ready(c_ir), .md(c_md), .mr(c_mr), .res_valid(c_rv), .res(c_res),
    .two_cycle(c_tc), .razor_err(c_re), .aging(c_ag), .checks(c_checks),
    .failures(c_fail), .n_one(c_one), .n_two(c_two), .n_err(c_err), .n_b2b(c_b2b),
    .n_switch(c_sw), .n_done(c_done), .m_aging(c_mag));
  rm_agent #(.N(N), .ROW(1'b1), .WINDOW(1024), .THRESH(32)) ag_r (
    .clk_del(clk_del), .rst_n(rst_n), .run(run), .injected(r_inj), .in_valid(r_iv),
    .in_ready(r_ir), .md(r_md), .mr(r_mr), .res_valid(r_rv), .res(r_res),
    .two_cycle(r_tc), .razor_err(r_re), .aging(r_ag), .checks(r_checks),
    .failures(r_fail), .n_one(r_one), .n_two(r_two), .n_err(r_err), .n_b2b(r_b2b),
    .n_switch(r_sw), .n_done(r_done), .m_aging(r_mag));

  // Razor error injection, as in reliable_multiplier_tb.
  int inject_pct = 20;
  logic [2*N-1:0] bad;
  always @(posedge clk_del) begin
    #1 c_inj = 0; r_inj = 0;
    #5;
    if (dut.u_col.final_now && $urandom_range(99) < inject_pct) begin
      bad = dut.u_col.prod ^ (2*N)'(1) << $urandom_range(2*N - 1);
      force dut.u_col.prod = bad;
      c_inj = 1;
    end
    if (dut.u_row.final_now && $urandom_range(99) < inject_pct) begin
      bad = dut.u_row.prod ^ (2*N)'(1) << $urandom_range(2*N - 1);
      force dut.u_row.prod = bad;
      r_inj = 1;
    end
    #2;
    release dut.u_col.prod;
    release dut.u_row.prod;
  end

  // Ripple-adder example.
  int a_checks = 0, a_fail = 0, n_hold0 = 0, n_hold1 = 0;
  always @(posedge clk) begin
    ra <= 8'($urandom); rb <= 8'($urandom); rcin <= 1'($urandom);
  end
  always @(negedge clk) if (rst_n) begin
    a_checks += 2;
    if ({rcout, rs} !== 9'(ra) + 9'(rb) + 9'(rcin)) begin a_fail++; $display("FAIL rca sum"); end
    if (rhold !== ((ra[3] ^ rb[3]) & (ra[4] ^ rb[4]))) begin a_fail++; $display("FAIL rca hold"); end
    if (rhold) n_hold1++; else n_hold0++;
  end

  task automatic finish_tb(int extra);
    int checks, failures;
    checks   = c_checks + r_checks + a_checks + 1;
    failures = c_fail + r_fail + a_fail + extra;
    $display("col: one=%0d two=%0d err=%0d b2b=%0d switch=%0d done=%0d aging=%b",
             c_one, c_two, c_err, c_b2b, c_sw, c_done, c_ag);
    $display("row: one=%0d two=%0d err=%0d b2b=%0d switch=%0d done=%0d aging=%b",
             r_one, r_two, r_err, r_b2b, r_sw, r_done, r_ag);
    $display("rca: hold0=%0d hold1=%0d", n_hold0, n_hold1);
    if (c_one == 0 || c_two == 0 || c_err == 0 || c_b2b == 0 || c_sw == 0 || !c_ag ||
        r_one == 0 || r_two == 0 || r_err == 0 || r_b2b == 0 || r_sw == 0 || !r_ag ||
        n_hold0 == 0 || n_hold1 == 0) begin
      failures++;
      $display("FAIL a mechanism never occurred");
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
    repeat (1000) @(posedge clk_del);
    inject_pct = 0;
    repeat (2600) @(posedge clk_del);
    run = 0;
    repeat (10) @(posedge clk_del);
    finish_tb(0);
  end
endmodule
