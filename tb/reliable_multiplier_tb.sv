// reliable_multiplier_tb: runs the column- and the row-bypassing reliable multiplier
// at 16 bits (aging window 16 operations, threshold 2 errors) through random traffic.
// Razor errors are injected by corrupting the product for the instant around the
// main flip-flops' clk edge of a final capture, as a path slowed by ageing would:
// the shadow latch, closing 3 ns later on clk_del, still gets the right value.
// rm_agent checks products, latencies, error reports and the aging flag; the test
// fails if one-cycle, two-cycle, back-to-back, Razor-error, aging or
// stricter-judging events never happened.
module reliable_multiplier_tb;
  import mult_pkg::*;
  localparam int unsigned N = 16;

  logic clk = 0, clk_del = 0, rst_n = 1, run = 0;
  always #5 clk = ~clk;
  initial begin #3; forever #5 clk_del = ~clk_del; end

  logic           c_iv, c_ir, c_rv, c_tc, c_re, c_ag, c_inj = 0;
  logic [N-1:0]   c_md, c_mr;
  logic [2*N-1:0] c_res;
  logic           r_iv, r_ir, r_rv, r_tc, r_re, r_ag, r_inj = 0;
  logic [N-1:0]   r_md, r_mr;
  logic [2*N-1:0] r_res;

  reliable_multiplier #(.N(N), .BYPASS(BYPASS_COLUMN), .WINDOW(16), .THRESH(2)) dut_c (
    .clk(clk), .clk_del(clk_del), .rst_n(rst_n), .in_valid(c_iv), .in_ready(c_ir),
    .md(c_md), .mr(c_mr), .res_valid(c_rv), .res(c_res), .two_cycle(c_tc),
    .razor_err(c_re), .aging(c_ag));
  reliable_multiplier #(.N(N), .BYPASS(BYPASS_ROW), .WINDOW(16), .THRESH(2)) dut_r (
    .clk(clk), .clk_del(clk_del), .rst_n(rst_n), .in_valid(r_iv), .in_ready(r_ir),
    .md(r_md), .mr(r_mr), .res_valid(r_rv), .res(r_res), .two_cycle(r_tc),
    .razor_err(r_re), .aging(r_ag));

  int c_checks, c_fail, c_one, c_two, c_err, c_b2b, c_sw, c_done;
  int r_checks, r_fail, r_one, r_two, r_err, r_b2b, r_sw, r_done;
  logic c_mag, r_mag;

  rm_agent #(.N(N), .ROW(1'b0), .WINDOW(16), .THRESH(2)) ag_c (
    .clk_del(clk_del), .rst_n(rst_n), .run(run), .injected(c_inj), .in_valid(c_iv),
    .in_ready(c_ir), .md(c_md), .mr(c_mr), .res_valid(c_rv), .res(c_res),
    .two_cycle(c_tc), .razor_err(c_re), .aging(c_ag), .checks(c_checks),
    .failures(c_fail), .n_one(c_one), .n_two(c_two), .n_err(c_err), .n_b2b(c_b2b),
    .n_switch(c_sw), .n_done(c_done), .m_aging(c_mag));
  rm_agent #(.N(N), .ROW(1'b1), .WINDOW(16), .THRESH(2)) ag_r (
    .clk_del(clk_del), .rst_n(rst_n), .run(run), .injected(r_inj), .in_valid(r_iv),
    .in_ready(r_ir), .md(r_md), .mr(r_mr), .res_valid(r_rv), .res(r_res),
    .two_cycle(r_tc), .razor_err(r_re), .aging(r_ag), .checks(r_checks),
    .failures(r_fail), .n_one(r_one), .n_two(r_two), .n_err(r_err), .n_b2b(r_b2b),
    .n_switch(r_sw), .n_done(r_done), .m_aging(r_mag));

  // Error injection: 1 ns before a clk edge that is a final capture, corrupt the
  // product until 1 ns after it. The injected flag is held until the next clk_del edge.
  int inject_pct = 30;
  logic [2*N-1:0] bad;
  always @(posedge clk_del) begin
    #1 c_inj = 0; r_inj = 0;
    #5;   // 1 ns before clk
    if (dut_c.final_now && $urandom_range(99) < inject_pct) begin
      bad = dut_c.prod ^ (2*N)'(1 << $urandom_range(2*N - 1));
      force dut_c.prod = bad;
      c_inj = 1;
    end
    if (dut_r.final_now && $urandom_range(99) < inject_pct) begin
      bad = dut_r.prod ^ (2*N)'(1 << $urandom_range(2*N - 1));
      force dut_r.prod = bad;
      r_inj = 1;
    end
    #2;
    release dut_c.prod;
    release dut_r.prod;
  end

  task automatic finish_tb(int extra);
    int checks, failures;
    checks   = c_checks + r_checks + 1;
    failures = c_fail + r_fail + extra;
    $display("col: one=%0d two=%0d err=%0d b2b=%0d switch=%0d done=%0d aging=%b",
             c_one, c_two, c_err, c_b2b, c_sw, c_done, c_ag);
    $display("row: one=%0d two=%0d err=%0d b2b=%0d switch=%0d done=%0d aging=%b",
             r_one, r_two, r_err, r_b2b, r_sw, r_done, r_ag);
    if (c_one == 0 || c_two == 0 || c_err == 0 || c_b2b == 0 || c_sw == 0 || !c_ag ||
        r_one == 0 || r_two == 0 || r_err == 0 || r_b2b == 0 || r_sw == 0 || !r_ag) begin
      failures++;
      $display("FAIL a mechanism never occurred");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  endtask

  initial begin
    #200000;
    finish_tb(1);
  end

  initial begin
    #1 rst_n = 0;
    #20 rst_n = 1;
    run = 1;
    repeat (200) @(posedge clk_del);
    inject_pct = 0;                  // aged by now; keep running error-free
    repeat (400) @(posedge clk_del);
    run = 0;
    repeat (10) @(posedge clk_del);
    finish_tb(0);
  end
endmodule
