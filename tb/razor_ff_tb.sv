// razor_ff_tb: drives the Razor register with clk and a clock delayed by 3 ns
// (period 10 ns). Data that is stable at both sampling points must give no error;
// data that changes between the clk edge and the clk_del edge (a late path) must be
// flagged, and restore must reload the main flip-flops with the late, correct value.
module razor_ff_tb;
  int checks = 0, failures = 0;
  logic clk = 0, clk_del = 0, rst_n = 1, restore = 0, error;
  logic [15:0] d = '0, q;

  razor_ff #(.W(16)) dut (.clk(clk), .clk_del(clk_del), .rst_n(rst_n), .d(d),
                          .restore(restore), .q(q), .error(error));

  always #5 clk = ~clk;
  initial begin #3; forever #5 clk_del = ~clk_del; end

  task automatic expect_eq(string what, logic [15:0] got, logic [15:0] want);
    checks++;
    if (got !== want) begin failures++; $display("FAIL %s got %h want %h", what, got, want); end
  endtask

  initial begin
    #5000; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    #1 rst_n = 0;
    #11 rst_n = 1;
    for (int n = 0; n < 40; n++) begin
      logic [15:0] early, late;
      early = 16'($urandom);
      late  = (n % 2 == 0) ? early : early ^ 16'(1 << (n % 16));
      // clk rises at 10k, clk_del at 10k+3
      @(posedge clk); #1;          // 10k+1
      d = early;
      @(posedge clk); #1;          // main sampled early at 10k
      expect_eq("main", q, early);
      d = late;                    // data changes after the main sample (late path)
      @(posedge clk_del); #1;      // shadow closes with the late value
      expect_eq("error", 16'(error), 16'(early != late));
      restore = error;
      @(posedge clk); #1;          // restore reloads the main flip-flops
      expect_eq("restored", q, late);
      restore = 0;
      @(posedge clk_del); #1;
      expect_eq("clean", 16'(error), 16'd0);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
endmodule
