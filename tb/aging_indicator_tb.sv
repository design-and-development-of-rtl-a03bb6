// aging_indicator_tb: window of 8 operations, threshold 2 errors. A window with 2
// errors must leave the output at 0; a window with 3 must set it at the window's end
// (not before), and it must then stay 1. Checked against a counting model.
module aging_indicator_tb;
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 1, op_done = 0, err = 0, aging;
  aging_indicator #(.WINDOW(8), .THRESH(2)) dut (.clk(clk), .rst_n(rst_n), .op_done(op_done), .err(err), .aging(aging));
  always #5 clk = ~clk;

  int m_ops = 0, m_errs = 0;
  logic m_aging = 0;

  task automatic step(logic d, logic e);
    op_done = d; err = e;
    @(posedge clk); #1;
    if (d && m_ops == 7) begin
      if (m_errs + int'(e) > 2) m_aging = 1;
      m_ops = 0; m_errs = 0;
    end else begin
      m_errs += int'(e);
      if (d) m_ops++;
    end
    checks++;
    if (aging !== m_aging) begin failures++; $display("FAIL ops=%0d errs=%0d aging=%b", m_ops, m_errs, aging); end
  endtask

  initial begin
    #100000; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
  initial begin
    #1 rst_n = 0;
    #11 rst_n = 1;
    // window 1: two errors, no aging
    for (int n = 0; n < 8; n++) begin
      if (n == 2 || n == 5) step(0, 1);
      step(1, 0);
    end
    checks++;
    if (aging !== 0) begin failures++; $display("FAIL aging after quiet window"); end
    // window 2: three errors, aging at its end
    for (int n = 0; n < 8; n++) begin
      if (n < 3) step(0, 1);
      step(1, 0);
      if (n == 6) begin checks++; if (aging !== 0) begin failures++; $display("FAIL aging before window end"); end end
    end
    checks++;
    if (aging !== 1) begin failures++; $display("FAIL no aging after bad window"); end
    // random traffic: stays 1
    for (int n = 0; n < 100; n++) step(1'($urandom), 1'($urandom_range(3) == 0));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
endmodule
