// pipo_reg_tb: the operand register must load on enabled edges and hold otherwise.
module pipo_reg_tb;
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 1, en = 0;
  logic [63:0] d = '0, q, m = '0;
  pipo_reg dut (.clk(clk), .rst_n(rst_n), .en(en), .d(d), .q(q));
  always #5 clk = ~clk;
  initial begin
    #100000; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
  initial begin
    #1 rst_n = 0;
    #1; checks++; if (q !== '0) begin failures++; $display("FAIL reset"); end
    #10 rst_n = 1;
    for (int n = 0; n < 200; n++) begin
      d = {$urandom, $urandom}; en = 1'($urandom);
      @(posedge clk); #1;
      if (en) m = d;
      checks++;
      if (q !== m) begin failures++; $display("FAIL q=%h want %h", q, m); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
endmodule
