// cla_logic4_tb: exhaustive check of the look-ahead unit against the ripple recursion
// c[k+1] = g[k] | p[k] & c[k], and of its group generate and propagate.
module cla_logic4_tb;
  int checks = 0, failures = 0;
  logic [3:0] g, p;
  logic cin, gg, pg;
  logic [4:0] c, e;
  logic eg;
  cla_logic4 dut (.g(g), .p(p), .cin(cin), .c(c), .gg(gg), .pg(pg));
  initial begin
    #10000; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
  initial begin
    for (int v = 0; v < 512; v++) begin
      {cin, g, p} = 9'(v); #1;
      e[0] = cin;
      for (int k = 0; k < 4; k++) e[k+1] = g[k] | (p[k] & e[k]);
      eg = 1'b0;
      for (int k = 0; k < 4; k++) eg = g[k] | (p[k] & eg);
      checks += 3;
      if (c !== e)      begin failures++; $display("FAIL c g=%b p=%b cin=%b c=%b", g, p, cin, c); end
      if (gg !== eg)    begin failures++; $display("FAIL gg g=%b p=%b", g, p); end
      if (pg !== &p)    begin failures++; $display("FAIL pg p=%b", p); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
endmodule
