// fa_bypass_row_tb: exhaustive check of the row-bypassing cell. With b = 1 it must add
// a*b + sin + cin; with b = 0 it must pass sin and the neighbour carry cin_byp.
module fa_bypass_row_tb;
  int checks = 0, failures = 0;
  logic a, b, sin, cin, cbyp, sout, cout;
  logic [1:0] exp_v;
  fa_bypass_row dut (.a(a), .b(b), .sin(sin), .cin(cin), .cin_byp(cbyp), .sout(sout), .cout(cout));
  initial begin
    #1000; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
  initial begin
    for (int v = 0; v < 32; v++) begin
      {a, b, sin, cin, cbyp} = 5'(v); #1;
      exp_v = b ? 2'(a) + 2'(sin) + 2'(cin) : {cbyp, sin};
      checks++;
      if ({cout, sout} !== exp_v) begin failures++; $display("FAIL a=%b b=%b sin=%b cin=%b cb=%b -> %b%b", a, b, sin, cin, cbyp, cout, sout); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
endmodule
