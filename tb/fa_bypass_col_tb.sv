// fa_bypass_col_tb: exhaustive check of the column-bypassing cell. With a = 1 it must
// add a*b + sin + cin; with a = 0 it must pass sin through and give carry 0.
module fa_bypass_col_tb;
  int checks = 0, failures = 0;
  logic a, b, sin, cin, sout, cout;
  logic [1:0] exp_v;
  fa_bypass_col dut (.a(a), .b(b), .sin(sin), .cin(cin), .sout(sout), .cout(cout));
  initial begin
    #1000; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
  initial begin
    for (int v = 0; v < 16; v++) begin
      {a, b, sin, cin} = 4'(v); #1;
      exp_v = a ? 2'(a & b) + 2'(sin) + 2'(cin) : {1'b0, sin};
      checks++;
      if ({cout, sout} !== exp_v) begin failures++; $display("FAIL a=%b b=%b sin=%b cin=%b -> %b%b", a, b, sin, cin, cout, sout); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
endmodule
