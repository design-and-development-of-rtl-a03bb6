// cla4_tb: exhaustive check of the 4-bit carry look-ahead adder: the sum against +,
// and the group generate/propagate against their definitions (the group generates a
// carry by itself; the group passes an incoming carry through every bit).
module cla4_tb;
  int checks = 0, failures = 0;
  logic [3:0] a, b, s;
  logic cin, gg, pg;
  logic [4:0] full0, full1;
  cla4 dut (.a(a), .b(b), .cin(cin), .s(s), .gg(gg), .pg(pg));
  initial begin
    #10000; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
  initial begin
    for (int v = 0; v < 512; v++) begin
      {cin, a, b} = 9'(v); #1;
      full0 = 5'(a) + 5'(b);
      full1 = 5'(a) + 5'(b) + 5'd1;
      checks += 3;
      if (s !== 4'(a + b + 4'(cin))) begin failures++; $display("FAIL sum %h+%h+%b=%h", a, b, cin, s); end
      if (gg !== full0[4]) begin failures++; $display("FAIL gg %h %h", a, b); end
      if (pg !== &(a | b)) begin failures++; $display("FAIL pg %h %h", a, b); end
      // the group carry out must equal that of a plain add
      checks++;
      if ((gg | (pg & cin)) !== (cin ? full1[4] : full0[4])) begin failures++; $display("FAIL cout %h %h", a, b); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
endmodule
