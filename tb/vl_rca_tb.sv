// vl_rca_tb: exhaustive check of the 8-bit variable-latency ripple adder: the sum
// against +, and the hold output against (A4 xor B4)(A5 xor B5) (bits numbered from 1).
// It also checks the point of the hold logic: with hold = 0 no carry chain of the
// adder is longer than 5 cells, so one short cycle suffices.
module vl_rca_tb;
  int checks = 0, failures = 0;
  logic [7:0] a, b, s;
  logic cin, cout, hold;
  vl_rca dut (.a(a), .b(b), .cin(cin), .s(s), .cout(cout), .hold(hold));

  // longest run of cells through which a carry actually travels
  function automatic int chain(logic [7:0] x, logic [7:0] y, logic ci);
    int best = 0, run = 0;
    logic c = ci;
    for (int k = 0; k < 8; k++) begin
      logic g = x[k] & y[k], p = x[k] ^ y[k];
      if (g) run = 1;
      else if (p && c) run++;
      else run = 0;
      if (run > best) best = run;
      c = g | (p & c);
    end
    return best;
  endfunction

  initial begin
    #1000000; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
  initial begin
    for (int v = 0; v < 131072; v++) begin
      {cin, a, b} = 17'(v); #1;
      checks += 2;
      if ({cout, s} !== 9'(a) + 9'(b) + 9'(cin)) begin failures++; $display("FAIL sum %h+%h", a, b); end
      if (hold !== ((a[3] ^ b[3]) & (a[4] ^ b[4]))) begin failures++; $display("FAIL hold %h %h", a, b); end
      if (!hold) begin
        checks++;
        if (chain(a, b, cin) > 5) begin failures++; $display("FAIL long chain without hold %h %h", a, b); end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
endmodule
