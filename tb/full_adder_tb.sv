// full_adder_tb: exhaustive check of the one-bit adder cell against x + y + z.
module full_adder_tb;
  int checks = 0, failures = 0;
  logic x, y, z, s, c;
  full_adder dut (.x(x), .y(y), .z(z), .s(s), .c(c));
  initial begin
    #1000; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
  initial begin
    for (int v = 0; v < 8; v++) begin
      {x, y, z} = 3'(v); #1;
      checks++;
      if ({c, s} !== 2'(x) + 2'(y) + 2'(z)) begin failures++; $display("FAIL %b%b%b -> %b%b", x, y, z, c, s); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
endmodule
