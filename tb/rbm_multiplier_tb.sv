// rbm_multiplier_tb: checks the rbm multiplier at 64 bits (default) and 4 bits against
// the * operator: every 4-bit pair, the worked examples 1100*0110 and 1011*1001,
// all-zero and all-one operands, operands with few or many 1 bits (long and short
// bypass runs) and random operands.
module rbm_multiplier_tb;
  int checks = 0, failures = 0;
  logic [63:0]  a, b;
  logic [127:0] p;
  logic [3:0]   a4, b4;
  logic [7:0]   p4;

  rbm_multiplier dut (.a(a), .b(b), .p(p));
  rbm_multiplier #(.N(4)) dut4 (.a(a4), .b(b4), .p(p4));

  task automatic check64();
    #1;
    checks++;
    if (p !== 128'(a) * 128'(b)) begin failures++; $display("FAIL %h * %h = %h", a, b, p); end
  endtask

  function automatic logic [63:0] sparse(int ones);
    logic [63:0] v = '0;
    for (int k = 0; k < ones; k++) v[$urandom_range(63)] = 1'b1;
    return v;
  endfunction

  initial begin
    #1000000; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    for (int v = 0; v < 256; v++) begin
      {a4, b4} = 8'(v); #1;
      checks++;
      if (p4 !== 8'(a4) * 8'(b4)) begin failures++; $display("FAIL4 %h * %h = %h", a4, b4, p4); end
    end
    a = 64'hc; b = 64'h6; check64();
    a = 64'hb; b = 64'h9; check64();
    a = '0; b = '1; check64();
    a = '1; b = '0; check64();
    a = '1; b = '1; check64();
    for (int n = 0; n < 1500; n++) begin
      case (n % 4)
        0: begin a = sparse(n % 16); b = {$urandom, $urandom}; end
        1: begin a = {$urandom, $urandom}; b = sparse(n % 16); end
        2: begin a = ~sparse(n % 16); b = ~sparse(n % 9); end
        default: begin a = {$urandom, $urandom}; b = {$urandom, $urandom}; end
      endcase
      check64();
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
endmodule
