// judging_block_tb: the judging block must output 1 exactly when the operand has more
// than TH zero bits. Checked at 64 bits with TH = 32 (default) and TH = 33, on operands
// with a chosen number of zeros around the threshold and on random operands.
module judging_block_tb;
  int checks = 0, failures = 0;
  logic [63:0] x;
  logic o32, o33;
  judging_block dut (.x(x), .one_cycle(o32));
  judging_block #(.W(64), .TH(33)) dut33 (.x(x), .one_cycle(o33));

  function automatic logic [63:0] with_zeros(int z);
    logic [63:0] v = '1;
    int placed = 0;
    while (placed < z) begin
      int k = $urandom_range(63);
      if (v[k]) begin v[k] = 1'b0; placed++; end
    end
    return v;
  endfunction

  task automatic check();
    int z = 0;
    #1;
    for (int k = 0; k < 64; k++) z += int'(!x[k]);
    checks += 2;
    if (o32 !== (z > 32)) begin failures++; $display("FAIL th32 zeros=%0d out=%b", z, o32); end
    if (o33 !== (z > 33)) begin failures++; $display("FAIL th33 zeros=%0d out=%b", z, o33); end
  endtask

  initial begin
    #100000; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
  initial begin
    for (int z = 0; z <= 64; z++) begin x = with_zeros(z); check(); end
    for (int n = 0; n < 200; n++) begin x = with_zeros(30 + n % 6); check(); end
    for (int n = 0; n < 200; n++) begin x = {$urandom, $urandom}; check(); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
endmodule
