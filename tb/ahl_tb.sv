// ahl_tb: adaptive hold logic at 8 bits with threshold n = 4, an aging window of 4
// operations and an error threshold of 1. Checks, against a model, that
//  - one_cycle is 1 for operands with more than 4 zeros before aging and more than 5
//    after, so an operand with exactly 5 zeros moves from one to two cycles;
//  - loading a two-cycle operand drops en for exactly one cycle;
//  - aging rises at the end of a window with 2 errors.
module ahl_tb;
  int checks = 0, failures = 0;
  int n_two = 0, n_switch = 0;
  logic clk = 0, rst_n = 1, load = 0, op_done = 0, err = 0;
  logic [7:0] operand = '1;
  logic one_cycle, en, aging;
  logic m_en = 1, m_aging = 0;
  int m_ops = 0, m_errs = 0;

  ahl #(.W(8), .N_ZERO(4), .WINDOW(4), .THRESH(1)) dut (
    .clk(clk), .rst_n(rst_n), .operand(operand), .load(load), .op_done(op_done),
    .err(err), .one_cycle(one_cycle), .en(en), .aging(aging));

  always #5 clk = ~clk;

  function automatic int zeros(logic [7:0] v);
    int z = 0;
    for (int k = 0; k < 8; k++) z += int'(!v[k]);
    return z;
  endfunction

  task automatic step(logic [7:0] opnd, logic d, logic e);
    logic exp_one;
    operand = opnd; op_done = d; err = e;
    load = m_en;                           // load whenever the register is enabled
    #1;
    exp_one = m_aging ? (zeros(opnd) > 5) : (zeros(opnd) > 4);
    checks++;
    if (one_cycle !== exp_one) begin failures++; $display("FAIL one_cycle opnd=%b aging=%b", opnd, m_aging); end
    if (zeros(opnd) == 5 && m_aging) n_switch++;
    @(posedge clk); #1;
    if (load && !exp_one) n_two++;
    m_en = !load | exp_one;
    if (d && m_ops == 3) begin
      if (m_errs + int'(e) > 1) m_aging = 1;
      m_ops = 0; m_errs = 0;
    end else begin
      m_errs += int'(e);
      if (d) m_ops++;
    end
    checks += 2;
    if (en !== m_en) begin failures++; $display("FAIL en=%b want %b", en, m_en); end
    if (aging !== m_aging) begin failures++; $display("FAIL aging=%b want %b", aging, m_aging); end
  endtask

  initial begin
    #100000; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
  initial begin
    #1 rst_n = 0;
    #11 rst_n = 1;
    // five zeros: one cycle while young
    step(8'b1110_0000, 1, 0);
    step(8'b1111_1000, 1, 0);   // three zeros: two cycles
    step(8'b1111_1000, 0, 0);   // held cycle
    // window with two errors -> aging
    for (int n = 0; n < 6; n++) step(8'($urandom), 1, 1'(n < 2));
    for (int n = 0; n < 4; n++) step(8'($urandom), 1, 1'(n < 2));
    checks++;
    if (aging !== 1) begin failures++; $display("FAIL aging never set"); end
    step(8'b0001_0111, 1, 0);   // five zeros: now two cycles
    step(8'b0001_0111, 0, 0);
    for (int n = 0; n < 100; n++) step(8'($urandom), 1'($urandom), 1'($urandom));
    checks++;
    if (n_two == 0 || n_switch == 0) begin failures++; $display("FAIL coverage two=%0d switch=%0d", n_two, n_switch); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
endmodule
