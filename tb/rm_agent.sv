// rm_agent: stimulus and scoreboard for one reliable multiplier (testbench only).
// Drives the in_valid/in_ready handshake with operands whose watched operand (the
// multiplicand for column bypassing, the multiplicator for row bypassing) has a
// number of zeros near the judging threshold, and checks every result against md*mr
// and its latency against the adaptive hold logic's decision, computed here from the
// zero count and the aging state: 2 clk_del edges for one cycle, 3 for two, one more
// when a Razor error was injected. It also models the aging indicator from the
// injected errors and counts how often each mechanism occurred.
module rm_agent #(
  parameter int unsigned N      = 16,
  parameter bit          ROW    = 1'b0,
  parameter int unsigned N_ZERO = N / 2,
  parameter int unsigned WINDOW = 16,
  parameter int unsigned THRESH = 2
) (
  input  logic           clk_del,
  input  logic           rst_n,
  input  logic           run,          // 1: offer operands
  input  logic           injected,     // an error was injected before this edge
  output logic           in_valid,
  input  logic           in_ready,
  output logic [N-1:0]   md,
  output logic [N-1:0]   mr,
  input  logic           res_valid,
  input  logic [2*N-1:0] res,
  input  logic           two_cycle,
  input  logic           razor_err,
  input  logic           aging,
  output int             checks,
  output int             failures,
  output int             n_one,
  output int             n_two,
  output int             n_err,
  output int             n_b2b,
  output int             n_switch,
  output int             n_done,
  output logic           m_aging
);
  typedef struct {
    logic [2*N-1:0] product;
    int             load_edge;
    int             latency;
    bit             err;
  } op_t;

  op_t q[$];
  int  edge_no = 0, win_ops = 0, win_errs = 0, inj_pending = 0;

  function automatic int zeros(logic [N-1:0] v);
    int z = 0;
    for (int k = 0; k < N; k++) z += int'(!v[k]);
    return z;
  endfunction

  function automatic logic [N-1:0] with_zeros(int z);
    logic [N-1:0] v = '1;
    int placed = 0;
    while (placed < z) begin
      int k = $urandom_range(N - 1);
      if (v[k]) begin v[k] = 1'b0; placed++; end
    end
    return v;
  endfunction

  function automatic logic [N-1:0] rand_word();
    logic [N-1:0] v;
    for (int k = 0; k < N; k++) v[k] = 1'($urandom);
    return v;
  endfunction

  task automatic new_operands();
    logic [N-1:0] w;
    case ($urandom_range(3))
      0:       w = rand_word();
      1:       w = with_zeros(N_ZERO + 1);
      default: w = with_zeros(int'($urandom_range(N_ZERO + 3, N_ZERO - 2)));
    endcase
    if (ROW) begin mr = w; md = rand_word(); end
    else     begin md = w; mr = rand_word(); end
  endtask

  task automatic fail(string msg);
    failures++;
    $display("FAIL %s: %s", ROW ? "row" : "col", msg);
  endtask

  initial begin
    checks = 0; failures = 0; n_one = 0; n_two = 0; n_err = 0; n_b2b = 0;
    n_switch = 0; n_done = 0; m_aging = 1'b0;
    in_valid = 1'b0; md = '0; mr = '0;
  end

  always @(posedge clk_del) begin
    if (rst_n) begin
      edge_no++;
      // results
      if (res_valid) begin
        if (q.size() == 0) fail("result with nothing in flight");
        else begin
          op_t o;
          o = q.pop_front();
          checks += 2;
          if (res !== o.product) fail($sformatf("product %h want %h", res, o.product));
          if (edge_no - o.load_edge != o.latency)
            fail($sformatf("latency %0d want %0d", edge_no - o.load_edge, o.latency));
          n_done++;
          win_ops++;
          if (win_ops == int'(WINDOW)) begin
            if (win_errs > int'(THRESH)) m_aging = 1'b1;
            win_ops = 0;
            win_errs = 0;
          end
        end
      end
      // a Razor error injected during this cycle belongs to the operation in flight
      if (injected) begin
        if (q.size() == 0) fail("injection with nothing in flight");
        else begin q[0].err = 1'b1; q[0].latency++; end
        checks++;
        if (!razor_err) fail("injected error not reported");
        n_err++;
        win_errs++;
      end else if (razor_err) begin
        checks++;
        fail("razor_err without injection");
      end
      checks++;
      if (aging !== m_aging) fail($sformatf("aging %b want %b", aging, m_aging));
      // loads
      if (in_valid && in_ready) begin
        op_t o;
        int  z;
        bit  one;
        z   = zeros(ROW ? mr : md);
        one = m_aging ? (z > int'(N_ZERO) + 1) : (z > int'(N_ZERO));
        o.product   = (2*N)'(md) * (2*N)'(mr);
        o.load_edge = edge_no;
        o.latency   = one ? 2 : 3;
        o.err       = 1'b0;
        if (q.size() != 0) n_b2b++;
        q.push_back(o);
        if (one) n_one++; else n_two++;
        if (m_aging && z == int'(N_ZERO) + 1) n_switch++;
      end
      checks++;
      if (two_cycle && in_ready) fail("ready during the first cycle of a two-cycle operation");
      #1;
      if (!(in_valid && !in_ready)) begin
        in_valid = run && ($urandom_range(9) != 0);
        new_operands();
      end
    end
  end
endmodule

