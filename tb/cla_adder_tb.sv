// cla_adder_tb: checks the 64-bit carry look-ahead adder (and a 32-bit and a 16-bit
// instance, the other sizes of the design) against the + operator, with carry-chain
// corner cases and random operands.
module cla_adder_tb;
  int checks = 0, failures = 0;

  logic [63:0] a64, b64, s64;  logic c64, co64;
  logic [31:0] a32, b32, s32;  logic c32, co32;
  logic [15:0] a16, b16, s16;  logic c16, co16;

  cla_adder #(.W(64)) u64 (.a(a64), .b(b64), .cin(c64), .s(s64), .cout(co64));
  cla_adder #(.W(32)) u32 (.a(a32), .b(b32), .cin(c32), .s(s32), .cout(co32));
  cla_adder #(.W(16)) u16 (.a(a16), .b(b16), .cin(c16), .s(s16), .cout(co16));

  task automatic check();
    logic [64:0] e64; logic [32:0] e32; logic [16:0] e16;
    #1;
    e64 = {1'b0, a64} + {1'b0, b64} + 65'(c64);
    e32 = {1'b0, a32} + {1'b0, b32} + 33'(c32);
    e16 = {1'b0, a16} + {1'b0, b16} + 17'(c16);
    checks += 3;
    if ({co64, s64} !== e64) begin failures++; $display("FAIL64 %h+%h+%b=%h", a64, b64, c64, {co64, s64}); end
    if ({co32, s32} !== e32) begin failures++; $display("FAIL32 %h+%h+%b=%h", a32, b32, c32, {co32, s32}); end
    if ({co16, s16} !== e16) begin failures++; $display("FAIL16 %h+%h+%b=%h", a16, b16, c16, {co16, s16}); end
  endtask

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    // full carry chain: all ones plus carry in, and single-bit generates
    a64 = '1; b64 = '0; c64 = 1; a32 = '1; b32 = '0; c32 = 1; a16 = '1; b16 = '0; c16 = 1; check();
    for (int k = 0; k < 64; k++) begin
      a64 = 64'(1) << k; b64 = ~(64'(1) << k) | (64'(1) << k); c64 = 0;
      a32 = 32'(a64);    b32 = 32'(b64); c32 = 1;
      a16 = 16'(a64);    b16 = 16'(b64); c16 = 0;
      check();
    end
    for (int n = 0; n < 3000; n++) begin
      a64 = {$urandom, $urandom}; b64 = {$urandom, $urandom}; c64 = 1'($urandom);
      a32 = $urandom; b32 = $urandom; c32 = 1'($urandom);
      a16 = 16'($urandom); b16 = 16'($urandom); c16 = 1'($urandom);
      check();
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
