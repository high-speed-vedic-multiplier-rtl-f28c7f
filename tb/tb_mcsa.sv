// Self-checking testbench of mcsa: the default 16-bit five-operand adder
// and the 18-bit one the 16x5 multiplier uses.  Random operands, all
// zeros, all ones and one-hot columns are compared with the integer sum
// p + q + r + s + t, for both the sum and the carry output.  The carry is
// required to be 1 at least once (all-ones operands give 5 * 65535).
module tb_mcsa;
  logic [15:0] p, q, r, s, t;
  logic [17:0] sum;
  logic        carry;
  logic [17:0] p8, q8, r8, s8, t8;
  logic [19:0] sum8;
  logic        carry8;
  int checks = 0, failures = 0;
  int carries = 0;

  mcsa dut (.p(p), .q(q), .r(r), .s(s), .t(t), .sum(sum), .carry(carry));
  mcsa #(.WIDTH(18)) dut18 (.p(p8), .q(q8), .r(r8), .s(s8), .t(t8),
                            .sum(sum8), .carry(carry8));

  task automatic check();
    longint exp16, exp18;
    #1;
    exp16 = longint'(p) + longint'(q) + longint'(r) + longint'(s) + longint'(t);
    exp18 = longint'(p8) + longint'(q8) + longint'(r8) + longint'(s8) + longint'(t8);
    if (carry) carries++;
    checks++;
    if (longint'({carry, sum}) != exp16) begin
      failures++;
      $display("FAIL 16: %h+%h+%h+%h+%h -> %h expected %h", p, q, r, s, t, {carry, sum}, exp16);
    end
    checks++;
    if (longint'({carry8, sum8}) != exp18) begin
      failures++;
      $display("FAIL 18: -> %h expected %h", {carry8, sum8}, exp18);
    end
  endtask

  initial begin
    #10000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    {p, q, r, s, t} = '0;  {p8, q8, r8, s8, t8} = '0;  check();
    {p, q, r, s, t} = '1;  {p8, q8, r8, s8, t8} = '1;  check();
    for (int i = 0; i < 18; i++) begin
      p = 16'(1 << i); q = p; r = p; s = p; t = p;
      p8 = 18'(1 << i); q8 = p8; r8 = p8; s8 = p8; t8 = p8;
      check();
    end
    for (int n = 0; n < 20000; n++) begin
      p = 16'($urandom); q = 16'($urandom); r = 16'($urandom);
      s = 16'($urandom); t = 16'($urandom);
      p8 = 18'($urandom); q8 = 18'($urandom); r8 = 18'($urandom);
      s8 = 18'($urandom); t8 = 18'($urandom);
      check();
    end
    checks++;
    if (carries == 0) begin
      failures++;
      $display("FAIL the carry output was never 1");
    end
    $display("carry output set in %0d cases", carries);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
