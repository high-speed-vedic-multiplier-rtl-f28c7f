// Self-checking testbench of csla_basic_block: every a, b and select
// (previous stage carry) of the default 4-bit block and of a 2-bit block,
// compared with a + b + cin.  It also checks that each select value is
// exercised with and without a resulting carry.
module tb_csla_basic_block;
  logic [3:0] a4, b4, s4;
  logic [1:0] a2, b2, s2;
  logic       cin, co4, co2;
  int checks = 0, failures = 0;
  int seen [2][2];

  csla_basic_block dut (.a(a4), .b(b4), .cin(cin), .sum(s4), .cout(co4));
  csla_basic_block #(.WIDTH(2)) dut2 (.a(a2), .b(b2), .cin(cin), .sum(s2), .cout(co2));

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    seen = '{default: 0};
    for (int i = 0; i < 512; i++) begin
      {cin, a4, b4} = 9'(i);
      a2 = a4[3:2];
      b2 = b4[1:0];
      #1;
      seen[cin][co4]++;
      checks++;
      if ({co4, s4} != 5'(a4) + 5'(b4) + 5'(cin)) begin
        failures++;
        $display("FAIL 4-bit %0d+%0d+%0d -> %0d", a4, b4, cin, {co4, s4});
      end
      checks++;
      if ({co2, s2} != 3'(a2) + 3'(b2) + 3'(cin)) begin
        failures++;
        $display("FAIL 2-bit %0d+%0d+%0d -> %0d", a2, b2, cin, {co2, s2});
      end
    end
    for (int i = 0; i < 2; i++)
      for (int j = 0; j < 2; j++) begin
        checks++;
        if (seen[i][j] == 0) begin
          failures++;
          $display("FAIL select=%0d with carry-out=%0d never exercised", i, j);
        end
      end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
