// Self-checking testbench of rca: every a, b and carry-in of the default
// 4-bit adder, and of a 2-bit one (the width a narrow top group uses),
// compared with a + b + cin.
module tb_rca;
  logic [3:0] a4, b4, s4;
  logic [1:0] a2, b2, s2;
  logic       cin, co4, co2;
  int checks = 0, failures = 0;

  rca dut (.a(a4), .b(b4), .cin(cin), .sum(s4), .cout(co4));
  rca #(.WIDTH(2)) dut2 (.a(a2), .b(b2), .cin(cin), .sum(s2), .cout(co2));

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 512; i++) begin
      {cin, a4, b4} = 9'(i);
      a2 = a4[1:0];
      b2 = b4[1:0];
      #1;
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
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
