// Self-checking testbench of full_adder: all eight input combinations,
// compared with the arithmetic sum x0 + x1 + x2.
module tb_full_adder;
  logic x0, x1, x2, sum, carry;
  int checks = 0, failures = 0;

  full_adder dut (.x0(x0), .x1(x1), .x2(x2), .sum(sum), .carry(carry));

  initial begin
    #1000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 8; i++) begin
      {x0, x1, x2} = 3'(i);
      #1;
      checks++;
      if ({carry, sum} != 2'(x0) + 2'(x1) + 2'(x2)) begin
        failures++;
        $display("FAIL %0d%0d%0d -> carry=%0d sum=%0d", x0, x1, x2, carry, sum);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
