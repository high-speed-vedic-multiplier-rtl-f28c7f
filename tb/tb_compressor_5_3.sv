// Self-checking testbench of compressor_5_3: all 32 input patterns; the
// 3-bit output must equal the number of ones among the five inputs.
module tb_compressor_5_3;
  logic [4:0] x;
  logic [2:0] o;
  int checks = 0, failures = 0;

  compressor_5_3 dut (.x(x), .o(o));

  initial begin
    #1000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 32; i++) begin
      int ones;
      x = 5'(i);
      ones = 0;
      for (int k = 0; k < 5; k++) ones += int'(x[k]);
      #1;
      checks++;
      if (int'(o) != ones) begin
        failures++;
        $display("FAIL x=%b -> o=%0d, expected %0d", x, o, ones);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
