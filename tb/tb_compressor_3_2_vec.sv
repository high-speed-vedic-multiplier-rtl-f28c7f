// Self-checking testbench of compressor_3_2_vec at its default 17 bits:
// random and corner operands.  Each column must give sum = parity and
// carry = majority of its three bits, and x + y + z must equal a + 2*c.
module tb_compressor_3_2_vec;
  localparam int W = 17;
  logic [W-1:0] x, y, z, a, c;
  int checks = 0, failures = 0;

  compressor_3_2_vec dut (.x(x), .y(y), .z(z), .a(a), .c(c));

  task automatic check();
    #1;
    for (int i = 0; i < W; i++) begin
      int ones = int'(x[i]) + int'(y[i]) + int'(z[i]);
      checks++;
      if ({c[i], a[i]} != 2'(ones)) begin
        failures++;
        $display("FAIL column %0d: got %b expected %0d", i, {c[i], a[i]}, ones);
      end
    end
    checks++;
    if (longint'(x) + longint'(y) + longint'(z) != longint'(a) + 2 * longint'(c)) begin
      failures++;
      $display("FAIL x+y+z != a+2c for %h %h %h", x, y, z);
    end
  endtask

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    {x, y, z} = '0; check();
    {x, y, z} = '1; check();
    for (int n = 0; n < 2000; n++) begin
      x = W'($urandom); y = W'($urandom); z = W'($urandom);
      check();
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
