// Self-checking testbench of csla_chain: the default 16-bit chain (one
// ripple carry group and three carry select groups) and an 18-bit chain
// (whose top group is 2 bits wide).  Random, all-ones and carry-chain
// operands are compared with a + 2*b.  It counts how often each carry
// select group was selected with an incoming carry of 1, and fails if any
// group never was.
module tb_csla_chain;
  logic [16:0] a16, s16;
  logic [15:0] b16;
  logic        co16;
  logic [18:0] a18, s18;
  logic [17:0] b18;
  logic        co18;
  int checks = 0, failures = 0;
  int sel_one [4];

  csla_chain dut (.a(a16), .b(b16), .sum(s16), .cout(co16));
  csla_chain #(.WIDTH(18)) dut18 (.a(a18), .b(b18), .sum(s18), .cout(co18));

  task automatic check();
    #1;
    for (int g = 1; g < 4; g++) if (dut.c[g]) sel_one[g]++;
    checks++;
    if ({co16, s16} != 18'(a16) + 18'(2 * 18'(b16))) begin
      failures++;
      $display("FAIL 16: a=%h b=%h -> %h", a16, b16, {co16, s16});
    end
    checks++;
    if ({co18, s18} != 20'(a18) + 20'(2 * 20'(b18))) begin
      failures++;
      $display("FAIL 18: a=%h b=%h -> %h", a18, b18, {co18, s18});
    end
  endtask

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    sel_one = '{default: 0};
    a16 = '1; b16 = '1; a18 = '1; b18 = '1; check();
    a16 = 17'h1fffe; b16 = 16'h0001; a18 = 19'h7fffe; b18 = 18'h1; check();
    a16 = '0; b16 = '0; a18 = '0; b18 = '0; check();
    for (int n = 0; n < 5000; n++) begin
      a16 = 17'($urandom); b16 = 16'($urandom);
      a18 = 19'($urandom); b18 = 18'($urandom);
      check();
    end
    for (int g = 1; g < 4; g++) begin
      checks++;
      if (sel_one[g] == 0) begin
        failures++;
        $display("FAIL carry select group %0d never saw a carry-in of 1", g);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
