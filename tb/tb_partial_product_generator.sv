// Self-checking testbench of partial_product_generator at its default
// 16-bit multiplicand: every multiplier value with random and corner
// multiplicands.  pp[k] must equal m[k] ? n << k : 0, and the five must
// add up to n * m.
module tb_partial_product_generator;
  logic [15:0]      n;
  logic [4:0]       m;
  logic [4:0][19:0] pp;
  int checks = 0, failures = 0;

  partial_product_generator dut (.n(n), .m(m), .pp(pp));

  task automatic check();
    longint total;
    #1;
    total = 0;
    for (int k = 0; k < 5; k++) begin
      logic [19:0] expv;
      expv = m[k] ? (20'(n) << k) : 20'd0;
      total += longint'(pp[k]);
      checks++;
      if (pp[k] != expv) begin
        failures++;
        $display("FAIL n=%h m=%b pp[%0d]=%h expected %h", n, m, k, pp[k], expv);
      end
    end
    checks++;
    if (total != longint'(n) * longint'(m)) begin
      failures++;
      $display("FAIL n=%h m=%b sum of partial products %0d", n, m, total);
    end
  endtask

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int mi = 0; mi < 32; mi++) begin
      m = 5'(mi);
      n = 16'hffff; check();
      n = 16'h0001; check();
      n = 16'h8000; check();
      for (int j = 0; j < 50; j++) begin
        n = 16'($urandom);
        check();
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
