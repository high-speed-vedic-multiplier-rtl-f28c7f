// Self-checking testbench of compressor_5_3_vec at its default 16 bits:
// random and corner operands.  For every column the three output bits must
// count the ones of that column, and p+q+r+s+t must equal w0 + 2*w1 + 4*w2.
module tb_compressor_5_3_vec;
  localparam int W = 16;
  logic [W-1:0] p, q, r, s, t, w0, w1, w2;
  int checks = 0, failures = 0;

  compressor_5_3_vec dut (.p(p), .q(q), .r(r), .s(s), .t(t),
                          .w0(w0), .w1(w1), .w2(w2));

  task automatic check();
    longint total, packed_sum;
    #1;
    for (int i = 0; i < W; i++) begin
      int ones = int'(p[i]) + int'(q[i]) + int'(r[i]) + int'(s[i]) + int'(t[i]);
      checks++;
      if ({w2[i], w1[i], w0[i]} != 3'(ones)) begin
        failures++;
        $display("FAIL column %0d: got %b expected %0d", i, {w2[i], w1[i], w0[i]}, ones);
      end
    end
    total      = longint'(p) + longint'(q) + longint'(r) + longint'(s) + longint'(t);
    packed_sum = longint'(w0) + 2 * longint'(w1) + 4 * longint'(w2);
    checks++;
    if (total != packed_sum) begin
      failures++;
      $display("FAIL total %0d != w0+2w1+4w2 %0d", total, packed_sum);
    end
  endtask

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    {p, q, r, s, t} = '0;           check();
    {p, q, r, s, t} = '1;           check();
    for (int n = 0; n < 2000; n++) begin
      p = W'($urandom); q = W'($urandom); r = W'($urandom);
      s = W'($urandom); t = W'($urandom);
      check();
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
