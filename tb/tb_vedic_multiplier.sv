// End-to-end, full-size testbench of vedic_multiplier with its default
// parameters (16-bit multiplicand, 5-bit multiplier).
//
// It applies every one of the 2^21 input pairs and compares the product
// with n * m computed by the simulator.  It also counts how often each
// mechanism of the design was used and fails if one never was:
//  * the bit-1 half adder producing a carry, which then rides in the
//    spare bit of the MCSA's fourth operand;
//  * a 5:3 compressor column counting four or five ones (weight-4 output);
//  * each carry select group of the final adder being switched to its
//    carry-in-1 adder by the group below it.
module tb_vedic_multiplier;
  logic [15:0] n;
  logic [4:0]  m;
  logic [20:0] product;
  int checks = 0, failures = 0;
  int ha_carries = 0, w2_set = 0;
  int sel_one [5];

  vedic_multiplier dut (.n(n), .m(m), .product(product));

  initial begin
    #100000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    sel_one = '{default: 0};
    for (int mi = 0; mi < 32; mi++) begin
      for (int ni = 0; ni < 65536; ni++) begin
        m = 5'(mi);
        n = 16'(ni);
        #1;
        if (dut.ha_carry) ha_carries++;
        if (dut.u_mcsa.w2 != '0) w2_set++;
        for (int g = 1; g < 5; g++) if (dut.u_mcsa.u_chain.c[g]) sel_one[g]++;
        checks++;
        if (product != 21'(n) * 21'(m)) begin
          failures++;
          if (failures < 10)
            $display("FAIL %0d * %0d -> %0d", n, m, product);
        end
      end
    end
    $display("half adder carries: %0d, 5:3 weight-4 outputs: %0d", ha_carries, w2_set);
    checks++;
    if (ha_carries == 0) begin
      failures++;
      $display("FAIL the bit-1 half adder never produced a carry");
    end
    checks++;
    if (w2_set == 0) begin
      failures++;
      $display("FAIL no 5:3 compressor ever gave its weight-4 output");
    end
    for (int g = 1; g < 5; g++) begin
      $display("carry select group %0d selected its carry-in-1 adder %0d times", g, sel_one[g]);
      checks++;
      if (sel_one[g] == 0) begin
        failures++;
        $display("FAIL carry select group %0d never selected its carry-in-1 adder", g);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
