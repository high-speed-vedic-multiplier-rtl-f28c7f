// Testbench of vedic_multiplier with a 14-bit multiplicand, the size at
// which the multiplier's MCSA is exactly the 16-bit adder of the design
// (operands are the partial products from bit 2 to bit 17, the product is
// 19 bits).  Every one of the 2^19 input pairs is compared with n * m, and
// the bit-1 half adder carry and every carry select group's carry-in-1
// selection must occur at least once.
module tb_vedic_multiplier_n14;
  logic [13:0] n;
  logic [4:0]  m;
  logic [18:0] product;
  int checks = 0, failures = 0;
  int ha_carries = 0;
  int sel_one [4];

  vedic_multiplier #(.N_WIDTH(14)) dut (.n(n), .m(m), .product(product));

  initial begin
    #100000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    sel_one = '{default: 0};
    for (int mi = 0; mi < 32; mi++) begin
      for (int ni = 0; ni < 16384; ni++) begin
        m = 5'(mi);
        n = 14'(ni);
        #1;
        if (dut.ha_carry) ha_carries++;
        for (int g = 1; g < 4; g++) if (dut.u_mcsa.u_chain.c[g]) sel_one[g]++;
        checks++;
        if (product != 19'(n) * 19'(m)) begin
          failures++;
          if (failures < 10)
            $display("FAIL %0d * %0d -> %0d", n, m, product);
        end
      end
    end
    checks++;
    if (ha_carries == 0) begin
      failures++;
      $display("FAIL the bit-1 half adder never produced a carry");
    end
    for (int g = 1; g < 4; g++) begin
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
