// Half adder: adds two bits into a sum bit and a carry bit.
//
// Used inside the 5:3 compressor, to merge the two carries of its full
// adders, and in the multiplier on product bit 1.  sum = a ^ b,
// carry = a & b.  Purely combinational, no timing beyond gate delay.
module half_adder (
  input  logic a,
  input  logic b,
  output logic sum,
  output logic carry
);

  always_comb begin
    sum   = a ^ b;
    carry = a & b;
  end

endmodule
