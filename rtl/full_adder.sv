// Full adder, used as the 3:2 compressor of the design.
//
// Adds three bits of equal weight, x0 + x1 + x2 = sum + 2*carry, with the
// usual sum-of-products logic.  The design only names it "a full adder";
// the gate form is this implementation's.  Purely combinational.
module full_adder (
  input  logic x0,
  input  logic x1,
  input  logic x2,
  output logic sum,
  output logic carry
);

  always_comb begin
    sum   = x0 ^ x1 ^ x2;
    carry = (x0 & x1) | (x0 & x2) | (x1 & x2);
  end

endmodule
