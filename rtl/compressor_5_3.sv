// 5:3 compressor: counts five bits of equal weight into a 3-bit number.
//
// Structure as in the design: full adder 1 adds x0, x1, x2; full adder 2
// adds x3, x4 and the sum of full adder 1, and its sum is o0 (weight 1).
// The two full adder carries (both weight 2) go to a half adder, whose sum
// is o1 (weight 2) and whose carry is o2 (weight 4).  So
// x0 + x1 + x2 + x3 + x4 = o0 + 2*o1 + 4*o2, the count 0..5.  Which half
// adder output is o1 and which o2 follows from those weights.
// Purely combinational: three adder delays from x0..x2 to o1/o2.
module compressor_5_3 (
  input  logic [4:0] x,
  output logic [2:0] o
);

  logic s1, c1, c2;

  full_adder u_fa1 (.x0(x[0]), .x1(x[1]), .x2(x[2]), .sum(s1),   .carry(c1));
  full_adder u_fa2 (.x0(x[3]), .x1(x[4]), .x2(s1),   .sum(o[0]), .carry(c2));
  half_adder u_ha  (.a(c2), .b(c1), .sum(o[1]), .carry(o[2]));

endmodule
