// Row of 3:2 compressors (carry save adder): second stage of the modified
// carry select adder.
//
// Bit i of x, y and z goes to one full adder; its sum is a[i] (weight 2^i)
// and its carry c[i] (weight 2^(i+1)), so x + y + z = a + 2*c.  WIDTH
// defaults to the design's 17 bits (one more than the 16-bit operands of
// the adder, since the rearranged vectors are 17 bits).  Purely
// combinational, one full adder delay.
module compressor_3_2_vec #(
  parameter int unsigned WIDTH = 17
) (
  input  logic [WIDTH-1:0] x,
  input  logic [WIDTH-1:0] y,
  input  logic [WIDTH-1:0] z,
  output logic [WIDTH-1:0] a,
  output logic [WIDTH-1:0] c
);

  for (genvar i = 0; i < WIDTH; i++) begin : g_col
    full_adder u_fa (.x0(x[i]), .x1(y[i]), .x2(z[i]), .sum(a[i]), .carry(c[i]));
  end

endmodule
