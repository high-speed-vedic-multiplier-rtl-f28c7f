// Modified carry select adder (MCSA): adds five WIDTH-bit unsigned numbers
// (16 bits by default) into a (WIDTH+2)-bit sum and a carry,
//   {carry, sum} = p + q + r + s + t.
//
// It works in four steps, all following the design:
//  1. A row of 5:3 compressors counts each bit column into three vectors,
//     p+q+r+s+t = w0 + 2*w1 + 4*w2.
//  2. The vectors are rearranged: w0[0] is already final and becomes
//     sum[0]; what is left, divided by two, is the sum of three
//     (WIDTH+1)-bit vectors x = w0 >> 1, y = w1 and z = w2 << 1.
//  3. A row of 3:2 compressors reduces x + y + z to a + 2*c.  Bit WIDTH of
//     c is always 0 (bit WIDTH of x and of y is 0), so only c[WIDTH-1:0]
//     goes on; that bit is left unconnected on purpose.
//  4. The carry select chain adds a and c: its bit 0 is sum[1], and 4-bit
//     ripple carry / carry select groups give the remaining bits and the
//     carry.
// None of the compressor columns depends on another, so only step 4 has a
// carry path.  Purely combinational.
module mcsa #(
  parameter int unsigned WIDTH = 16
) (
  input  logic [WIDTH-1:0] p,
  input  logic [WIDTH-1:0] q,
  input  logic [WIDTH-1:0] r,
  input  logic [WIDTH-1:0] s,
  input  logic [WIDTH-1:0] t,
  output logic [WIDTH+1:0] sum,
  output logic             carry
);

  logic [WIDTH-1:0] w0, w1, w2;
  logic [WIDTH:0]   x, y, z;
  logic [WIDTH:0]   a, c;

  compressor_5_3_vec #(.WIDTH(WIDTH)) u_c53 (
    .p(p), .q(q), .r(r), .s(s), .t(t),
    .w0(w0), .w1(w1), .w2(w2)
  );

  // Rearrangement of bits.
  always_comb begin
    x = {2'b00, w0[WIDTH-1:1]};
    y = {1'b0, w1};
    z = {w2, 1'b0};
  end

  compressor_3_2_vec #(.WIDTH(WIDTH+1)) u_c32 (
    .x(x), .y(y), .z(z),
    .a(a), .c(c)
  );

  assign sum[0] = w0[0];

  csla_chain #(.WIDTH(WIDTH)) u_chain (
    .a   (a),
    .b   (c[WIDTH-1:0]),
    .sum (sum[WIDTH+1:1]),
    .cout(carry)
  );

endmodule
