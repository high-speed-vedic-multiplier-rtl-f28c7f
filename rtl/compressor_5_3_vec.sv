// Row of 5:3 compressors: first stage of the modified carry select adder.
//
// Bit i of the five operands p, q, r, s, t is counted by its own 5:3
// compressor; its three output bits form bit i of three vectors:
// w0 (weight 2^i), w1 (weight 2^(i+1)) and w2 (weight 2^(i+2)).  So
// p + q + r + s + t = w0 + 2*w1 + 4*w2.  The columns are independent, none
// waits for another.  WIDTH defaults to the design's 16 bits.
// Purely combinational.
module compressor_5_3_vec #(
  parameter int unsigned WIDTH = 16
) (
  input  logic [WIDTH-1:0] p,
  input  logic [WIDTH-1:0] q,
  input  logic [WIDTH-1:0] r,
  input  logic [WIDTH-1:0] s,
  input  logic [WIDTH-1:0] t,
  output logic [WIDTH-1:0] w0,
  output logic [WIDTH-1:0] w1,
  output logic [WIDTH-1:0] w2
);

  for (genvar i = 0; i < WIDTH; i++) begin : g_col
    logic [2:0] cnt;
    compressor_5_3 u_c53 (
      .x({t[i], s[i], r[i], q[i], p[i]}),
      .o(cnt)
    );
    assign w0[i] = cnt[0];
    assign w1[i] = cnt[1];
    assign w2[i] = cnt[2];
  end

endmodule
