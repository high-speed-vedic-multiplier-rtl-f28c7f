// Ripple carry adder of WIDTH full adders (4 bits by default, the "RCA
// 4-bit" of the design).
//
// {cout, sum} = a + b + cin; the carry ripples from bit 0 upwards through
// one full adder per bit.  The design names the block but does not draw
// it; a chain of full adders is the plain reading of the name.
// Purely combinational.
module rca #(
  parameter int unsigned WIDTH = 4
) (
  input  logic [WIDTH-1:0] a,
  input  logic [WIDTH-1:0] b,
  input  logic             cin,
  output logic [WIDTH-1:0] sum,
  output logic             cout
);

  logic [WIDTH:0] c;

  assign c[0] = cin;
  for (genvar i = 0; i < WIDTH; i++) begin : g_bit
    full_adder u_fa (.x0(a[i]), .x1(b[i]), .x2(c[i]), .sum(sum[i]), .carry(c[i+1]));
  end
  assign cout = c[WIDTH];

endmodule
