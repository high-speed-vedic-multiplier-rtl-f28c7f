// Carry select adder chain: last stage of the modified carry select adder.
//
// Adds the sum vector a (WIDTH+1 bits) and the carry vector b (WIDTH bits)
// of the 3:2 compressor row, where b[i] has the weight of a[i+1]:
//   {cout, sum} = a + 2*b.
// Bit 0 of a has nothing to add and passes straight to sum[0].  The rest,
// a[WIDTH:1] + b[WIDTH-1:0], is cut into 4-bit groups: the lowest group is a
// plain ripple carry adder with carry-in 0, every higher group is a carry
// select basic block whose select is the carry of the group below.  With
// the default WIDTH = 16 that is one RCA and three basic blocks, as in the
// design.  If WIDTH is not a multiple of 4 the top group is narrower
// (this implementation's choice, used only when the adder is widened).
// Purely combinational; the carry crosses each basic block through one
// multiplexer.
module csla_chain
  import mcsa_pkg::*;
#(
  parameter int unsigned WIDTH = 16
) (
  input  logic [WIDTH:0]   a,
  input  logic [WIDTH-1:0] b,
  output logic [WIDTH:0]   sum,
  output logic             cout
);

  localparam int unsigned NG = csla_groups(WIDTH);

  logic [NG:0] c;

  assign sum[0] = a[0];
  assign c[0]   = 1'b0;

  for (genvar g = 0; g < NG; g++) begin : g_grp
    localparam int unsigned LO = g * CSLA_GROUP;
    localparam int unsigned GW = csla_group_width(WIDTH, g);
    if (g == 0) begin : g_rca
      rca #(.WIDTH(GW)) u_rca (
        .a   (a[LO+GW:LO+1]),
        .b   (b[LO+GW-1:LO]),
        .cin (c[g]),
        .sum (sum[LO+GW:LO+1]),
        .cout(c[g+1])
      );
    end else begin : g_csel
      csla_basic_block #(.WIDTH(GW)) u_blk (
        .a   (a[LO+GW:LO+1]),
        .b   (b[LO+GW-1:LO]),
        .cin (c[g]),
        .sum (sum[LO+GW:LO+1]),
        .cout(c[g+1])
      );
    end
  end

  assign cout = c[NG];

endmodule
