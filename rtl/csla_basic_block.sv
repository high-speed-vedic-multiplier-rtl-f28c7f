// Carry select basic block: one WIDTH-bit stage (4 bits by default) of the
// carry select adder.
//
// Two ripple carry adders add a and b at the same time, one with carry-in
// 0 and one with carry-in 1.  When the previous stage's carry cin arrives,
// it only selects: WIDTH 2:1 multiplexers pick the sum of the adder whose
// assumed carry-in matches, and one more 2:1 multiplexer picks that adder's
// carry-out as this stage's cout.  The delay from cin to the outputs is a
// single multiplexer, which is where the speed of the adder comes from.
// This follows the design's basic block; the multiplexers are written as
// conditional assignments.  Purely combinational.
module csla_basic_block #(
  parameter int unsigned WIDTH = 4
) (
  input  logic [WIDTH-1:0] a,
  input  logic [WIDTH-1:0] b,
  input  logic             cin,   // previous stage carry, the select
  output logic [WIDTH-1:0] sum,
  output logic             cout   // this stage's carry
);

  logic [WIDTH-1:0] sum0, sum1;
  logic             cout0, cout1;

  rca #(.WIDTH(WIDTH)) u_rca0 (.a(a), .b(b), .cin(1'b0), .sum(sum0), .cout(cout0));
  rca #(.WIDTH(WIDTH)) u_rca1 (.a(a), .b(b), .cin(1'b1), .sum(sum1), .cout(cout1));

  always_comb begin
    sum  = cin ? sum1  : sum0;
    cout = cin ? cout1 : cout0;
  end

endmodule
