// Partial product generator of the multiplier.
//
// For each of the five multiplier bits m[k] it forms
//   pp[k] = (n AND m[k]) << k,
// that is the multiplicand gated by m[k] with k zeros below its least
// significant bit, as the design describes.  Every pp[k] is given the full
// product width N_WIDTH+4 so that all five are aligned by bit weight; the
// bits outside k .. k+N_WIDTH-1 are 0.  N_WIDTH defaults to the design's
// 16-bit multiplicand.  Purely combinational: one AND gate per bit.
module partial_product_generator
  import mcsa_pkg::*;
#(
  parameter int unsigned N_WIDTH = 16
) (
  input  logic [N_WIDTH-1:0]                         n,
  input  logic [NUM_OPERANDS-1:0]                    m,
  output logic [NUM_OPERANDS-1:0][N_WIDTH+NUM_OPERANDS-2:0] pp
);

  localparam int unsigned PW = N_WIDTH + NUM_OPERANDS - 1;

  always_comb begin
    for (int k = 0; k < NUM_OPERANDS; k++) begin
      pp[k] = {{(PW-N_WIDTH){1'b0}}, n & {N_WIDTH{m[k]}}} << k;
    end
  end

endmodule
