// High speed unsigned multiplier built on a modified carry select adder
// (MCSA): product = n * m for an N_WIDTH-bit multiplicand n (16 bits by
// default) and a 5-bit multiplier m.  The product has N_WIDTH+5 bits.
//
// How it works:
//  * The partial product generator forms pp[k] = (n AND m[k]) << k.
//  * Product bit 0 is pp[0][0], the only bit of that weight.
//  * Bit 1 has two bits, pp[0][1] and pp[1][1]; a half adder adds them.
//    Its sum is product bit 1 and its carry has weight 4.
//  * Everything from bit 2 up goes to one MCSA, which adds the five
//    partial products at once.  Operand k of the MCSA is pp[k] from bit 2
//    upwards.  The half adder's carry rides in bit 0 of operand 3: pp[3]
//    has three zeros below its data, so that slot is always free.
//  * The MCSA's sum, read from bit 2 upwards, is the rest of the product.
//
// The MCSA width is N_WIDTH+2, enough for pp[4] from bit 2 to bit
// N_WIDTH+3.  In the design the MCSA drawn in the multiplier is the 16-bit
// one, which holds every partial product bit only for a 14-bit
// multiplicand; for the 16-bit multiplicand the design names, this
// implementation widens the MCSA to 18 bits (its last carry select group
// is then 2 bits wide).  With N_WIDTH = 14 it is exactly the 16-bit MCSA.
// The top two bits of the MCSA output ({carry, sum[MSB]}) can never be 1,
// since n * m < 2^(N_WIDTH+5); they are left unconnected on purpose.
//
// Interface: plain inputs n and m, output product.  There is no clock or
// reset: the product is valid one combinational delay after the inputs.
module vedic_multiplier
  import mcsa_pkg::*;
#(
  parameter int unsigned N_WIDTH = 16
) (
  input  logic [N_WIDTH-1:0]              n,
  input  logic [NUM_OPERANDS-1:0]         m,
  output logic [N_WIDTH+NUM_OPERANDS-1:0] product
);

  localparam int unsigned PW = N_WIDTH + NUM_OPERANDS - 1;  // partial product width
  localparam int unsigned AW = PW - 2;                      // MCSA operand width

  logic [NUM_OPERANDS-1:0][PW-1:0] pp;
  logic                            ha_carry;
  logic [AW-1:0]                   op0, op1, op2, op3, op4;
  logic [AW+1:0]                   mcsa_sum;
  logic                            mcsa_carry;

  partial_product_generator #(.N_WIDTH(N_WIDTH)) u_ppg (
    .n (n),
    .m (m),
    .pp(pp)
  );

  assign product[0] = pp[0][0];

  half_adder u_ha (
    .a    (pp[0][1]),
    .b    (pp[1][1]),
    .sum  (product[1]),
    .carry(ha_carry)
  );

  always_comb begin
    op0 = pp[0][PW-1:2];
    op1 = pp[1][PW-1:2];
    op2 = pp[2][PW-1:2];
    op3 = {pp[3][PW-1:3], ha_carry};
    op4 = pp[4][PW-1:2];
  end

  mcsa #(.WIDTH(AW)) u_mcsa (
    .p    (op0),
    .q    (op1),
    .r    (op2),
    .s    (op3),
    .t    (op4),
    .sum  (mcsa_sum),
    .carry(mcsa_carry)
  );

  assign product[N_WIDTH+NUM_OPERANDS-1:2] = mcsa_sum[AW:0];

endmodule
