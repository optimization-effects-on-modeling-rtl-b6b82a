// exponent_adjust: exponent of the normalized sum.
//
// exp_ref is the biased exponent that bit 46 of the 75-bit sum carries
// (the weight of the product's 2^0 position). After a left shift by amt
// the leading one sits in bit 74, so every position shifted costs one
// in the exponent:
//   exp_out = exp_ref + OFFSET - amt,   OFFSET = 74 - 46 = 28.
// Exponents are signed and wider than 8 bits, so values out of the normal
// range stay exact and are dealt with at packing. Purely combinational.
//
// Follows the published design's exponent-adjust step driven by the
// normalization shift amount; the signed 11-bit exponent and the offset
// derived from the field layout are this design's.
module exponent_adjust
  import fma_pkg::*;
#(
  parameter int unsigned AMT_W  = CNT_W + 1,
  parameter int          OFFSET = ADD_W - 1 - (PROD_W - 2)
) (
  input  exp_int_t         exp_ref,
  input  logic [AMT_W-1:0] amt,
  output exp_int_t         exp_out
);
  assign exp_out = exp_ref + exp_int_t'(OFFSET) - exp_int_t'(amt);
endmodule
