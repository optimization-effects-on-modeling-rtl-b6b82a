// align_shift_calc: exponent path of stage 1.
//
// Adds the multiplicand exponents to get the product exponent
//   exp_p = exp_b + exp_c - 127,
// compares it with the addend exponent (d = exp_a - exp_p) and produces the
// right shift of the addend inside the 74-bit alignment field,
//   shamt = 27 - d,
// which places the addend's leading bit 27 positions above field bit 46
// when d = 0. Both formulas are the published ones. This design's own
// choices cover the ends of the range:
//   * shamt above 74 is clamped to 74 (the addend then only reaches the
//     sticky bit);
//   * shamt below 0 (product more than 27 binades below the addend) gives
//     shamt 0 and raises prod_small: the product then only matters as a
//     sticky bit and is replaced by a 1 in the field's LSB;
//   * a zero product gives shamt 0, a zero addend shamt 74.
// exp_ref is the biased exponent of field bit 46 and is what the
// normalizer later adjusts. Purely combinational.
module align_shift_calc
  import fma_pkg::*;
(
  input  logic [EXP_W-1:0]   exp_a,
  input  logic [EXP_W-1:0]   exp_b,
  input  logic [EXP_W-1:0]   exp_c,
  input  logic               a_zero,
  input  logic               p_zero,
  output logic [SHAMT_W-1:0] shamt,
  output logic               prod_small,
  output exp_int_t           exp_ref
);
  exp_int_t exp_p, exp_a_i, d, sh;

  always_comb begin
    exp_a_i = exp_int_t'({3'b000, exp_a});
    exp_p   = exp_int_t'({3'b000, exp_b}) + exp_int_t'({3'b000, exp_c}) - exp_int_t'(BIAS);
    d       = exp_a_i - exp_p;
    sh      = exp_int_t'(ALIGN_BASE) - d;
    prod_small = 1'b0;
    if (a_zero) begin
      shamt   = SHAMT_W'(ALIGN_W);
      exp_ref = exp_p;
    end else if (p_zero) begin
      shamt   = '0;
      exp_ref = exp_a_i - exp_int_t'(ALIGN_BASE);
    end else if (sh < 0) begin
      shamt      = '0;
      prod_small = 1'b1;
      exp_ref    = exp_a_i - exp_int_t'(ALIGN_BASE);
    end else begin
      shamt   = (sh > exp_int_t'(ALIGN_W)) ? SHAMT_W'(ALIGN_W) : SHAMT_W'(sh);
      exp_ref = exp_p;
    end
  end
endmodule
