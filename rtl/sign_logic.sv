// sign_logic: operand sign handling of stage 1.
//
// The unit has no op-code: a subtraction is requested by flipping an
// operand sign before the inputs. From the three signs this block forms the
// sign of the product b*c, the effective-subtraction flag (addend and
// product of opposite sign), which drives the inversion of the addend
// before alignment and the adder's carry-in, and the sign an exact zero
// result takes: +0 when the terms cancel (round to nearest), otherwise the
// common sign of the two terms. In stage 2 the result sign is the product
// sign XOR the sign of the completed sum (done next to the adder).
//
// Follows the published design in placing the sign and inversion control
// in stage 1; the zero-sign rule is IEEE-754's, added here. Purely
// combinational.
module sign_logic (
  input  logic sign_a,     // addend sign
  input  logic sign_b,
  input  logic sign_c,
  output logic sign_p,     // sign of b*c
  output logic sub,        // effective subtraction
  output logic zero_sign   // sign of an exact zero sum
);
  always_comb begin
    sign_p    = sign_b ^ sign_c;
    sub       = sign_a ^ sign_p;
    zero_sign = sub ? 1'b0 : sign_a;
  end
endmodule
