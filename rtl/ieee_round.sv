// ieee_round: IEEE-754 round to nearest, ties to even.
//
// Takes a normalized 24-bit significand (MSB set), the round bit (first bit
// below the LSB) and the sticky bit (OR of everything further down). One ulp
// is added when rnd AND (sticky OR lsb). If that carries out of the MSB the
// significand becomes 1.000... and the exponent is incremented. The rounding
// mode is the published one; the exponent is passed through unchanged in
// every other case. Purely combinational.
module ieee_round
  import fma_pkg::*;
(
  input  logic [SIG_W-1:0] sig,
  input  logic             rnd,
  input  logic             sticky,
  input  exp_int_t         exp_in,
  output logic [SIG_W-1:0] sig_out,
  output exp_int_t         exp_out
);
  logic           up;
  logic [SIG_W:0] s;

  always_comb begin
    up = rnd & (sticky | sig[0]);
    s  = {1'b0, sig} + (SIG_W+1)'(up);
    if (s[SIG_W]) begin
      sig_out = s[SIG_W:1];
      exp_out = exp_in + exp_int_t'(1);
    end else begin
      sig_out = s[SIG_W-1:0];
      exp_out = exp_in;
    end
  end
endmodule
