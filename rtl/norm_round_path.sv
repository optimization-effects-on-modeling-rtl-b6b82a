// norm_round_path: one normalization-and-rounding path.
//
// Shifts the 75-bit magnitude left by cnt + EXTRA and assumes that the
// leading one then sits at bit 74. It takes the 24-bit significand from bits
// 74..51, the round bit from bit 50 and the sticky bit from bits 49..0 (plus
// the alignment sticky), rounds to nearest even and computes the exponent
//   exp = exp_ref + 28 - (cnt + EXTRA)
// (field bit 46 has weight exp_ref, and the leading one was at bit
// 74 - cnt - EXTRA of the magnitude). lead_ok reports whether the
// assumption held. The FMA runs two copies, EXTRA = 0 and EXTRA = 1, and
// keeps the one whose assumption holds. Purely combinational.
module norm_round_path
  import fma_pkg::*;
#(
  parameter int unsigned EXTRA = 0
) (
  input  logic [ADD_W-1:0] mag,
  input  logic [CNT_W-1:0] cnt,
  input  logic             sticky_a,
  input  exp_int_t         exp_ref,
  output logic [SIG_W-1:0] sig,
  output exp_int_t         exp_out,
  output logic             lead_ok
);
  localparam int unsigned LOW_W = ADD_W - SIG_W - 1;   // 50 bits below the round bit

  logic [CNT_W:0]   amt;
  logic [ADD_W-1:0] shifted;
  logic             st;
  exp_int_t         exp_pre;

  assign amt = {1'b0, cnt} + (CNT_W+1)'(EXTRA);

  norm_shifter #(.W(ADD_W), .CW(CNT_W+1)) u_shift (.x(mag), .amt(amt), .y(shifted));

  sticky_logic #(.W(LOW_W)) u_sticky (.bits(shifted[LOW_W-1:0]), .ext(sticky_a), .sticky(st));

  exponent_adjust #(.AMT_W(CNT_W+1)) u_exp (.exp_ref(exp_ref), .amt(amt), .exp_out(exp_pre));

  ieee_round u_round (
    .sig    (shifted[ADD_W-1 -: SIG_W]),
    .rnd    (shifted[LOW_W]),
    .sticky (st),
    .exp_in (exp_pre),
    .sig_out(sig),
    .exp_out(exp_out)
  );

  assign lead_ok = shifted[ADD_W-1];
endmodule
