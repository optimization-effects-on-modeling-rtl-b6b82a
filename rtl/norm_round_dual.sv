// norm_round_dual: normalization and rounding without a post-normalization
// shift.
//
// The leading-zero anticipation may be one position short. Instead of
// normalizing, rounding and then shifting once more, two complete
// normalize-and-round paths run side by side: one shifts by the LZD count,
// the other by the count plus one. A 2:1 multiplexer keeps the first when
// its shifted magnitude has its MSB set, the second otherwise. This
// duplication is the published speed optimization of the unit's last stage.
// Purely combinational.
module norm_round_dual
  import fma_pkg::*;
(
  input  logic [ADD_W-1:0] mag,
  input  logic [CNT_W-1:0] cnt,
  input  logic             sticky_a,
  input  exp_int_t         exp_ref,
  output logic [SIG_W-1:0] sig,
  output exp_int_t         exp_out
);
  logic [SIG_W-1:0] sig0, sig1;
  exp_int_t         exp0, exp1;
  logic             ok0, ok1;

  norm_round_path #(.EXTRA(0)) u_p0 (.mag(mag), .cnt(cnt), .sticky_a(sticky_a), .exp_ref(exp_ref),
                                     .sig(sig0), .exp_out(exp0), .lead_ok(ok0));
  norm_round_path #(.EXTRA(1)) u_p1 (.mag(mag), .cnt(cnt), .sticky_a(sticky_a), .exp_ref(exp_ref),
                                     .sig(sig1), .exp_out(exp1), .lead_ok(ok1));

  always_comb begin
    if (ok0) begin
      sig     = sig0;
      exp_out = exp0;
    end else begin
      sig     = sig1;
      exp_out = exp1;
    end
  end

  logic unused_ok1;
  assign unused_ok1 = ok1;
endmodule
