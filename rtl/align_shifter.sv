// align_shifter: addend inverter and 74-bit alignment shifter.
//
// The 24-bit addend significand (hidden one included) is first inverted when
// the operation is an effective subtraction, then placed in the most
// significant bits of a 74-bit field and shifted right by shamt (0..74).
// Bits shifted in at the top are copies of the inversion flag (0 when not
// inverted, 1 when inverted), which keeps the one's-complement sign
// extension. The field is extended by 24 positions below its LSB so that
// bits falling off the field are not simply lost: sticky reports whether
// any of them belongs to the significand (differs from the fill). The
// inversion and the right shift with sign-like fill follow the published
// design; the sticky output is this design's own addition, needed for
// correct rounding when the addend is far below the product.
// Purely combinational.
module align_shifter
  import fma_pkg::*;
#(
  parameter int unsigned W = 74
) (
  input  logic [SIG_W-1:0]   sig,
  input  logic               inv,
  input  logic [SHAMT_W-1:0] shamt,
  output logic [W-1:0]       aligned,
  output logic               sticky
);
  localparam int unsigned XW = W + SIG_W;   // field plus extension

  logic [SIG_W-1:0] sig_i;
  logic [XW-1:0]    ext, fill_mask, shifted;

  always_comb begin
    sig_i     = inv ? ~sig : sig;
    ext       = {sig_i, {(XW-SIG_W){inv}}};
    // positions vacated at the top by the shift
    fill_mask = ~({XW{1'b1}} >> shamt);
    shifted   = (ext >> shamt) | (inv ? fill_mask : '0);
    aligned   = shifted[XW-1 -: W];
    sticky    = |(shifted[SIG_W-1:0] ^ {SIG_W{inv}});
  end
endmodule
