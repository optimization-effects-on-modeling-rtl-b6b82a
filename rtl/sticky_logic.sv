// sticky_logic: sticky bit of the normalized significand.
//
// OR of all W bits below the round bit, together with the sticky flag of the
// addend bits that fell out of the alignment field (ext). The sticky bit is
// 1 exactly when some nonzero bit lies below the round position, as the
// published design defines it. Purely combinational.
module sticky_logic #(
  parameter int unsigned W = 50
) (
  input  logic [W-1:0] bits,
  input  logic         ext,
  output logic         sticky
);
  assign sticky = (|bits) | ext;
endmodule
