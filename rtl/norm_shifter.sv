// norm_shifter: normalization left shifter.
//
// Shifts the W-bit magnitude left by amt positions (zeros enter at the LSB);
// a count of W or more gives zero. With the count from the leading-zero
// detector the leading one of the magnitude lands at bit W-1 or, when the
// anticipation was one short, at bit W-2. Purely combinational.
module norm_shifter #(
  parameter int unsigned W  = 75,
  parameter int unsigned CW = 8
) (
  input  logic [W-1:0]  x,
  input  logic [CW-1:0] amt,
  output logic [W-1:0]  y
);
  assign y = x << amt;
endmodule
