// complementer: magnitude of the adder result by inversion.
//
// When the result is negative (neg set by the stage-2 sign logic) every bit
// is inverted; otherwise the value passes unchanged. This is exact because
// for a negative result stage 2 hands over x + y without the +1 that
// completes the addend's two's complement: the true sum is x + y + 1, and
// its negation -(x + y + 1) equals NOT(x + y). As in the published design
// the unit is only a row of inverters acting on negative results.
// Purely combinational.
module complementer #(
  parameter int unsigned W = 75
) (
  input  logic [W-1:0] x,
  input  logic         neg,
  output logic [W-1:0] mag
);
  assign mag = neg ? ~x : x;
endmodule
