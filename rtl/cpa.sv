// cpa: W-bit compound carry-propagate adder (75 bits in the FMA).
//
// Produces both sums of the two operands, sum = x + y and
// sum_inc = x + y + 1 (modulo 2^W), as one compound adder: the upper output
// reuses the carries of the lower one plus an increment. In the FMA, x holds
// the aligned addend's upper bits (with the sign at bit W-1) above the 3:2
// row's sum vector and y holds the 3:2 row's carry vector. sum_inc is the
// result when the inverted addend's complement must be completed by +1;
// for a negative result the FMA keeps sum instead, whose bitwise inverse is
// then the exact magnitude, so no separate increment is needed after the
// complementer. The published design uses one standard adder here; the
// second output is this design's own choice. Both sums are behavioural '+'
// so that synthesis picks the adder structure. Purely combinational.
module cpa #(
  parameter int unsigned W = 75
) (
  input  logic [W-1:0] x,
  input  logic [W-1:0] y,
  output logic [W-1:0] sum,
  output logic [W-1:0] sum_inc
);
  always_comb begin
    sum     = x + y;
    sum_inc = sum + W'(1);
  end
endmodule
