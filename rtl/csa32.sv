// csa32: W-bit carry-save adder (a row of 3:2 counters, i.e. full adders).
//
// Reduces three W-bit vectors to two without carry propagation:
//   x + y + z = sum + 2*carry.
// carry[i] has weight 2^(i+1); the consumer shifts it. In the FMA this row
// adds the 48 least significant bits of the aligned addend to the sum and
// carry vectors of the multiplier (48 counters, as the published design
// states). Purely combinational.
module csa32 #(
  parameter int unsigned W = 48
) (
  input  logic [W-1:0] x,
  input  logic [W-1:0] y,
  input  logic [W-1:0] z,
  output logic [W-1:0] sum,
  output logic [W-1:0] carry
);
  always_comb begin
    sum   = x ^ y ^ z;
    carry = (x & y) | (x & z) | (y & z);
  end
endmodule
