// lza: leading-zero anticipator for the two operands of the final adder.
//
// Bits are numbered from the most significant end here (index 0 is the MSB,
// the sign position of the 75-bit sum), so that a position is also a shift
// amount; the strings are declared with ascending ranges for that reason,
// which lint tools note. For every position i, from the operand bits at i and at the less
// significant neighbour i+1:
//   p_i = x_i XOR y_i,  z_i = NOT x_i AND NOT y_i,  g_i = x_i AND y_i
//   pos[i] = p_i XNOR z_{i+1}   (string for a positive sum)
//   neg[i] = p_i XNOR g_{i+1}   (string for a negative sum)
// The first 1 of the string that matches the sign of the sum is at a
// position c such that the magnitude's leading one is at position c or c+1;
// the normalizer resolves the remaining one-bit uncertainty. The last
// position has no right neighbour; both strings are forced to 1 there, so
// that a count never points past the LSB. (Sums whose magnitude is 1 only
// through the adder's carry-in or the +1 of the negation, such as
// 0 + carry-in, would otherwise leave both strings empty.) The string
// equations are the published ones (after Lee and Nowka); the last
// position is this design's own choice. Purely combinational.
module lza #(
  parameter int unsigned W = 75
) (
  input  logic [W-1:0] x,     // conventional numbering, bit W-1 is the MSB
  input  logic [W-1:0] y,
  output logic [0:W-1] pos,   // index 0 is the MSB
  output logic [0:W-1] neg
);
  logic [0:W-1] xa, ya, p;
  logic [0:W]   z, g;

  always_comb begin
    xa = x;   // left-to-right copy: xa[0] = x[W-1]
    ya = y;
    for (int i = 0; i < W; i++) begin
      p[i] = xa[i] ^ ya[i];
      z[i] = ~xa[i] & ~ya[i];
      g[i] = xa[i] & ya[i];
    end
    z[W] = 1'b0;   // unused, the last position is forced below
    g[W] = 1'b0;
    for (int i = 0; i < W - 1; i++) begin
      pos[i] = ~(p[i] ^ z[i+1]);
      neg[i] = ~(p[i] ^ g[i+1]);
    end
    pos[W-1] = 1'b1;
    neg[W-1] = 1'b1;
  end
endmodule
