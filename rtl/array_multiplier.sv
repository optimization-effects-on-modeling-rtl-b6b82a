// array_multiplier: N x N unsigned significand multiplier with a
// carry-save result.
//
// Partial products come from an AND array (no Booth recoding): row j is
// x AND y[j], shifted left by j. A tree of 4:2 compressor rows (pp_tree)
// reduces the N rows to a sum and a carry vector of 2N bits each, with
// sum + carry = x * y exactly. No carry-propagate adder is used here: the FMA
// adds the addend to these two vectors in a 3:2 row and propagates carries
// only once, in its final adder. Because every partial product is
// non-negative and the true product is below 2^(2N), neither output vector
// can have a bit at or above 2^(2N), so truncating the tree to 2N bits loses
// nothing. Purely combinational.
//
// The AND array, the absence of Booth recoding and the 4:2 tree follow the
// published design; the grouping of rows in the tree is this design's own.
module array_multiplier #(
  parameter int unsigned N = 24
) (
  input  logic [N-1:0]   x,
  input  logic [N-1:0]   y,
  output logic [2*N-1:0] sum,
  output logic [2*N-1:0] carry
);
  logic [N-1:0][2*N-1:0] pp;

  always_comb begin
    for (int j = 0; j < N; j++) begin
      pp[j] = (2*N)'(x & {N{y[j]}}) << j;
    end
  end

  pp_tree #(.ROWS(N), .W(2*N)) u_tree (.rows(pp), .sum(sum), .carry(carry));
endmodule
