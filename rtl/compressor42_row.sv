// compressor42_row: W-bit row of 4:2 compressor slices.
//
// Reduces four W-bit vectors to a sum vector and a carry vector with
//   x0 + x1 + x2 + x3 = sum + carry   (mod 2^W).
// The carry vector is already shifted to its weight (carry[0] is 0). The
// slice carry-out chain runs across the row; the carry-out of the top slice
// and the top carry bit are dropped, which is exact whenever the true total
// is below 2^W. Purely combinational.
module compressor42_row #(
  parameter int unsigned W = 48
) (
  input  logic [W-1:0] x0,
  input  logic [W-1:0] x1,
  input  logic [W-1:0] x2,
  input  logic [W-1:0] x3,
  output logic [W-1:0] sum,
  output logic [W-1:0] carry
);
  logic [W:0] chain;   // chain[i] is the cin of slice i
  logic [W-1:0] cy;

  assign chain[0] = 1'b0;

  for (genvar i = 0; i < W; i++) begin : g_slice
    compressor42 u_c (
      .x    ({x3[i], x2[i], x1[i], x0[i]}),
      .cin  (chain[i]),
      .sum  (sum[i]),
      .carry(cy[i]),
      .cout (chain[i+1])
    );
  end

  assign carry = {cy[W-2:0], 1'b0};

  // chain[W] and cy[W-1] carry weight 2^W and are dropped by design.
  logic unused_top;
  assign unused_top = chain[W] ^ cy[W-1];
endmodule
