// compressor42: one bit slice of a 4:2 compressor.
//
// Adds four bits of equal weight and a carry in from the slice below:
//   x[0]+x[1]+x[2]+x[3]+cin = sum + 2*(carry + cout).
// It is built from two full adders. cout depends only on x[0..2], so when
// slices are chained (cout -> cin of the next slice) there is no ripple: the
// delay of a row is that of two full adders whatever its width. The
// multiplier tree of the FMA is made of rows of these slices. Purely
// combinational.
module compressor42 (
  input  logic [3:0] x,
  input  logic       cin,
  output logic       sum,
  output logic       carry,
  output logic       cout
);
  logic s1;
  always_comb begin
    // first full adder: x0 + x1 + x2
    s1    = x[0] ^ x[1] ^ x[2];
    cout  = (x[0] & x[1]) | (x[0] & x[2]) | (x[1] & x[2]);
    // second full adder: s1 + x3 + cin
    sum   = s1 ^ x[3] ^ cin;
    carry = (s1 & x[3]) | (s1 & cin) | (x[3] & cin);
  end
endmodule
