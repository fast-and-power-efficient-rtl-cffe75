// Fundamental 2x2 unsigned multiplier block of the Array of Array multiplier.
//
// Four two-level gate equations, as obtained from a K-map of the 2x2
// multiplication truth table:
//   p[0] = a0 b0
//   p[1] = a0 b1 xor a1 b0
//   p[2] = a1 b1 and not (a0 b0)
//   p[3] = a1 b1 and a0 b0
// p[0..2] are the K-map equations of the source. For p[3] the product is
// 1xxx only for 3 x 3, so it needs all four input bits; a1 b1 alone would
// also fire for 2 x 2 = 0100. This form follows the 2x2 truth table.
// Purely combinational.
module vedic_2x2 (
  input  logic [1:0] a,
  input  logic [1:0] b,
  output logic [3:0] p
);
  logic lo, hi;

  always_comb begin
    lo   = a[0] & b[0];
    hi   = a[1] & b[1];
    p[0] = lo;
    p[1] = (a[0] & b[1]) ^ (a[1] & b[0]);
    p[2] = hi & ~lo;
    p[3] = hi & lo;
  end
endmodule
