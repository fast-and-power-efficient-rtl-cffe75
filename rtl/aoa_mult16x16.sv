// 16x16 unsigned Array of Array multiplier (top of the design).
//
// A purely combinational multiplier organised as a hierarchy of identical
// stages. Each stage splits its operands in halves and forms four
// half-size products: two crosswise (a_lo*b_hi, a_hi*b_lo) and two vertical
// (a_lo*b_lo, a_hi*b_hi), as in the Urdhva Triyagbhyam sutra and the
// Karatsuba-Ofman split without its subtraction trick; three adders as wide
// as a sub-product then add the rows. Here four 8x8 blocks feed three 16-bit
// full adders; each 8x8 block is four 4x4 blocks and three 8-bit adders, and
// each 4x4 block is four 2x2 gate-level blocks and three 4-bit adders.
//
// Interface: a and b are the unsigned operands, p = a * b (32 bits), valid
// one combinational delay after the inputs settle; there is no clock.
// p[7:0] comes from the low vertical product, p[15:8] from the second
// adder and p[31:16] from the third, as in the source's 16x16 diagram.
module aoa_mult16x16 (
  input  logic [15:0] a,
  input  logic [15:0] b,
  output logic [31:0] p
);
  logic [15:0] cross_a, cross_b, vert_lo, vert_hi;

  vedic_8x8 u_cross_a (.a(a[7:0]),  .b(b[15:8]), .p(cross_a));
  vedic_8x8 u_cross_b (.a(a[15:8]), .b(b[7:0]),  .p(cross_b));
  vedic_8x8 u_vert_lo (.a(a[7:0]),  .b(b[7:0]),  .p(vert_lo));
  vedic_8x8 u_vert_hi (.a(a[15:8]), .b(b[15:8]), .p(vert_hi));

  aoa_combine #(.N(16)) u_comb (
    .cross_a(cross_a), .cross_b(cross_b),
    .vert_lo(vert_lo), .vert_hi(vert_hi),
    .p(p)
  );
endmodule
