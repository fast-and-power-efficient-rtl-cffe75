// 4x4 unsigned multiplier block built from four fundamental 2x2 blocks.
//
// Urdhva Triyagbhyam ("vertically and crosswise") on 2-bit digits: the
// operands are split into a = {a[3:2], a[1:0]} and b = {b[3:2], b[1:0]};
// two 2x2 blocks form the crosswise products a[1:0]*b[3:2] and
// a[3:2]*b[1:0], two form the vertical products a[1:0]*b[1:0] and
// a[3:2]*b[3:2], and three 4-bit full adders (aoa_combine) add the rows:
// p[1:0] comes from the low vertical product, p[3:2] from the second adder
// and p[7:4] from the third. Sub-block pairing and adder arrangement follow
// the source's 4x4 block diagram. Purely combinational.
module vedic_4x4 (
  input  logic [3:0] a,
  input  logic [3:0] b,
  output logic [7:0] p
);
  logic [3:0] cross_a, cross_b, vert_lo, vert_hi;

  vedic_2x2 u_cross_a (.a(a[1:0]), .b(b[3:2]), .p(cross_a));
  vedic_2x2 u_cross_b (.a(a[3:2]), .b(b[1:0]), .p(cross_b));
  vedic_2x2 u_vert_lo (.a(a[1:0]), .b(b[1:0]), .p(vert_lo));
  vedic_2x2 u_vert_hi (.a(a[3:2]), .b(b[3:2]), .p(vert_hi));

  aoa_combine #(.N(4)) u_comb (
    .cross_a(cross_a), .cross_b(cross_b),
    .vert_lo(vert_lo), .vert_hi(vert_hi),
    .p(p)
  );
endmodule
