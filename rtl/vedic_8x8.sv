// 8x8 unsigned multiplier block built from four 4x4 blocks.
//
// The same arrangement as the 4x4 block, one level up, on 4-bit digits:
// two 4x4 blocks form the crosswise products a[3:0]*b[7:4] and
// a[7:4]*b[3:0], two form the vertical products a[3:0]*b[3:0] and
// a[7:4]*b[7:4], and three 8-bit full adders (aoa_combine) add the rows:
// p[3:0] comes from the low vertical product, p[7:4] from the second adder
// and p[15:8] from the third. The source states only that the 8x8 block is
// structurally the 4x4 block with nibble inputs; the 8-bit adder width
// follows from that. Purely combinational.
module vedic_8x8 (
  input  logic [7:0]  a,
  input  logic [7:0]  b,
  output logic [15:0] p
);
  logic [7:0] cross_a, cross_b, vert_lo, vert_hi;

  vedic_4x4 u_cross_a (.a(a[3:0]), .b(b[7:4]), .p(cross_a));
  vedic_4x4 u_cross_b (.a(a[7:4]), .b(b[3:0]), .p(cross_b));
  vedic_4x4 u_vert_lo (.a(a[3:0]), .b(b[3:0]), .p(vert_lo));
  vedic_4x4 u_vert_hi (.a(a[7:4]), .b(b[7:4]), .p(vert_hi));

  aoa_combine #(.N(8)) u_comb (
    .cross_a(cross_a), .cross_b(cross_b),
    .vert_lo(vert_lo), .vert_hi(vert_hi),
    .p(p)
  );
endmodule
