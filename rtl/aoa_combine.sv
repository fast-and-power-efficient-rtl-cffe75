// Partial-product adder of one Array of Array stage: joins the four
// half-size products of an N x N block into its 2N-bit product.
//
// Operands are split in halves of H = N/2 bits, a = {a1, a0}, b = {b1, b0}.
// The four sub-block products (each N bits) are
//   cross_a = a0 * b1, cross_b = a1 * b0   (Urdhva crosswise terms)
//   vert_lo = a0 * b0, vert_hi = a1 * b1   (Urdhva vertical terms)
// and the product is vert_hi * 2^N + (cross_a + cross_b) * 2^H + vert_lo.
// Three N-bit adders do this, as in the 4x4 and 16x16 block diagrams:
//   adder 1: cross_a + cross_b                          -> s1, carry cy1
//   adder 2: s1 + {H zeros, vert_lo[N-1:H]}             -> t,  carry cy2
//   adder 3: vert_hi + {H-1 zeros, cy1|cy2, t[N-1:H]}   -> p[2N-1:N]
// p[H-1:0] comes straight from vert_lo and p[N+H-1:H] from t[H-1:0]; the
// carry out of adder 3 is never set and is left unused, as in the diagrams.
// The diagrams feed the carry of adder 1 into adder 3 without showing at
// which bit; its weight is 2^(N+H), the same bit the carry of adder 2 lands
// on. The two are never 1 together: each cross term is at most (2^H-1)^2,
// so if cy1 is set then s1 <= 2^N - 2^(H+2) + 2, and adding
// vert_lo[N-1:H] < 2^H cannot reach 2^N. They are therefore merged with an
// OR, which is this design's choice of how to place that carry.
// Purely combinational.
module aoa_combine #(
  parameter int unsigned N = 4
) (
  input  logic [N-1:0]   cross_a,
  input  logic [N-1:0]   cross_b,
  input  logic [N-1:0]   vert_lo,
  input  logic [N-1:0]   vert_hi,
  output logic [2*N-1:0] p
);
  localparam int unsigned H = N / 2;

  logic [N-1:0] s1, t, op2, op3;
  logic         cy1, cy2, unused_cout;

  nbit_full_adder #(.WIDTH(N)) u_add1 (
    .a(cross_a), .b(cross_b), .cin(1'b0), .sum(s1), .cout(cy1)
  );

  assign op2 = {{H{1'b0}}, vert_lo[N-1:H]};

  nbit_full_adder #(.WIDTH(N)) u_add2 (
    .a(s1), .b(op2), .cin(1'b0), .sum(t), .cout(cy2)
  );

  assign op3 = {{(H-1){1'b0}}, cy1 | cy2, t[N-1:H]};

  nbit_full_adder #(.WIDTH(N)) u_add3 (
    .a(vert_hi), .b(op3), .cin(1'b0), .sum(p[2*N-1:N]), .cout(unused_cout)
  );

  assign p[H-1:0] = vert_lo[H-1:0];
  assign p[N-1:H] = t[H-1:0];

  // The OR above relies on the two carries being exclusive.
  always_comb begin
    assert (!(cy1 && cy2))
      else $error("aoa_combine: carries of adders 1 and 2 set together");
  end
endmodule
