// N-bit adder made of full adder cells ("4-bit full adder" of the 4x4
// block, "16 FA" of the 16x16 multiplier).
//
// WIDTH full_adder_cell instances in a ripple chain: cell i adds a[i], b[i]
// and the carry of cell i-1; cell 0 takes cin and the last cell's carry is
// cout. Purely combinational, delay grows linearly with WIDTH.
// The default width of 4 is the adder of the 4x4 block. The carry structure
// (plain ripple) is this design's choice: the source only says the rows are
// added with full adder cells.
module nbit_full_adder #(
  parameter int unsigned WIDTH = 4
) (
  input  logic [WIDTH-1:0] a,
  input  logic [WIDTH-1:0] b,
  input  logic             cin,
  output logic [WIDTH-1:0] sum,
  output logic             cout
);
  logic [WIDTH:0] carry;

  assign carry[0] = cin;

  for (genvar i = 0; i < WIDTH; i++) begin : g_cell
    full_adder_cell u_fa (
      .a   (a[i]),
      .b   (b[i]),
      .cin (carry[i]),
      .sum (sum[i]),
      .cout(carry[i+1])
    );
  end

  assign cout = carry[WIDTH];
endmodule
