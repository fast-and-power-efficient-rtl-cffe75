// One-bit full adder cell: the cell the partial-product adders of the
// Array of Array multiplier are made of.
//
// sum = a xor b xor cin, cout = majority(a, b, cin). Purely combinational.
// The write-up names full adder cells but not how they are built, so this
// is the textbook sum/majority form.
module full_adder_cell (
  input  logic a,
  input  logic b,
  input  logic cin,
  output logic sum,
  output logic cout
);
  always_comb begin
    sum  = a ^ b ^ cin;
    cout = (a & b) | (a & cin) | (b & cin);
  end
endmodule
