// One-bit full-adder cell of the partial-product summation, exact or
// approximate.
//
// The multiplier sums its partial products with chains of these cells; the
// cell type chosen for the low-order columns sets the precision of the whole
// multiplier. With APPROX = 0 the cell is an exact full adder. With APPROX = 1
// the sum is still the exact three-input XOR, but the carry is only the
// generate term a & b: a carry arriving at cin is never passed on. This
// removes the carry-propagation path through the cell (the carry chain is cut
// at every approximate column) at the cost of an error of -2 (in units of the
// column weight) whenever exactly one of a, b is 1 and cin is 1; it never
// errs when cin is 0. Using approximate full adders in the summation follows
// the published design; this particular approximate cell is this design's
// own choice, because the published design does not give the truth table of
// its approximate adders.
//
// Interface: a, b, cin in; s, cout out. Purely combinational, no clock.
module amul_fa #(
  parameter bit APPROX = 1'b0
) (
  input  logic a,
  input  logic b,
  input  logic cin,
  output logic s,
  output logic cout
);

  always_comb begin
    s = a ^ b ^ cin;
    if (APPROX) cout = a & b;
    else        cout = (a & b) | (cin & (a ^ b));
  end

endmodule
