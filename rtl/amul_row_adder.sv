// One stage of the linear partial-product accumulator: W-bit adder built
// from a ripple chain of amul_fa cells.
//
// sum = acc + pp, modulo 2**W, where the cells of columns 0 .. APPROX_COLS-1
// are approximate (carry = generate only) and the cells above are exact. The
// carry into column 0 is 0 and the carry out of column W-1 is dropped, which
// is exact for two's-complement operands whose true sum fits in W bits.
// Following the published design, the multiplier chains one of these per partial
// product after the first; the split into exact and approximate columns is
// this design's own way of making the precision adjustable.
//
// Interface: acc, pp (W bits) in; sum (W bits) out. Combinational.
module amul_row_adder #(
  parameter int unsigned W           = 64,
  parameter int unsigned APPROX_COLS = 8
) (
  input  logic [W-1:0] acc,
  input  logic [W-1:0] pp,
  output logic [W-1:0] sum
);

  logic [W:0] c;

  assign c[0] = 1'b0;

  for (genvar k = 0; k < W; k++) begin : g_col
    amul_fa #(.APPROX(k < APPROX_COLS)) u_fa (
      .a   (acc[k]),
      .b   (pp[k]),
      .cin (c[k]),
      .s   (sum[k]),
      .cout(c[k+1])
    );
  end

  // c[W] is the carry out of the top column, discarded (modulo 2**W sum).
  logic unused_cout;
  assign unused_cout = c[W];

endmodule
