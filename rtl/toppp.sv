// Approximate signed multiplier, N x N -> 2N bits, with adjustable precision.
//
// p = x * y, computed in three steps:
//   1. amul_booth_ppg recodes y into N/2 radix-4 Booth digits and forms the
//      N/2 partial products, each sign-extended to 2N bits.
//   2. A linear chain of N/2 - 1 amul_row_adder stages adds them one at a
//      time: stage 1 adds rows 0 and 1, stage i adds row i to the running
//      sum of stage i-1. The running sum of the last stage is p.
//   3. There is no separate final adder: every stage is a full carry-
//      propagate (ripple) adder.
// In every stage the low APPROX_COLS columns use approximate full-adder
// cells that do not propagate an incoming carry; the upper columns are
// exact. APPROX_COLS = 0 gives the exact product, larger values trade
// accuracy in the low-order bits for shorter carry chains. The error is
// never positive: each stage can only lose carries, so p <= x*y (as signed
// 2N-bit values, barring wrap-around near the most negative product).
//
// Following the published design: the ports x[N-1:0], y[N-1:0], p[2N-1:0] with
// N = 32, the module name, the Booth partial products and the chain of
// N/2 - 1 ripple adders built from per-bit cells. This design's own
// choices: signed operands, the approximate cell's truth table and
// APPROX_COLS = 8 as its default (which keeps 15 x 15 = 225 exact).
//
// Timing: purely combinational, no clock or reset; p is valid one
// propagation delay after x and y settle.
module toppp #(
  parameter int unsigned N           = 32,
  parameter int unsigned APPROX_COLS = 8
) (
  input  logic [N-1:0]   x,
  input  logic [N-1:0]   y,
  output logic [2*N-1:0] p
);

  localparam int unsigned NPP = N / 2;

  logic [NPP-1:0][2*N-1:0] spp;
  // prod1[i] is the running sum after stage i; prod1[0] is row 0 itself.
  logic [NPP-1:0][2*N-1:0] prod1;

  amul_booth_ppg #(.N(N)) u_ppg (
    .x  (x),
    .y  (y),
    .spp(spp)
  );

  assign prod1[0] = spp[0];

  for (genvar i = 1; i < NPP; i++) begin : g_abc
    amul_row_adder #(.W(2*N), .APPROX_COLS(APPROX_COLS)) u_add (
      .acc(prod1[i-1]),
      .pp (spp[i]),
      .sum(prod1[i])
    );
  end

  assign p = prod1[NPP-1];

endmodule
