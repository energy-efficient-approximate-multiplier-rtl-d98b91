// Radix-4 Booth partial-product generator.
//
// The N-bit multiplier y is split into N/2 overlapping triplets
// {y[2i+1], y[2i], y[2i-1]} (y[-1] = 0), each recoded to a digit in
// {-2, -1, 0, +1, +2}. Partial product i is that multiple of the N-bit
// multiplicand x, sign-extended to 2N bits and shifted left by 2i, so that
// the two's-complement sum of all N/2 rows is the exact signed product x*y.
// The negated multiplicand -x is formed once, by a true (N+1)-bit
// negation, and shared by all rows; no separate "+1" correction bits are
// needed downstream. Both operands are signed two's complement.
// Forming -x with an adder and selecting each row with a multiplexer
// follows the published design; the triplet grouping, sign extension and signed
// operands are this design's reading of it.
//
// Interface: x, y (N bits) in; spp[i] (2N bits each, i = 0 .. N/2-1) out.
// The low 2i bits of spp[i] are constant 0 by construction.
// Combinational. N must be even.
module amul_booth_ppg
  import amul_pkg::*;
#(
  parameter int unsigned N = 32
) (
  input  logic [N-1:0]                x,
  input  logic [N-1:0]                y,
  output logic [N/2-1:0][2*N-1:0]     spp
);

  localparam int unsigned NPP = N / 2;

  // -x at N+1 bits, so that -(-2**(N-1)) is representable.
  logic [N:0] x_ext;
  logic [N:0] inv_x;
  assign x_ext = {x[N-1], x};
  assign inv_x = ~x_ext + 1'b1;

  // y with the implicit y[-1] = 0 appended below bit 0.
  logic [N:0] y_ext;
  assign y_ext = {y, 1'b0};

  booth_digit_e digit [NPP];

  always_comb begin
    for (int i = 0; i < NPP; i++) begin
      logic [N+1:0]   mult;   // selected multiple, N+2 bits signed
      logic [2*N-1:0] row;
      digit[i] = booth_recode(y_ext[2*i +: 3]);
      unique case (digit[i])
        BOOTH_P1: mult = {x_ext[N], x_ext};
        BOOTH_P2: mult = {x_ext, 1'b0};
        BOOTH_M1: mult = {inv_x[N], inv_x};
        BOOTH_M2: mult = {inv_x, 1'b0};
        default:  mult = '0;
      endcase
      row    = {{(N-2){mult[N+1]}}, mult};
      spp[i] = row << (2 * i);
    end
  end

endmodule
