# Approximate Booth multiplier with adjustable precision

A 32 x 32 -> 64-bit signed multiplier that gives up exactness in the
low-order bits of the product to shorten its carry chains. It is meant for
error-tolerant work (signal, image and neural-network processing) where a
product that is slightly too small in its last few bits is acceptable. The
precision is set by one parameter, `APPROX_COLS`: the number of low-order
columns in which the adders are approximate. `APPROX_COLS = 0` gives an
exact multiplier. The default of 8 keeps the error of a 64-bit product
below 7,680 (91 on average over random operands).

The design is purely combinational: `p` follows `x` and `y` after one
propagation delay. It has no clock, reset or handshake.

## How a product is formed

```
 x ─┬─► negate (-x) ─┐
    └────────────────┤
 y ──► Booth recode ─┴─► 16 partial products spp[0..15] (64 bits each)

 prod1[0] = spp[0]
 prod1[i] = prod1[i-1] + spp[i]      i = 1..15, one 64-bit ripple adder each
 p        = prod1[15]
```

1. **Booth recoding** (`amul_booth_ppg`). `y` is cut into 16 overlapping
   three-bit groups `{y[2i+1], y[2i], y[2i-1]}`, with `y[-1] = 0`. Each group
   becomes a digit `d_i = -2*y[2i+1] + y[2i] + y[2i-1]` in {-2, -1, 0, +1, +2}.
   Then `y = sum(d_i * 4**i)` for signed `y`. Row `i` is `d_i * x`: one of
   0, x, 2x, -x or -2x. It is sign-extended to 64 bits and shifted left by
   `2i`. The negated operand `-x` is formed once, by a true 33-bit negation
   (so that `-(-2**31)` fits), and all rows share it. Rows therefore carry
   no separate "+1" correction bits. The 16 rows add up exactly to `x * y`.

2. **Linear accumulation** (`amul_row_adder`, instances `g_abc[1..15]`).
   The rows are added one at a time, not in a tree. Each stage is a full
   64-bit ripple-carry adder built from one-bit cells. There is no final
   carry-lookahead adder: the output of the 15th stage is the product. The
   carry out of bit 63 is dropped, which is correct two's-complement
   arithmetic modulo 2**64.

3. **Approximate columns** (`amul_fa`). In every stage, the cells of
   columns `0 .. APPROX_COLS-1` are approximate and the cells above are
   exact. The approximate cell computes the sum bit exactly
   (`s = a ^ b ^ cin`), but its carry is only the generate term
   (`cout = a & b`). An incoming carry is absorbed into the sum bit and
   never passed on, so no carry ripples through an approximate column.

   | a b cin | exact s cout | approximate s cout | error |
   |---------|--------------|--------------------|-------|
   | 0 0 x   | same         | same               | 0     |
   | 1 1 x   | same         | same               | 0     |
   | 0 1 0 / 1 0 0 | 1 0    | 1 0                | 0     |
   | 0 1 1 / 1 0 1 | 0 1    | 0 **0**            | -2    |

## Error behaviour

This is the part of the design that needs the most care when it is used.

- **One-sided.** A carry can only be lost, never invented. So the
  approximate product is never larger than the exact one:
  `0 <= x*y - p` (as 64-bit two's-complement values).
- **Bounded.** In one stage, a carry lost from column `k` costs
  `2**(k+1)`. At most one carry is lost per column, so a stage loses less
  than `2**(APPROX_COLS+1)`. Over 15 stages the error is below
  `15 * 2**(APPROX_COLS+1)`. For the default of 8 that is 7,680, so the
  product is off by less than 2**13.
- **Input-dependent.** A carry is lost only where the running sum and the
  row differ in a bit and a carry arrives at that column. Small operands
  whose partial products do not overlap in the low columns come out exact.
  For example, 15 x 15 = 225 is exact at the default setting. (8 is the
  largest `APPROX_COLS` for which this is so.)
- **Measured mean error.** Over 4,000 random signed 32-bit operand pairs:

  | APPROX_COLS | mean (x*y - p) |
  |-------------|----------------|
  | 0           | 0              |
  | 4           | 0.84           |
  | 8           | 91             |
  | 16          | 7.2e4          |
  | 32          | 1.1e10         |

  The error relative to a typical product (~1e18 for random 32-bit
  operands) stays tiny even at 16 columns. It is larger relative to small
  products, and can flip the sign of a product that is close to zero.

## Interface

| port | dir | width | meaning |
|------|-----|-------|---------|
| `x`  | in  | `N` (32)   | multiplicand, signed two's complement |
| `y`  | in  | `N` (32)   | multiplier, signed two's complement |
| `p`  | out | `2N` (64)  | approximate product |

| parameter | default | meaning |
|-----------|---------|---------|
| `N`           | 32 | operand width; must be even |
| `APPROX_COLS` | 8  | low-order columns with approximate cells in every adder stage (0 = exact, up to 2N) |

Operands are signed. To multiply unsigned values of up to 31 bits, clear
the top bit. A full 32-bit unsigned product would need a 17th Booth row,
which this design does not have.

## Modules

| file | module | role |
|------|--------|------|
| `rtl/amul_pkg.sv`       | `amul_pkg`       | Booth digit enum and recoding function |
| `rtl/amul_fa.sv`        | `amul_fa`        | one-bit exact or approximate full adder |
| `rtl/amul_row_adder.sv` | `amul_row_adder` | 64-bit ripple adder of `amul_fa` cells, approximate below `APPROX_COLS` |
| `rtl/amul_booth_ppg.sv` | `amul_booth_ppg` | radix-4 Booth recoding and the 16 partial products |
| `rtl/toppp.sv`          | `toppp`          | the multiplier: generator plus 15 chained adder stages |

## How the design relates to its source, and what is assumed

The source publication for this multiplier fixes the following: the
interface (`x[31:0]`, `y[31:0]`, `p[63:0]`), the top module name, and the
use of approximate full adders to sum partial products. Its reported
implementation also shows the following structure: a shared negated
multiplicand, 16 multiplexed signed partial products, a chain of 15 adders,
and one cell per bit with an XOR sum. The same implementation used 128 I/O
pins, which matches the ports here (32 + 32 + 64).

The following are this design's own choices, because the source does not
specify them:

- **Signed operands.** Sixteen radix-4 rows are exact only for signed
  32-bit operands.
- **The approximate cell's truth table.** The source says it evaluated
  four different approximate full adders but does not define them. Only the
  single cell above is provided.
- **How precision is made adjustable.** Here it is a design-time count of
  approximate columns. There is no run-time precision input, since the
  published interface has only `x`, `y` and `p`.
- **`APPROX_COLS = 8` as the default.** This is the largest value that keeps
  the published example, 15 x 15 = 225, exact.
- **No pipeline registers, clock or reset.** The design is a single
  combinational path from the inputs to the product.

The area, delay and power figures reported for the original FPGA
implementation (about 2,000 LUTs, 35 ns, 300 mW) belong to that netlist
and device. They have not been reproduced.

## Simulating

Every testbench is self-checking and ends with a line
`TB_RESULT checks=<n> failures=<m>`. Build and run one with Verilator 5,
for example the end-to-end test at full size:

```
verilator --binary --timing --assert --top-module tb_toppp \
  -y rtl -y tb +libext+.sv rtl/amul_pkg.sv tb/amul_ref_pkg.sv tb/tb_toppp.sv
./obj_dir/Vtb_toppp
```

| testbench | what it checks |
|-----------|----------------|
| `tb/tb_amul_fa.sv`        | both cell types, all 8 input combinations |
| `tb/tb_amul_row_adder.sv` | 64-bit stage with 0, 8 and 20 approximate columns, directed and random |
| `tb/tb_amul_booth_ppg.sv` | every row against `d_i * x * 4**i`, row sum against `x*y`, every digit value |
| `tb/tb_toppp.sv`          | default build: 20,000+ products, bit-exact against a reference model and within the error bound; 15 x 15 = 225 |
| `tb/tb_toppp_prec.sv`     | builds with 0/4/8/16/32 approximate columns (0 must be exact, mean error must grow with the count); an 8-bit build checked exhaustively |

`tb/amul_ref_pkg.sv` is the reference model that the two multiplier tests
use. It is written with word operations, not bit cells. In it, an
approximate stage with `K = APPROX_COLS` is the exact sum of the bits from column `K` up, with
the generate of column `K-1` as carry-in. Below that, the sum is
`a ^ b ^ ((a & b) << 1)`.

## Changing it

- **Precision:** set `APPROX_COLS` on `toppp`. The reference model and the
  error bound in the testbenches take the same count.
- **Width:** set `N` (even). The partial-product count `N/2` and the stage
  count `N/2 - 1` follow from it.
- **A different approximate cell:** change the `APPROX` branch of
  `amul_fa`, then update `approx_add` in `tb/amul_ref_pkg.sv`. The error
  bound in the tests holds only for cells that can lose value but never
  add it, like the current one.
