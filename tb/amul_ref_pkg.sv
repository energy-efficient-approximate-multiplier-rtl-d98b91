// Reference model of the approximate Booth multiplier for the testbenches,
// written at word level independently of the RTL's bit cells.
//   booth_digit : radix-4 digit i of y, -2*y[2i+1] + y[2i] + y[2i-1].
//   approx_add  : sum of two 64-bit words in which columns below k keep only
//                 the carry generated in the column below (a & b), and the
//                 columns from k up add exactly.
//   approx_mul  : signed x * y as N/2 Booth rows summed left to right with
//                 approx_add, the way the multiplier's adder chain does.
package amul_ref_pkg;

  function automatic int booth_digit(input logic [31:0] y, input int i);
    logic [32:0] ye;
    ye = {y, 1'b0};
    return -2 * int'(ye[2*i+2]) + int'(ye[2*i+1]) + int'(ye[2*i]);
  endfunction

  function automatic logic [63:0] approx_add(input logic [63:0] a, input logic [63:0] b,
                                             input int k);
    logic [63:0] g, lo, hi, mask;
    if (k == 0) return a + b;
    g    = a & b;
    mask = (64'd1 << k) - 1;
    lo   = (a ^ b ^ (g << 1)) & mask;
    hi   = ((a >> k) + (b >> k) + 64'(g[k-1])) << k;
    return lo | hi;
  endfunction

  // n is the operand width (even, at most 32); x and y are its low n bits.
  function automatic logic [63:0] approx_mul(input logic [31:0] x, input logic [31:0] y,
                                             input int n, input int k);
    logic [63:0] acc, row, mask;
    longint xs;
    logic [31:0] ysx;
    mask = (n == 32) ? '1 : ((64'd1 << (2 * n)) - 1);
    xs   = longint'($signed(x << (32 - n))) >>> (32 - n);
    ysx  = 32'($signed(y << (32 - n)) >>> (32 - n));
    acc  = '0;
    for (int i = 0; i < n / 2; i++) begin
      row = 64'(longint'(booth_digit(ysx, i)) * xs * (longint'(1) << (2 * i))) & mask;
      acc = (i == 0) ? row : (approx_add(acc, row, k) & mask);
    end
    return acc;
  endfunction

endpackage
