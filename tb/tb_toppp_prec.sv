// Precision sweep of toppp: the same multiplier built with 0, 4, 8, 16 and
// 32 approximate columns at N = 32, plus an N = 8 build with 4 approximate
// columns checked exhaustively over all 65,536 operand pairs.
//
// APPROX_COLS = 0 must give the exact signed product. Every other build is
// checked bit for bit against the word-level model in amul_ref_pkg and
// against the error bound 0 <= exact - p < (N/2 - 1) * 2**(K+1). The mean
// absolute error over the shared random operands must grow with K, which
// is what makes the precision adjustable; a failure is counted if it does
// not.
module tb_toppp_prec;
  import amul_ref_pkg::*;

  localparam int NK = 5;
  localparam int KS [NK] = '{0, 4, 8, 16, 32};

  logic [31:0] x, y;
  logic [63:0] p [NK];
  logic [7:0]  x8, y8;
  logic [15:0] p8;
  int checks = 0, failures = 0;
  real err_sum [NK];
  int  n_samples = 0;

  for (genvar j = 0; j < NK; j++) begin : g_k
    toppp #(.N(32), .APPROX_COLS(KS[j])) u_mul (.x, .y, .p(p[j]));
  end

  toppp #(.N(8), .APPROX_COLS(4)) u_mul8 (.x(x8), .y(y8), .p(p8));

  initial begin
    #10000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    foreach (err_sum[j]) err_sum[j] = 0.0;
    x8 = '0;
    y8 = '0;
    for (int n = 0; n < 4000; n++) begin
      logic [63:0] exact;
      x = $urandom;
      y = $urandom;
      #1;
      n_samples++;
      exact = 64'(longint'($signed(x)) * longint'($signed(y)));
      for (int j = 0; j < NK; j++) begin
        logic [63:0] err;
        err = exact - p[j];
        checks++;
        if (p[j] !== approx_mul(x, y, 32, KS[j])) begin
          failures++;
          $display("FAIL K=%0d x=%h y=%h exp %h got %h", KS[j], x, y,
                   approx_mul(x, y, 32, KS[j]), p[j]);
        end
        checks++;
        if (KS[j] == 0 ? (err != 0) : (err >= 64'(15) << (KS[j] + 1))) begin
          failures++;
          $display("FAIL bound K=%0d x=%h y=%h exact %h got %h", KS[j], x, y, exact, p[j]);
        end
        err_sum[j] += real'(err);
      end
    end
    for (int j = 0; j < NK; j++)
      $display("APPROX_COLS=%0d mean error %g", KS[j], err_sum[j] / n_samples);
    for (int j = 1; j < NK; j++) begin
      checks++;
      if (!(err_sum[j] > err_sum[j-1])) begin
        failures++;
        $display("FAIL mean error does not grow from K=%0d to K=%0d", KS[j-1], KS[j]);
      end
    end

    // N = 8, exhaustive.
    for (int a = 0; a < 256; a++) begin
      for (int b = 0; b < 256; b++) begin
        logic [15:0] exact8, err8;
        x8 = 8'(a);
        y8 = 8'(b);
        #1;
        exact8 = 16'(int'($signed(x8)) * int'($signed(y8)));
        err8   = exact8 - p8;
        checks++;
        if (p8 !== 16'(approx_mul(32'(x8), 32'(y8), 8, 4))) begin
          failures++;
          $display("FAIL N=8 x=%h y=%h exp %h got %h", x8, y8,
                   16'(approx_mul(32'(x8), 32'(y8), 8, 4)), p8);
        end
        checks++;
        if (err8 >= 16'(3 * 32)) begin
          failures++;
          $display("FAIL N=8 bound x=%h y=%h exact %h got %h", x8, y8, exact8, p8);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
