// Self-checking testbench of amul_row_adder at W = 64: an exact instance
// (APPROX_COLS = 0) against acc + pp, and approximate instances
// (APPROX_COLS = 8 and 20) against a word-level model: below column K the
// sum bit is acc ^ pp ^ (generate of the column below), and the part from
// column K up is an exact add with the generate of column K-1 as carry in.
// Random and directed operands, including long propagate runs.
module tb_amul_row_adder;

  localparam int unsigned W = 64;

  logic [W-1:0] acc, pp;
  logic [W-1:0] sum0, sum8, sum20;
  int checks = 0, failures = 0;
  int approx_differs = 0;

  amul_row_adder #(.W(W), .APPROX_COLS(0))  u_k0  (.acc, .pp, .sum(sum0));
  amul_row_adder #(.W(W), .APPROX_COLS(8))  u_k8  (.acc, .pp, .sum(sum8));
  amul_row_adder #(.W(W), .APPROX_COLS(20)) u_k20 (.acc, .pp, .sum(sum20));

  function automatic logic [W-1:0] model(input logic [W-1:0] a, input logic [W-1:0] b,
                                         input int k);
    logic [W-1:0] g, lo, hi, mask;
    if (k == 0) return a + b;
    g    = a & b;
    mask = (W'(1) << k) - 1;
    lo   = (a ^ b ^ (g << 1)) & mask;
    hi   = ((a >> k) + (b >> k) + W'(g[k-1])) << k;
    return lo | hi;
  endfunction

  task automatic run_one();
    #1;
    checks++;
    if (sum0 !== acc + pp) begin
      failures++;
      $display("FAIL exact %h + %h = %h got %h", acc, pp, acc + pp, sum0);
    end
    checks++;
    if (sum8 !== model(acc, pp, 8)) begin
      failures++;
      $display("FAIL K=8 %h + %h exp %h got %h", acc, pp, model(acc, pp, 8), sum8);
    end
    checks++;
    if (sum20 !== model(acc, pp, 20)) begin
      failures++;
      $display("FAIL K=20 %h + %h exp %h got %h", acc, pp, model(acc, pp, 20), sum20);
    end
    if (sum8 != acc + pp) approx_differs++;
  endtask

  initial begin
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    // Directed: carry rippling through every column, and no carries at all.
    acc = '1;              pp = 64'd1;  run_one();
    acc = 64'h00000000_000000ff; pp = 64'h1; run_one();
    acc = 64'h5555_5555_5555_5555; pp = 64'haaaa_aaaa_aaaa_aaaa; run_one();
    acc = '0; pp = '0; run_one();
    for (int n = 0; n < 5000; n++) begin
      acc = {$urandom, $urandom};
      pp  = {$urandom, $urandom};
      if (n % 4 == 1) pp = ~acc ^ W'($urandom_range(0, 255));
      run_one();
    end
    // The approximation must actually show on some inputs.
    checks++;
    if (approx_differs == 0) begin
      failures++;
      $display("FAIL approximate columns never changed a result");
    end
    $display("approximate K=8 sums differing from exact: %0d", approx_differs);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
