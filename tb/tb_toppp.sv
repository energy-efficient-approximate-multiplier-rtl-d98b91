// End-to-end testbench of the approximate multiplier toppp at its default
// size (32 x 32 -> 64 bits, 8 approximate columns), no parameter overrides.
//
// Each product is checked two ways: bit for bit against the word-level
// reference model in amul_ref_pkg, and against the exact signed product,
// whose difference from p must lie in [0, 15 * 2**9): each of the 15 adder
// stages can only lose carries from its 8 approximate columns. The
// waveform example 15 x 15 = 225 is checked exactly. The test counts how
// often each mechanism occurred (every Booth digit, negative operands, an
// approximate result differing from the exact one, an approximate result
// equal to it) and counts a failure for any that never did.
module tb_toppp;
  import amul_ref_pkg::*;

  localparam int K = 8;

  logic [31:0] x, y;
  logic [63:0] p;
  int checks = 0, failures = 0;
  int digit_seen [5];
  int n_neg = 0, n_err = 0, n_exact = 0;

  toppp dut (.x, .y, .p);

  task automatic run_one();
    logic [63:0] exact, err;
    #1;
    for (int i = 0; i < 16; i++) digit_seen[booth_digit(y, i) + 2]++;
    if (x[31] || y[31]) n_neg++;
    exact = 64'(longint'($signed(x)) * longint'($signed(y)));
    err   = exact - p;
    checks++;
    if (p !== approx_mul(x, y, 32, K)) begin
      failures++;
      $display("FAIL model x=%h y=%h exp %h got %h", x, y, approx_mul(x, y, 32, K), p);
    end
    checks++;
    if (err >= 64'(15 * (1 << (K + 1)))) begin
      failures++;
      $display("FAIL error bound x=%h y=%h exact %h got %h", x, y, exact, p);
    end
    if (err != 0) n_err++;
    else          n_exact++;
  endtask

  initial begin
    #10000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    // Example shown in the waveforms: 15 x 15.
    x = 32'd15; y = 32'd15; run_one();
    checks++;
    if (p !== 64'd225) begin
      failures++;
      $display("FAIL 15 x 15 gave %0d", p);
    end
    x = 32'h8000_0000; y = 32'h8000_0000; run_one();
    x = 32'h7fff_ffff; y = 32'h8000_0001; run_one();
    x = 32'hffff_ffff; y = 32'hffff_ffff; run_one();
    x = 32'd0;         y = 32'hdead_beef; run_one();
    for (int n = 0; n < 20000; n++) begin
      x = $urandom;
      y = $urandom;
      if (n % 3 == 1) x = 32'($urandom_range(0, 65535));
      if (n % 5 == 2) y = 32'($urandom_range(0, 255));
      run_one();
    end
    $display("Booth digits -2/-1/0/+1/+2: %0d %0d %0d %0d %0d", digit_seen[0], digit_seen[1],
             digit_seen[2], digit_seen[3], digit_seen[4]);
    $display("negative operands: %0d, approximate: %0d, exact: %0d", n_neg, n_err, n_exact);
    for (int d = 0; d < 5; d++) begin
      checks++;
      if (digit_seen[d] == 0) begin
        failures++;
        $display("FAIL Booth digit %0d never occurred", d - 2);
      end
    end
    checks += 3;
    if (n_neg == 0)   begin failures++; $display("FAIL no negative operand"); end
    if (n_err == 0)   begin failures++; $display("FAIL approximation never changed p"); end
    if (n_exact == 0) begin failures++; $display("FAIL no product came out exact"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
