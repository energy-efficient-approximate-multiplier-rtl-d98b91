// Self-checking testbench of amul_fa: all eight input combinations of the
// exact cell and of the approximate cell, against truth tables worked out
// from arithmetic (a + b + cin for the exact cell; exact sum bit and
// generate-only carry for the approximate one).
module tb_amul_fa;

  logic a, b, cin;
  logic s_ex, co_ex, s_ap, co_ap;
  int   checks = 0, failures = 0;

  amul_fa #(.APPROX(1'b0)) u_exact  (.a, .b, .cin, .s(s_ex), .cout(co_ex));
  amul_fa #(.APPROX(1'b1)) u_approx (.a, .b, .cin, .s(s_ap), .cout(co_ap));

  task automatic check(input string what, input logic got, input logic exp);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s a=%0d b=%0d cin=%0d got=%0d exp=%0d", what, a, b, cin, got, exp);
    end
  endtask

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    automatic int approx_err = 0;
    for (int v = 0; v < 8; v++) begin
      int total;
      {a, b, cin} = 3'(v);
      #1;
      total = int'(a) + int'(b) + int'(cin);
      check("exact s",     s_ex,  1'(total % 2));
      check("exact cout",  co_ex, 1'(total / 2));
      check("approx s",    s_ap,  1'(total % 2));
      check("approx cout", co_ap, 1'((int'(a) + int'(b)) / 2));
      if ((int'(s_ap) + 2 * int'(co_ap)) != total) approx_err++;
    end
    // The approximate cell must err exactly in the two cases a^b & cin.
    checks++;
    if (approx_err != 2) begin
      failures++;
      $display("FAIL approximate cell erred in %0d cases, expected 2", approx_err);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
