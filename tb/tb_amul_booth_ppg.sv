// Self-checking testbench of amul_booth_ppg at N = 32. Each partial product
// is compared with digit * x * 4**i worked out with signed integer
// arithmetic, where the Booth digit is -2*y[2i+1] + y[2i] + y[2i-1], and the
// sum of all rows is compared with the signed product x * y. Covers every
// digit value and the extreme operands.
module tb_amul_booth_ppg;

  localparam int unsigned N   = 32;
  localparam int unsigned NPP = N / 2;

  logic [N-1:0]            x, y;
  logic [NPP-1:0][2*N-1:0] spp;
  int checks = 0, failures = 0;
  int digit_seen [5];   // index digit + 2

  amul_booth_ppg #(.N(N)) dut (.x, .y, .spp);

  task automatic run_one();
    longint xs, ys, exp_row, total;
    logic [N:0] ye;
    #1;
    xs = longint'($signed(x));
    ys = longint'($signed(y));
    ye = {y, 1'b0};
    total = 0;
    for (int i = 0; i < NPP; i++) begin
      int d;
      d = -2 * int'(ye[2*i+2]) + int'(ye[2*i+1]) + int'(ye[2*i]);
      digit_seen[d+2]++;
      exp_row = longint'(d) * xs * (longint'(1) << (2 * i));
      checks++;
      if (spp[i] !== 64'(exp_row)) begin
        failures++;
        $display("FAIL row %0d x=%h y=%h exp %h got %h", i, x, y, 64'(exp_row), spp[i]);
      end
      total += longint'(spp[i]);
    end
    checks++;
    if (total != xs * ys) begin
      failures++;
      $display("FAIL sum x=%h y=%h exp %0d got %0d", x, y, xs * ys, total);
    end
  endtask

  initial begin
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    automatic logic [N-1:0] corners [6] = '{32'h0, 32'h1, 32'hffff_ffff, 32'h8000_0000,
                                  32'h7fff_ffff, 32'd15};
    foreach (corners[a]) foreach (corners[b]) begin
      x = corners[a]; y = corners[b]; run_one();
    end
    for (int n = 0; n < 3000; n++) begin
      x = $urandom; y = $urandom; run_one();
    end
    for (int d = 0; d < 5; d++) begin
      checks++;
      if (digit_seen[d] == 0) begin
        failures++;
        $display("FAIL Booth digit %0d never occurred", d - 2);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
