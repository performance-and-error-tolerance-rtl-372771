// tb_lsz_detector: exhaustive check of the least-significant-zero detector
// for K = 10 against a bit-by-bit reference.
module tb_lsz_detector;
  localparam int K = 10;
  logic [K-1:0] n;
  logic [3:0]   idx;
  logic         none;
  int checks = 0, failures = 0;

  lsz_detector #(.K(K)) dut (.n, .idx, .none);

  initial begin : watchdog
    #1000000;
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int exp_idx;
    for (int v = 0; v < (1 << K); v++) begin
      n = K'(v);
      #1;
      exp_idx = -1;
      for (int b = 0; b < K; b++) if (exp_idx < 0 && ((v >> b) & 1) == 0) exp_idx = b;
      checks++;
      if (exp_idx < 0) begin
        if (!none) begin failures++; $display("FAIL n=%0d none", v); end
      end else if (none || idx != 4'(exp_idx)) begin
        failures++;
        $display("FAIL n=%0d idx=%0d exp=%0d", v, idx, exp_idx);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
