// tb_sobol_rns: checks the Sobol generator for dimensions 0 (van der
// Corput: output = bit-reversed Gray code of the index) and 1 (direction
// numbers 512, 768, 640, 960, 544, 816, 680, 1020, 514, 771, the published
// values of the second Sobol dimension), point by point over a full period
// of 1024, and that dimensions 0..7 each give a permutation of 0..1023.
module tb_sobol_rns;
  localparam int K = 10;
  logic clk = 1'b0, rst_n = 1'b0, load = 1'b0, en = 1'b0;
  logic [K-1:0] r [8];
  int checks = 0, failures = 0;

  for (genvar d = 0; d < 8; d++) begin : g_d
    sobol_rns #(.K(K), .DIM(d)) dut (.clk, .rst_n, .load, .en, .r(r[d]));
  end

  always #5 clk = ~clk;

  localparam int V1 [10] = '{512, 768, 640, 960, 544, 816, 680, 1020, 514, 771};

  function automatic logic [K-1:0] ref_point(input int d, input int n);
    int g, x;
    g = n ^ (n >> 1);
    x = 0;
    for (int j = 0; j < K; j++)
      if ((g >> j) & 1) x ^= (d == 0) ? (1 << (K - 1 - j)) : V1[j];
    return K'(x);
  endfunction

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s", what);
    end
  endtask

  initial begin : watchdog
    repeat (10000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    bit seen [8][1 << K];
    repeat (2) @(posedge clk);
    rst_n = 1'b1;
    @(negedge clk);
    // run a few points, then restart with load
    en = 1'b1;
    repeat (5) @(negedge clk);
    load = 1'b1;
    @(negedge clk);
    load = 1'b0;
    for (int n = 0; n < (1 << K); n++) begin
      check(r[0] == ref_point(0, n), $sformatf("dim0 n=%0d got %0d exp %0d", n, r[0], ref_point(0, n)));
      check(r[1] == ref_point(1, n), $sformatf("dim1 n=%0d got %0d exp %0d", n, r[1], ref_point(1, n)));
      for (int d = 0; d < 8; d++) seen[d][r[d]] = 1'b1;
      @(negedge clk);
    end
    for (int d = 0; d < 8; d++) begin
      int cnt;
      cnt = 0;
      for (int v = 0; v < (1 << K); v++) if (seen[d][v]) cnt++;
      check(cnt == (1 << K), $sformatf("dim%0d covers %0d values", d, cnt));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
