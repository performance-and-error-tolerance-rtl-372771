// tb_sc_filter_top: end-to-end test of all six SC low-pass filters at their
// default size (24th-order FIR, 6th-order IIR, 1024-bit streams), on a
// synthetic noisy ECG-like signal: a periodic beat made of P, QRS and T
// bumps plus uniform high-frequency noise. The signal is run seven times in
// a row with 0, 0.1, 0.25, 0.5, 1, 1.5 and 2 % of the input stream bits
// flipped (the error rates of the evaluation) by the
// error-injection XOR gates. For each filter and error rate the RMS error
// against the exact (floating-point) filter with the same quantised
// coefficients is printed and checked against a bound. The source keeps
// x_valid high, so it is stalled by x_ready between samples. Mechanisms
// counted (each must occur): stalls, injected flips, results of every
// filter, results of every variant (LFSR, Sobol, CeMux) for FIR and IIR.
module tb_sc_filter_top;
  localparam int K = 10, W = 10, ORDER = 24, NT = ORDER + 1;
  localparam int NB = 150;                 // samples per error rate
  localparam int NP = 7;                   // error rates
  localparam int NS = NB * NP;
  localparam int RATE_PPM [NP] = '{0, 1000, 2500, 5000, 10000, 15000, 20000};
  localparam int unsigned LV [NT] = '{1, 1, 0, 3, 8, 17, 30, 46, 64, 82, 97, 107, 111,
                                      107, 97, 82, 64, 46, 30, 17, 8, 3, 0, 1, 2};
  localparam logic [ORDER:0] NEG = 25'h1800003;
  localparam real GQ [3] = '{533.0, 584.0, 692.0};
  localparam real MT [3] = '{987.0, 988.0, 990.0};
  localparam real L1 [3] = '{748.0, 726.0, 690.0};
  localparam real L2 [3] = '{276.0, 298.0, 334.0};
  // RMSE bounds [filter][error rate]
  localparam real BOUND [6] = '{0.07, 0.04, 0.04, 0.80, 0.30, 0.25};
  localparam string NAME [6] = '{"LFSR-SF", "Sobol-SF", "CeMux-SF", "LFSR-SI", "Sobol-SI", "CeMux-SI"};

  logic clk = 1'b0, rst_n = 1'b0;
  logic signed [W-1:0] x_in = '0;
  logic x_valid = 1'b0, x_ready;
  logic [ORDER:0] flip_fir = '0;
  logic [2:0] flip_iir = '0;
  logic signed [W-1:0] y [6];
  logic [5:0] y_valid;
  int checks = 0, failures = 0;

  sc_filter_top dut (.clk, .rst_n, .x_in, .x_valid, .x_ready, .flip_fir, .flip_iir, .y, .y_valid);

  always #5 clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s", what);
    end
  endtask

  initial begin : watchdog
    repeat ((NS + 5) * 1030) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  real xq [NS];
  real yref [6][NS];
  real yhw [6][NS];
  int  nout [6];
  int  nin = 0, stalls = 0, flips = 0;
  int  rate_ppm = 0;

  // ---------------- stimulus and reference filters
  function automatic real bump(input real t, input real c, input real w, input real a);
    real d;
    d = (t - c) / w;
    return a * $exp(-0.5 * d * d);
  endfunction

  initial begin
    real w [4][NS];
    for (int n = 0; n < NS; n++) begin
      real t, v;
      t = real'(n % 50);
      v = bump(t, 10.0, 2.5, 0.12) + bump(t, 20.0, 1.0, -0.10) + bump(t, 22.0, 1.0, 0.70)
        + bump(t, 24.0, 1.0, -0.15) + bump(t, 36.0, 4.0, 0.22) - 0.05;
      v += (real'($urandom_range(300)) - 150.0) / 1000.0;
      xq[n] = real'($rtoi(v * 512.0)) / 512.0;
    end
    for (int n = 0; n < NS; n++) begin
      real acc;
      acc = 0.0;
      for (int i = 0; i < NT; i++)
        if (n - i >= 0) acc += (NEG[i] ? -1.0 : 1.0) * real'(LV[i]) / 1024.0 * xq[n - i];
      for (int v = 0; v < 3; v++) yref[v][n] = acc * 258.0 / 256.0;
    end
    for (int n = 0; n < NS; n++) w[0][n] = xq[n];
    for (int s = 0; s < 3; s++) begin
      real g, p;
      g = GQ[s] / 256.0;
      p = MT[s] / 1024.0;
      for (int n = 0; n < NS; n++) begin
        real acc;
        acc = g * (1.0 - p) * 0.25 * w[s][n];
        if (n >= 1) acc += g * (1.0 - p) * 0.5 * w[s][n-1] + g * p * L1[s] / 1024.0 * w[s+1][n-1];
        if (n >= 2) acc += g * (1.0 - p) * 0.25 * w[s][n-2] - g * p * L2[s] / 1024.0 * w[s+1][n-2];
        w[s+1][n] = acc;
      end
    end
    for (int n = 0; n < NS; n++) for (int v = 3; v < 6; v++) yref[v][n] = w[3][n];
  end

  // ---------------- error injection
  always @(negedge clk) begin
    for (int i = 0; i < NT; i++) flip_fir[i] = ($urandom_range(999999) < rate_ppm);
    for (int i = 0; i < 3; i++)  flip_iir[i] = ($urandom_range(999999) < rate_ppm);
    if (!x_ready) flips += $countones(flip_fir) + $countones(flip_iir);
  end

  // ---------------- source
  initial begin
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    @(negedge clk);
    while (nin < NS) begin
      x_in = W'($rtoi(xq[nin] * 512.0));
      x_valid = 1'b1;
      @(posedge clk);
      if (x_ready) begin
        rate_ppm = RATE_PPM[nin / NB];
        nin++;
      end else begin
        stalls++;
      end
      @(negedge clk);
    end
    x_valid = 1'b0;
  end

  // ---------------- sinks
  for (genvar v = 0; v < 6; v++) begin : g_sink
    int cnt;
    always @(posedge clk or negedge rst_n) begin
      if (!rst_n) begin
        cnt = 0;
      end else if (y_valid[v] && cnt < NS) begin
        yhw[v][cnt] = real'(y[v]) / 512.0;
        cnt = cnt + 1;
      end
    end
    assign nout[v] = cnt;
  end

  // ---------------- evaluation
  initial begin
    wait (nout[3] == NS && nout[0] == NS);
    repeat (2) @(posedge clk);
    $display("RMSE against the exact filter, per error rate (ppm of stream bits flipped)");
    for (int v = 0; v < 6; v++) begin
      for (int p = 0; p < NP; p++) begin
        real se, r;
        se = 0.0;
        for (int n = p * NB; n < (p + 1) * NB; n++) se += (yhw[v][n] - yref[v][n]) ** 2;
        r = $sqrt(se / NB);
        $display("  %-9s rate %6d ppm: RMSE %f", NAME[v], RATE_PPM[p], r);
        check(r <= BOUND[v], $sformatf("%s at %0d ppm: RMSE %f above %f", NAME[v], RATE_PPM[p], r, BOUND[v]));
      end
      check(nout[v] == NS, $sformatf("%s produced %0d results", NAME[v], nout[v]));
    end
    $display("mechanisms: stall cycles %0d, flipped stream bits %0d", stalls, flips);
    check(stalls > 0, "handshake stall exercised");
    check(flips > 0, "error injection exercised");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
