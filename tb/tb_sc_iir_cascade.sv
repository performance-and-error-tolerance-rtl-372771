// tb_sc_iir_cascade: the default three-section (6th-order) SC IIR cascade in
// all three variants. Samples are offered back to back (x_valid held high,
// so the handshake stalls the source while the filter is busy). Checks: the
// 3 * (2^K + 1) cycle latency of the first result, one result per 2^K + 1
// cycles afterwards, and the RMS error against the ideal cascade computed in
// floating point with the effective quantised coefficients of each section.
module tb_sc_iir_cascade;
  localparam int K = 10, W = 10, NS = 90, NSEC = 3;
  localparam real GQ [NSEC] = '{533.0, 584.0, 692.0};
  localparam real MT [NSEC] = '{987.0, 988.0, 990.0};
  localparam real L1 [NSEC] = '{748.0, 726.0, 690.0};
  localparam real L2 [NSEC] = '{276.0, 298.0, 334.0};
  localparam real RMSI [3] = '{0.50, 0.20, 0.35};

  logic clk = 1'b0, rst_n = 1'b0;
  logic signed [W-1:0] x_in = '0;
  logic x_valid = 1'b0;
  logic [2:0] rdy, yv;
  logic signed [W-1:0] y [3];
  int checks = 0, failures = 0;

  sc_iir_cascade #(.KIND(sc_pkg::RNS_LFSR))  u_l (.clk, .rst_n, .x_in, .x_valid, .x_ready(rdy[0]), .flip(3'b0), .y(y[0]), .y_valid(yv[0]));
  sc_iir_cascade #(.KIND(sc_pkg::RNS_SOBOL)) u_s (.clk, .rst_n, .x_in, .x_valid, .x_ready(rdy[1]), .flip(3'b0), .y(y[1]), .y_valid(yv[1]));
  sc_iir_cascade #(.KIND(sc_pkg::RNS_CEMUX)) u_c (.clk, .rst_n, .x_in, .x_valid, .x_ready(rdy[2]), .flip(3'b0), .y(y[2]), .y_valid(yv[2]));

  always #5 clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s", what);
    end
  endtask

  initial begin : watchdog
    repeat ((NS + 4) * 1030) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  real xq [NS];
  real yi [NS];
  int  cyc = 0;
  int  t_in [NS];
  int  nin = 0, nout = 0, stalls = 0;
  real se [3];

  always @(negedge clk) cyc++;

  // ideal cascade
  initial begin
    real w [NSEC+1][NS];
    for (int n = 0; n < NS; n++) begin
      real v;
      v = (n < 10) ? 0.0 : (n < 50) ? 0.5 : 0.4 * $sin(0.12 * n);
      v += (real'($urandom_range(100)) - 50.0) / 1000.0;
      xq[n] = real'($rtoi(v * 512.0)) / 512.0;
      w[0][n] = xq[n];
    end
    for (int s = 0; s < NSEC; s++) begin
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
    for (int n = 0; n < NS; n++) yi[n] = w[NSEC][n];
  end

  // source: holds x_valid high, advances on each accepted sample
  initial begin
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    @(negedge clk);
    while (nin < NS) begin
      x_in = W'($rtoi(xq[nin] * 512.0));
      x_valid = 1'b1;
      @(posedge clk);
      if (rdy[0]) begin
        check(rdy == 3'b111, "variants accept together");
        t_in[nin] = cyc;
        nin++;
      end else begin
        stalls++;
      end
      @(negedge clk);
    end
    x_valid = 1'b0;
  end

  // sink
  initial begin
    for (int v = 0; v < 3; v++) se[v] = 0.0;
    while (nout < NS) begin
      @(posedge clk);
      if (yv[0]) begin
        check(yv == 3'b111, "variants produce together");
        check(cyc - t_in[nout] == NSEC * ((1 << K) + 1), $sformatf("latency %0d", cyc - t_in[nout]));
        for (int v = 0; v < 3; v++) begin
          real e;
          e = real'(y[v]) / 512.0 - yi[nout];
          se[v] += e * e;
        end
        nout++;
      end
    end
    for (int v = 0; v < 3; v++) begin
      real r;
      r = $sqrt(se[v] / NS);
      $display("variant %0d: RMSE vs ideal 6th-order cascade %f", v, r);
      check(r <= RMSI[v], $sformatf("variant %0d RMSE %f", v, r));
    end
    check(stalls > 0, "source stalled by x_ready");
    $display("source stall cycles: %0d", stalls);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
