// tb_sc_iir: runs the three SC IIR section variants (LFSR, Sobol, CeMux)
// with the default second-order coefficients and 1024-bit streams on a test
// signal (step, sine, noise). For every output it computes the one-step
// reference: the exact section equation evaluated in floating point with the
// effective quantised coefficients, on the true inputs and on the section's
// own previous outputs (which is what the hardware feeds back). Checks the
// per-sample error and RMS error of that one-step reference, the RMS error
// against the ideal recursion, the 2^K + 1 cycle latency and that the
// feedback path is in use (the output follows a step to its DC level).
module tb_sc_iir;
  localparam int K = 10, W = 10, NS = 80;
  localparam real G    = 692.0 / 256.0;
  localparam real PFB  = 990.0 / 1024.0;
  localparam real B0   = G * (1.0 - PFB) * 0.25;
  localparam real B1   = G * (1.0 - PFB) * 0.5;
  localparam real NA1  = G * PFB * 690.0 / 1024.0;    // -a1
  localparam real NA2  = -G * PFB * 334.0 / 1024.0;   // -a2
  // bounds: per-sample and RMS error against the one-step reference, and
  // RMS error against the ideal recursion. The LFSR and CeMux sections carry
  // a systematic per-period bias (the same random sequence every period)
  // that the high-gain feedback loop amplifies at DC, hence the wide bounds.
  localparam real MAXE [3] = '{0.12, 0.03, 0.10};
  localparam real RMSB [3] = '{0.06, 0.015, 0.05};
  localparam real RMSI [3] = '{0.50, 0.10, 0.40};
  localparam real STEP_LO [3] = '{0.20, 0.40, 0.10};
  localparam real STEP_HI [3] = '{1.20, 0.60, 0.65};

  logic clk = 1'b0, rst_n = 1'b0;
  logic signed [W-1:0] x_in;
  logic x_valid = 1'b0;
  logic [2:0] rdy, yv;
  logic signed [W-1:0] y [3];
  int checks = 0, failures = 0;

  sc_iir #(.KIND(sc_pkg::RNS_LFSR))  u_l (.clk, .rst_n, .x_in, .x_valid, .x_ready(rdy[0]), .flip(3'b0), .y(y[0]), .y_valid(yv[0]));
  sc_iir #(.KIND(sc_pkg::RNS_SOBOL)) u_s (.clk, .rst_n, .x_in, .x_valid, .x_ready(rdy[1]), .flip(3'b0), .y(y[1]), .y_valid(yv[1]));
  sc_iir #(.KIND(sc_pkg::RNS_CEMUX)) u_c (.clk, .rst_n, .x_in, .x_valid, .x_ready(rdy[2]), .flip(3'b0), .y(y[2]), .y_valid(yv[2]));

  always #5 clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s", what);
    end
  endtask

  initial begin : watchdog
    repeat (NS * 1100 + 1000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  real xq [NS];
  real yd [3][NS];     // hardware outputs
  real yi [NS];        // ideal recursion

  function automatic real xat(input int n);
    return (n >= 0) ? xq[n] : 0.0;
  endfunction

  function automatic real ydat(input int v, input int n);
    return (n >= 0) ? yd[v][n] : 0.0;
  endfunction

  function automatic real yiat(input int n);
    return (n >= 0) ? yi[n] : 0.0;
  endfunction

  initial begin
    real se1 [3], sei [3], steady [3];
    for (int v = 0; v < 3; v++) begin se1[v] = 0.0; sei[v] = 0.0; steady[v] = 0.0; end
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    @(negedge clk);
    for (int n = 0; n < NS; n++) begin
      real xv;
      int lat;
      xv = (n < 10) ? 0.0 : (n < 50) ? 0.5 : 0.4 * $sin(0.12 * n);
      xv += (real'($urandom_range(100)) - 50.0) / 1000.0;
      x_in = W'($rtoi(xv * 512.0));
      xq[n] = real'(x_in) / 512.0;
      yi[n] = B0 * xat(n) + B1 * xat(n - 1) + B0 * xat(n - 2) + NA1 * yiat(n - 1) + NA2 * yiat(n - 2);
      x_valid = 1'b1;
      @(posedge clk);
      check(rdy == 3'b111, "ready when idle");
      @(negedge clk);
      x_valid = 1'b0;
      lat = 1;
      while (yv[0] !== 1'b1 && lat < 3000) begin
        @(negedge clk);
        lat++;
      end
      check(lat == (1 << K) + 1, $sformatf("latency %0d", lat));
      check(yv == 3'b111, "all variants valid together");
      for (int v = 0; v < 3; v++) begin
        real r1, e1, ei;
        yd[v][n] = real'(y[v]) / 512.0;
        r1 = B0 * xat(n) + B1 * xat(n - 1) + B0 * xat(n - 2) + NA1 * ydat(v, n - 1) + NA2 * ydat(v, n - 2);
        e1 = yd[v][n] - r1;
        ei = yd[v][n] - yi[n];
        se1[v] += e1 * e1;
        sei[v] += ei * ei;
        if (n >= 40 && n < 50) steady[v] += yd[v][n] / 10.0;
        check((e1 < 0 ? -e1 : e1) <= MAXE[v], $sformatf("variant %0d n=%0d y=%f one-step ref=%f", v, n, yd[v][n], r1));
      end
    end
    for (int v = 0; v < 3; v++) begin
      real r1, ri;
      r1 = $sqrt(se1[v] / NS);
      ri = $sqrt(sei[v] / NS);
      $display("variant %0d: one-step RMSE %f, RMSE vs ideal %f, step level %f", v, r1, ri, steady[v]);
      check(r1 <= RMSB[v], $sformatf("variant %0d one-step RMSE %f", v, r1));
      check(ri <= RMSI[v], $sformatf("variant %0d RMSE vs ideal %f", v, ri));
      check(steady[v] > STEP_LO[v] && steady[v] < STEP_HI[v], $sformatf("variant %0d step level %f", v, steady[v]));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
