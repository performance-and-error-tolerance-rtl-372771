// tb_sc_fir: runs the three SC FIR variants (LFSR, Sobol, CeMux) at their
// default size (24th order, 1024-bit streams) on a test signal made of a
// step, a slow sine and random noise, and compares every output with the
// exact filter response computed in floating point from the same quantised
// coefficients (leaf counts and signs). Checks: per-sample error bound and
// RMS error per variant, output latency of exactly 2^K + 1 cycles, x_ready
// low while busy, and, in a second pass with 2% of the input stream bits
// flipped, that the filters still track the reference within a wider bound.
module tb_sc_fir;
  localparam int K = 10, W = 10, ORDER = 24, NT = ORDER + 1, NS = 70;
  localparam int unsigned LV [NT] = '{1, 1, 0, 3, 8, 17, 30, 46, 64, 82, 97, 107, 111,
                                      107, 97, 82, 64, 46, 30, 17, 8, 3, 0, 1, 2};
  localparam logic [ORDER:0] NEG = 25'h1800003;
  localparam real GAIN = 258.0 / 256.0;
  // bounds on |error| per sample and on the RMS error, per variant
  localparam real MAXE [3] = '{0.10, 0.05, 0.06};
  localparam real RMSB [3] = '{0.06, 0.015, 0.02};
  // bounds with 2 % of the stream bits flipped
  localparam real MAXE_F = 0.12, RMSB_F = 0.045;

  logic clk = 1'b0, rst_n = 1'b0;
  logic signed [W-1:0] x_in;
  logic x_valid = 1'b0;
  logic [2:0] rdy, yv;
  logic signed [W-1:0] y [3];
  logic [ORDER:0] flip = '0;
  int checks = 0, failures = 0;
  int flips_injected = 0;

  sc_fir #(.KIND(sc_pkg::RNS_LFSR))  u_l (.clk, .rst_n, .x_in, .x_valid, .x_ready(rdy[0]), .flip, .y(y[0]), .y_valid(yv[0]));
  sc_fir #(.KIND(sc_pkg::RNS_SOBOL)) u_s (.clk, .rst_n, .x_in, .x_valid, .x_ready(rdy[1]), .flip, .y(y[1]), .y_valid(yv[1]));
  sc_fir #(.KIND(sc_pkg::RNS_CEMUX)) u_c (.clk, .rst_n, .x_in, .x_valid, .x_ready(rdy[2]), .flip, .y(y[2]), .y_valid(yv[2]));

  always #5 clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s", what);
    end
  endtask

  initial begin : watchdog
    repeat (2 * NS * 1100 + 1000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // error injection: each stream bit flipped with probability rate_ppm / 1e6
  int rate_ppm = 0;
  always @(negedge clk) begin
    for (int i = 0; i < NT; i++) begin
      flip[i] = ($urandom_range(999999) < rate_ppm);
      if (flip[i] && !rdy[0]) flips_injected++;
    end
  end

  real xs [NS];
  real hist [2 * NS];   // every sample fed so far
  int  nfed = 0;

  function automatic real ref_y(input int n);
    real acc;
    acc = 0.0;
    for (int i = 0; i < NT; i++)
      if (n - i >= 0) acc += (NEG[i] ? -1.0 : 1.0) * real'(LV[i]) / 1024.0 * hist[n - i];
    return acc * GAIN;
  endfunction

  task automatic run_pass(input int ppm, input real emax_all, input real rms_all);
    real se [3];
    real maxe [3];
    rate_ppm = ppm;
    for (int v = 0; v < 3; v++) begin se[v] = 0.0; maxe[v] = 0.0; end
    for (int n = 0; n < NS; n++) begin
      int lat;
      x_in = W'($rtoi(xs[n] * 512.0));
      hist[nfed] = real'(x_in) / 512.0;
      nfed++;
      x_valid = 1'b1;
      @(posedge clk);
      check(rdy == 3'b111, "ready when idle");
      @(negedge clk);
      x_valid = 1'b0;
      lat = 1;
      while (yv[0] !== 1'b1) begin
        check(rdy == 3'b000, "not ready while busy");
        @(negedge clk);
        lat++;
        if (lat > 3000) break;
      end
      check(lat == (1 << K) + 1, $sformatf("latency %0d", lat));
      check(yv == 3'b111, "all variants valid together");
      for (int v = 0; v < 3; v++) begin
        real e;
        e = real'(y[v]) / 512.0 - ref_y(nfed - 1);
        if (e < 0) e = -e;
        se[v] += e * e;
        if (e > maxe[v]) maxe[v] = e;
        check(e <= ((emax_all > 0.0) ? emax_all : MAXE[v]),
              $sformatf("variant %0d n=%0d y=%f ref=%f", v, n, real'(y[v]) / 512.0, ref_y(nfed - 1)));
      end
    end
    for (int v = 0; v < 3; v++) begin
      real rmse;
      rmse = $sqrt(se[v] / NS);
      $display("flip rate %0d ppm: variant %0d RMSE %f max %f", ppm, v, rmse, maxe[v]);
      check(rmse <= ((rms_all > 0.0) ? rms_all : RMSB[v]), $sformatf("variant %0d RMSE %f", v, rmse));
    end
  endtask

  initial begin
    for (int n = 0; n < NS; n++) begin
      real v;
      v = (n < 15) ? 0.0 : (n < 35) ? 0.6 : 0.5 * $sin(0.15 * n);
      v += (real'($urandom_range(200)) - 100.0) / 1000.0;
      xs[n] = v;
    end
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    @(negedge clk);
    run_pass(0, 0.0, 0.0);
    // second pass: 2 % bit-flip rate on the input streams
    run_pass(20000, MAXE_F, RMSB_F);
    check(flips_injected > 0, "error injection exercised");
    $display("flips injected: %0d", flips_injected);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
