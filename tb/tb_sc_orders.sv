// tb_sc_orders: the smaller filter sizes of the evaluation, in all three
// variants (LFSR, Sobol, CeMux): 10th- and 16th-order FIR and 2nd- and
// 4th-order IIR (one and two cascaded sections), all low-pass with cut-off
// 0.1*pi, 1024-bit streams. A synthetic noisy ECG-like signal is filtered
// and each result is compared with the exact filter computed in floating
// point from the same quantised coefficients; RMS errors are printed and
// checked against bounds. Also checks the latency of every instance
// (2^K + 1 cycles per FIR or per IIR section).
module tb_sc_orders;
  import sc_pkg::*;
  localparam int K = 10, W = 10, NS = 150, ND = 12;
  localparam int unsigned LV10 [11] = '{10, 26, 68, 128, 180, 200, 180, 128, 68, 26, 10};
  localparam int unsigned LV16 [17] = '{3, 6, 15, 32, 57, 85, 112, 132, 139, 132, 113, 85, 57, 32, 15, 6, 3};
  localparam int unsigned I2_A1 [1] = '{726}, I2_A2 [1] = '{298}, I2_T [1] = '{988}, I2_G [1] = '{584};
  localparam int unsigned I4_A1 [2] = '{744, 700}, I4_A2 [2] = '{280, 324}, I4_T [2] = '{987, 989},
                          I4_G [2] = '{541, 660};
  localparam rns_kind_e KD [3] = '{RNS_LFSR, RNS_SOBOL, RNS_CEMUX};
  localparam string NAME [4] = '{"FIR 10", "FIR 16", "IIR 2", "IIR 4"};
  localparam string VNAME [3] = '{"LFSR", "Sobol", "CeMux"};
  // RMSE bounds [size][variant]
  localparam real BOUND [4][3] = '{'{0.08, 0.03, 0.03}, '{0.08, 0.03, 0.03},
                                   '{0.70, 0.25, 0.20}, '{0.70, 0.25, 0.20}};
  localparam int LAT [4] = '{1025, 1025, 1025, 2050};

  logic clk = 1'b0, rst_n = 1'b0;
  logic signed [W-1:0] x_in = '0;
  logic x_valid = 1'b0;
  logic take;
  logic [ND-1:0] rdy, yv;
  logic signed [W-1:0] y [ND];
  int checks = 0, failures = 0;

  assign take = x_valid & (&rdy);

  for (genvar v = 0; v < 3; v++) begin : g_v
    sc_fir #(.KIND(KD[v]), .ORDER(10), .LEAVES(LV10), .NEG('0), .GAIN_Q(256)) u_f10 (
      .clk, .rst_n, .x_in, .x_valid(take), .x_ready(rdy[0*3+v]), .flip('0), .y(y[0*3+v]), .y_valid(yv[0*3+v]));
    sc_fir #(.KIND(KD[v]), .ORDER(16), .LEAVES(LV16), .NEG('0), .GAIN_Q(256)) u_f16 (
      .clk, .rst_n, .x_in, .x_valid(take), .x_ready(rdy[1*3+v]), .flip('0), .y(y[1*3+v]), .y_valid(yv[1*3+v]));
    sc_iir_cascade #(.KIND(KD[v]), .NSEC(1), .A1_LEAVES(I2_A1), .A2_LEAVES(I2_A2),
                     .MIX_T(I2_T), .GAIN_Q(I2_G)) u_i2 (
      .clk, .rst_n, .x_in, .x_valid(take), .x_ready(rdy[2*3+v]), .flip('0), .y(y[2*3+v]), .y_valid(yv[2*3+v]));
    sc_iir_cascade #(.KIND(KD[v]), .NSEC(2), .A1_LEAVES(I4_A1), .A2_LEAVES(I4_A2),
                     .MIX_T(I4_T), .GAIN_Q(I4_G)) u_i4 (
      .clk, .rst_n, .x_in, .x_valid(take), .x_ready(rdy[3*3+v]), .flip('0), .y(y[3*3+v]), .y_valid(yv[3*3+v]));
  end

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
  real yref [4][NS];
  real yhw [ND][NS];
  int  nout [ND];
  int  tin [NS];
  int  nin = 0, cyc = 0;

  always @(negedge clk) cyc++;

  function automatic real bump(input real t, input real c, input real w, input real a);
    real d;
    d = (t - c) / w;
    return a * $exp(-0.5 * d * d);
  endfunction

  // exact second-order section with quantised coefficients
  function automatic void biquad(input real g, input real p, input real l1, input real l2,
                                 ref real xi [NS], ref real yo [NS]);
    for (int n = 0; n < NS; n++) begin
      real acc;
      acc = g * (1.0 - p) * 0.25 * xi[n];
      if (n >= 1) acc += g * (1.0 - p) * 0.5 * xi[n-1] + g * p * l1 * yo[n-1];
      if (n >= 2) acc += g * (1.0 - p) * 0.25 * xi[n-2] - g * p * l2 * yo[n-2];
      yo[n] = acc;
    end
  endfunction

  initial begin
    real t1 [NS], t2 [NS], t3 [NS];
    for (int n = 0; n < NS; n++) begin
      real t, v;
      t = real'(n % 50);
      v = bump(t, 10.0, 2.5, 0.12) + bump(t, 20.0, 1.0, -0.10) + bump(t, 22.0, 1.0, 0.70)
        + bump(t, 24.0, 1.0, -0.15) + bump(t, 36.0, 4.0, 0.22) - 0.05;
      v += (real'($urandom_range(300)) - 150.0) / 1000.0;
      xq[n] = real'($rtoi(v * 512.0)) / 512.0;
    end
    for (int n = 0; n < NS; n++) begin
      real a10, a16;
      a10 = 0.0;
      a16 = 0.0;
      for (int i = 0; i <= 10; i++) if (n - i >= 0) a10 += real'(LV10[i]) / 1024.0 * xq[n - i];
      for (int i = 0; i <= 16; i++) if (n - i >= 0) a16 += real'(LV16[i]) / 1024.0 * xq[n - i];
      yref[0][n] = a10;
      yref[1][n] = a16;
    end
    biquad(584.0 / 256.0, 988.0 / 1024.0, 726.0 / 1024.0, 298.0 / 1024.0, xq, t1);
    biquad(541.0 / 256.0, 987.0 / 1024.0, 744.0 / 1024.0, 280.0 / 1024.0, xq, t2);
    biquad(660.0 / 256.0, 989.0 / 1024.0, 700.0 / 1024.0, 324.0 / 1024.0, t2, t3);
    for (int n = 0; n < NS; n++) begin
      yref[2][n] = t1[n];
      yref[3][n] = t3[n];
    end
  end

  // source
  initial begin
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    @(negedge clk);
    while (nin < NS) begin
      x_in = W'($rtoi(xq[nin] * 512.0));
      x_valid = 1'b1;
      @(posedge clk);
      if (&rdy) begin
        tin[nin] = cyc;
        nin++;
      end
      @(negedge clk);
    end
    x_valid = 1'b0;
  end

  // sinks
  for (genvar d = 0; d < ND; d++) begin : g_sink
    int cnt;
    always @(posedge clk or negedge rst_n) begin
      if (!rst_n) begin
        cnt = 0;
      end else if (yv[d] && cnt < NS) begin
        check(cyc - tin[cnt] == LAT[d / 3], $sformatf("%s %s latency %0d", NAME[d / 3], VNAME[d % 3], cyc - tin[cnt]));
        yhw[d][cnt] = real'(y[d]) / 512.0;
        cnt = cnt + 1;
      end
    end
    assign nout[d] = cnt;
  end

  initial begin
    wait (nout[ND-1] == NS);
    repeat (2) @(posedge clk);
    $display("RMSE against the exact filter (0 %% error rate)");
    for (int d = 0; d < ND; d++) begin
      real se, r;
      se = 0.0;
      for (int n = 0; n < NS; n++) se += (yhw[d][n] - yref[d / 3][n]) ** 2;
      r = $sqrt(se / NS);
      $display("  %-6s %-5s RMSE %f", NAME[d / 3], VNAME[d % 3], r);
      check(r <= BOUND[d / 3][d % 3], $sformatf("%s %s RMSE %f", NAME[d / 3], VNAME[d % 3], r));
      check(nout[d] == NS, "all results produced");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
