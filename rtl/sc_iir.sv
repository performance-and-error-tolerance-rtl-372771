// sc_iir: one direct-form stochastic-computing IIR section,
//   y[n] = sum_{i=0..M} b[i] x[n-i] - sum_{j=1..N} a[j] y[n-j].
//
// Feed-forward module: binary delay line of x, one stream per tap, sign
// XOR, weighted mux tree (weights |b[i]| / sum|b|). Feedback module: binary
// delay line of the section's own outputs y[n-1] .. y[n-N], one stream per
// tap, sign XOR with the sign of -a[j], weighted mux tree (weights
// |a[j]| / sum|a|). A two-way mux picks the feedback tree with probability
// MIX_T / 2^K = sum|a| / (sum|a| + sum|b|), so its output carries
// y / (sum|a| + sum|b|); the counter converts it to binary and multiplies by
// GAIN_Q / 2^GF = sum|a| + sum|b|. The result is the new y[n], which enters
// the feedback delay line for the next sample. KIND selects the variant:
//   RNS_LFSR  (LFSR-SI)  an LFSR SNG per tap; separate LFSRs with the
//                        reciprocal polynomial drive each tree's selects
//                        and the two-way mux select;
//   RNS_SOBOL (Sobol-SI) Sobol SNGs (feed-forward tap i: dimension
//                        1 + i mod 6, feedback tap j: 1 + (M+1+j) mod 6),
//                        dimension 0 for the tree selects, dimension 7 for
//                        the two-way select;
//   RNS_CEMUX (CeMux-SI) one shared LFSR and two PCC arrays produce all
//                        tap streams, the frame's bit counter drives both
//                        trees' selects, a reciprocal-polynomial LFSR the
//                        two-way select.
// The module structure follows the source design; the output scaling, the
// sign convention of equation (2) and the RNS assignments are this design's
// choices. The defaults are the third (highest-Q) second-order section of a
// 6th-order Butterworth low-pass with cut-off 0.1*pi, scaled to unity DC
// gain.
//
// Error injection: flip[i] is XORed into the stream of feed-forward tap i.
//
// Timing: as sc_fir. A sample is accepted when x_valid and x_ready; y_valid
// pulses 2^K + 1 cycles later, on the same cycle the new y enters the
// feedback delay line and x_ready returns high.
module sc_iir #(
  parameter sc_pkg::rns_kind_e KIND   = sc_pkg::RNS_LFSR,
  parameter int unsigned       M      = 2,
  parameter int unsigned       N      = 2,
  parameter int unsigned       K      = 10,
  parameter int unsigned       W      = 10,
  parameter int unsigned       FF_LEAVES [M+1] = '{256, 512, 256},
  parameter logic [M:0]        FF_NEG = '0,
  parameter int unsigned       FB_LEAVES [N] = '{690, 334},
  parameter logic [N-1:0]      FB_NEG = N'(2'b10),
  parameter int unsigned       MIX_T  = 990,
  parameter int unsigned       GF     = 8,
  parameter int unsigned       GAIN_Q = 692,
  parameter int unsigned       SEED_BASE = 0
) (
  input  logic                clk,
  input  logic                rst_n,
  input  logic signed [W-1:0] x_in,
  input  logic                x_valid,
  output logic                x_ready,
  input  logic [M:0]          flip,
  output logic signed [W-1:0] y,
  output logic                y_valid
);
  import sc_pkg::*;

  localparam int unsigned NF = M + 1;

  function automatic logic [K-1:0] seed(input int unsigned i);
    return K'(397 * (SEED_BASE + i + 1) + 5);
  endfunction

  // ---------------- control
  logic         busy;
  logic [K-1:0] phase;
  logic         start;
  logic         last;

  assign x_ready = ~busy;
  assign start   = x_valid & ~busy;
  assign last    = busy & (&phase);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      busy  <= 1'b0;
      phase <= '0;
    end else if (start) begin
      busy  <= 1'b1;
      phase <= '0;
    end else if (busy) begin
      phase <= phase + 1'b1;
      if (last) busy <= 1'b0;
    end
  end

  // ---------------- delay lines: xd[i] = x[n-i], yd[j] = y[n-1-j]
  logic signed [W-1:0] xd [NF];
  logic signed [W-1:0] yd [N];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int i = 0; i < NF; i++) xd[i] <= '0;
      for (int j = 0; j < N; j++)  yd[j] <= '0;
    end else begin
      if (start) begin
        xd[0] <= x_in;
        for (int i = 1; i < NF; i++) xd[i] <= xd[i-1];
      end
      if (y_valid) begin
        yd[0] <= y;
        for (int j = 1; j < N; j++) yd[j] <= yd[j-1];
      end
    end
  end

  // ---------------- streams and selects
  logic [NF-1:0] mf;
  logic [N-1:0]  mb;
  logic [K-1:0]  sel_f, sel_b, r_mix;

  if (KIND == RNS_CEMUX) begin : g_cemux
    logic [K-1:0]  r;
    logic [NF-1:0] cf;
    lfsr_rns #(.K(K), .SEED(seed(NF + N))) u_rns (
      .clk, .rst_n, .load(start), .en(busy), .r(r));
    pcc_array #(.Z(NF), .K(K), .W(W), .NEG(FF_NEG)) u_pcc_f (.r(r), .x(xd), .c(cf));
    pcc_array #(.Z(N),  .K(K), .W(W), .NEG(FB_NEG)) u_pcc_b (.r(r), .x(yd), .c(mb));
    assign mf    = cf ^ flip;
    assign sel_f = phase;
    assign sel_b = phase;
    lfsr_rns #(.K(K), .SEED(seed(NF + N + 1)), .RECIP(1'b1)) u_mix (
      .clk, .rst_n, .load(start), .en(busy), .r(r_mix));
  end else begin : g_sng
    logic [NF-1:0] sf;
    logic [N-1:0]  sb;
    for (genvar i = 0; i < NF; i++) begin : g_ff
      sng #(.KIND(KIND), .K(K), .W(W), .SEED(seed(i)), .DIM(1 + i % 6)) u_sng (
        .clk, .rst_n, .load(start), .en(busy), .x(xd[i]), .s(sf[i]));
    end
    for (genvar j = 0; j < N; j++) begin : g_fb
      sng #(.KIND(KIND), .K(K), .W(W), .SEED(seed(NF + j)), .DIM(1 + (NF + j) % 6)) u_sng (
        .clk, .rst_n, .load(start), .en(busy), .x(yd[j]), .s(sb[j]));
    end
    assign mf = sf ^ flip ^ FF_NEG;
    assign mb = sb ^ FB_NEG;
    if (KIND == RNS_SOBOL) begin : g_sel_sobol
      sobol_rns #(.K(K), .DIM(0)) u_sel (
        .clk, .rst_n, .load(start), .en(busy), .r(sel_f));
      assign sel_b = sel_f;
      sobol_rns #(.K(K), .DIM(7)) u_mix (
        .clk, .rst_n, .load(start), .en(busy), .r(r_mix));
    end else begin : g_sel_lfsr
      lfsr_rns #(.K(K), .SEED(seed(NF + N + 1)), .RECIP(1'b1)) u_self (
        .clk, .rst_n, .load(start), .en(busy), .r(sel_f));
      lfsr_rns #(.K(K), .SEED(seed(NF + N + 2)), .RECIP(1'b1)) u_selb (
        .clk, .rst_n, .load(start), .en(busy), .r(sel_b));
      lfsr_rns #(.K(K), .SEED(seed(NF + N + 3)), .RECIP(1'b1)) u_mix (
        .clk, .rst_n, .load(start), .en(busy), .r(r_mix));
    end
  end

  logic s_ff, s_fb, s_y;
  wmux_tree #(.NIN(NF), .K(K), .LEAVES(FF_LEAVES)) u_tree_f (.m(mf), .sel(sel_f), .s(s_ff));
  wmux_tree #(.NIN(N),  .K(K), .LEAVES(FB_LEAVES)) u_tree_b (.m(mb), .sel(sel_b), .s(s_fb));

  // two-way mux: input 0 feed-forward, input 1 feedback
  assign s_y = (r_mix < K'(MIX_T)) ? s_fb : s_ff;

  s2b_counter #(.K(K), .W(W), .GF(GF), .GAIN_Q(GAIN_Q)) u_cnt (
    .clk, .rst_n, .clr(start), .en(busy), .last(last), .s(s_y), .y(y), .y_valid(y_valid));

endmodule
