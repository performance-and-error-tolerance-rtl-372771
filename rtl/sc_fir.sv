// sc_fir: stochastic-computing FIR filter, y[n] = sum_i b[i] x[n-i].
//
// The binary input samples pass through a delay line of W-bit registers
// (x[n] .. x[n-ORDER]); each delayed sample is converted to a bipolar
// stochastic stream, its sign is applied, and a hardwired weighted mux tree
// adds the streams with weights |b[i]| / sum|b|. A counter turns the tree
// output back into binary. One output needs one stochastic period of 2^K
// cycles, computing one stream bit per cycle. KIND selects one of the three
// variants of the source design:
//   RNS_LFSR  (LFSR-SF)  one LFSR-based SNG per tap, XOR gates apply the
//                        coefficient signs, a separate LFSR (reciprocal
//                        polynomial, so it is not a shifted copy of the
//                        tap LFSRs) drives the mux-tree selects;
//   RNS_SOBOL (Sobol-SF) the same with Sobol-based SNGs (tap i uses Sobol
//                        dimension 1 + i mod 6, the selects dimension 0);
//   RNS_CEMUX (CeMux-SF) one shared LFSR feeds a probability conversion
//                        (PCC) array that also handles the signs, and the
//                        mux-tree selects come from a K-bit counter (the
//                        frame's bit counter), MSB at the root.
// The delay line holding binary samples rather than streams, the weighted
// tree and the CeMux arrangement follow the source. Coefficients are given
// as leaf counts (LEAVES, summing to 2^K) and signs (NEG). The defaults are a
// 24th-order low-pass with cut-off 0.1*pi (Hamming-windowed sinc), quantised
// by this design; GAIN_Q/2^GF = sum|b| undoes the adder's scaling.
//
// Error injection: flip[i] is XORed into the stream of tap i (before the
// sign), modelling bit flips on the filter's input streams; tie to 0 for
// normal use.
//
// Timing: a sample is accepted when x_valid and x_ready are both high. The
// stream is then computed over the next 2^K cycles (x_ready low) and y is
// valid with a one-cycle y_valid pulse 2^K + 1 cycles after acceptance;
// x_ready is high again on that cycle, so one sample per 2^K + 1 cycles.
module sc_fir #(
  parameter sc_pkg::rns_kind_e KIND   = sc_pkg::RNS_LFSR,
  parameter int unsigned       ORDER  = 24,
  parameter int unsigned       K      = 10,
  parameter int unsigned       W      = 10,
  parameter int unsigned       LEAVES [ORDER+1] = '{1, 1, 0, 3, 8, 17, 30, 46, 64, 82, 97, 107, 111,
                                                    107, 97, 82, 64, 46, 30, 17, 8, 3, 0, 1, 2},
  parameter logic [ORDER:0]    NEG    = (ORDER+1)'(25'h1800003),
  parameter int unsigned       GF     = 8,
  parameter int unsigned       GAIN_Q = 258
) (
  input  logic                clk,
  input  logic                rst_n,
  input  logic signed [W-1:0] x_in,
  input  logic                x_valid,
  output logic                x_ready,
  input  logic [ORDER:0]      flip,
  output logic signed [W-1:0] y,
  output logic                y_valid
);
  import sc_pkg::*;

  localparam int unsigned NT = ORDER + 1;

  // ---------------- control: one stochastic period per sample
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

  // ---------------- binary delay line: xd[i] = x[n-i]
  logic signed [W-1:0] xd [NT];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int i = 0; i < NT; i++) xd[i] <= '0;
    end else if (start) begin
      xd[0] <= x_in;
      for (int i = 1; i < NT; i++) xd[i] <= xd[i-1];
    end
  end

  // ---------------- stochastic streams m_i and mux-tree selects
  logic [NT-1:0] m;
  logic [K-1:0]  sel;

  if (KIND == RNS_CEMUX) begin : g_cemux
    logic [K-1:0]  r;
    logic [NT-1:0] c;
    lfsr_rns #(.K(K), .SEED(K'(397 * NT + 5))) u_rns (
      .clk, .rst_n, .load(start), .en(busy), .r(r));
    pcc_array #(.Z(NT), .K(K), .W(W), .NEG(NEG)) u_pcc (.r(r), .x(xd), .c(c));
    assign m   = c ^ flip;
    assign sel = phase;              // precise sampler
  end else begin : g_sng
    logic [NT-1:0] s;
    for (genvar i = 0; i < NT; i++) begin : g_tap
      sng #(.KIND(KIND), .K(K), .W(W), .SEED(K'(397 * (i + 1) + 5)), .DIM(1 + i % 6)) u_sng (
        .clk, .rst_n, .load(start), .en(busy), .x(xd[i]), .s(s[i]));
    end
    assign m = s ^ flip ^ NEG;       // sign XOR gates
    if (KIND == RNS_SOBOL) begin : g_sel_sobol
      sobol_rns #(.K(K), .DIM(0)) u_sel (
        .clk, .rst_n, .load(start), .en(busy), .r(sel));
    end else begin : g_sel_lfsr
      lfsr_rns #(.K(K), .SEED(K'(397 * (NT + 1) + 5)), .RECIP(1'b1)) u_sel (
        .clk, .rst_n, .load(start), .en(busy), .r(sel));
    end
  end

  logic s_y;
  wmux_tree #(.NIN(NT), .K(K), .LEAVES(LEAVES)) u_tree (.m(m), .sel(sel), .s(s_y));

  // ---------------- stochastic-to-binary
  s2b_counter #(.K(K), .W(W), .GF(GF), .GAIN_Q(GAIN_Q)) u_cnt (
    .clk, .rst_n, .clr(start), .en(busy), .last(last), .s(s_y), .y(y), .y_valid(y_valid));

endmodule
