// sc_iir_cascade: higher-order stochastic-computing IIR filter built as a
// cascade of NSEC direct-form second-order sections (sc_iir with M = N = 2),
// the decomposition the source design uses for its higher-order IIR filters.
//
// Section s+1 takes section s's output sample as its input; each section is
// a complete SC IIR with its own SNGs, mux trees, two-way mux and counter.
// The defaults realise a 6th-order Butterworth low-pass with cut-off
// 0.1*pi as three unity-DC-gain sections ordered by rising Q (pole pairs
// from the standard bilinear design; A1_LEAVES and A2_LEAVES hold the
// leaf counts of |a1| (a1 < 0) and |a2| (a2 > 0) of each section; per-section scaling and quantisation to
// 2^K leaves are this design's choices).
//
// Error injection: flip is applied to the first section's feed-forward
// streams, i.e. at the filter input.
//
// Timing: the sections work in a pipeline, one stochastic period apart.
// x_ready is the first section's; y_valid pulses NSEC * (2^K + 1) cycles
// after a sample is accepted. Samples may be offered at most once every
// 2^K + 1 cycles.
module sc_iir_cascade #(
  parameter sc_pkg::rns_kind_e KIND = sc_pkg::RNS_LFSR,
  parameter int unsigned       NSEC = 3,
  parameter int unsigned       K    = 10,
  parameter int unsigned       W    = 10,
  parameter int unsigned       A1_LEAVES [NSEC] = '{748, 726, 690},
  parameter int unsigned       A2_LEAVES [NSEC] = '{276, 298, 334},
  parameter int unsigned       MIX_T  [NSEC] = '{987, 988, 990},
  parameter int unsigned       GAIN_Q [NSEC] = '{533, 584, 692},
  parameter int unsigned       GF   = 8
) (
  input  logic                clk,
  input  logic                rst_n,
  input  logic signed [W-1:0] x_in,
  input  logic                x_valid,
  output logic                x_ready,
  input  logic [2:0]          flip,
  output logic signed [W-1:0] y,
  output logic                y_valid
);
  logic signed [W-1:0] xs [NSEC+1];
  logic                vs [NSEC+1];
  logic                rdy [NSEC];

  assign xs[0] = x_in;
  assign vs[0] = x_valid;

  for (genvar s = 0; s < NSEC; s++) begin : g_sec
    sc_iir #(
      .KIND(KIND), .M(2), .N(2), .K(K), .W(W),
      .FF_LEAVES('{(1 << K) / 4, (1 << K) / 2, (1 << K) / 4}),
      .FF_NEG(3'b000), .FB_LEAVES('{A1_LEAVES[s], A2_LEAVES[s]}), .FB_NEG(2'b10),
      .MIX_T(MIX_T[s]), .GF(GF), .GAIN_Q(GAIN_Q[s]), .SEED_BASE(10 * s)
    ) u_sec (
      .clk, .rst_n,
      .x_in(xs[s]), .x_valid(vs[s]), .x_ready(rdy[s]),
      .flip((s == 0) ? flip : 3'b000),
      .y(xs[s+1]), .y_valid(vs[s+1])
    );
  end

  assign x_ready = rdy[0];
  assign y       = xs[NSEC];
  assign y_valid = vs[NSEC];

endmodule
