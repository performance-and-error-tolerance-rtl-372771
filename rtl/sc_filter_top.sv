// sc_filter_top: the six stochastic-computing (SC) low-pass filters side by
// side, all fed from one input sample stream:
//   y[0] LFSR-SF   24th-order FIR, LFSR-based SNGs
//   y[1] Sobol-SF  24th-order FIR, Sobol-based SNGs
//   y[2] CeMux-SF  24th-order FIR, CeMux adder (shared RNS, counter selects)
//   y[3] LFSR-SI   6th-order IIR, LFSR-based SNGs
//   y[4] Sobol-SI  6th-order IIR, Sobol-based SNGs
//   y[5] CeMux-SI  6th-order IIR, CeMux adders
// These are the filter orders the source evaluates its error tolerance
// with, at a stochastic length of 2^K = 1024 bits. Samples are W-bit two's
// complement numbers in [-1, 1). A sample is taken by all six filters at
// once when x_valid and x_ready are high; every FIR result appears 2^K + 1
// cycles later, every IIR result 3 * (2^K + 1) cycles later (one period per
// cascaded section), each with its own y_valid pulse. flip_fir / flip_iir
// inject bit flips into the input streams of every FIR / IIR filter (XOR
// gates); drive them with 0 for error-free operation.
module sc_filter_top #(
  parameter int unsigned K     = 10,
  parameter int unsigned W     = 10,
  parameter int unsigned ORDER = 24
) (
  input  logic                clk,
  input  logic                rst_n,
  input  logic signed [W-1:0] x_in,
  input  logic                x_valid,
  output logic                x_ready,
  input  logic [ORDER:0]      flip_fir,
  input  logic [2:0]          flip_iir,
  output logic signed [W-1:0] y [6],
  output logic [5:0]          y_valid
);
  import sc_pkg::*;

  localparam rns_kind_e KINDS [3] = '{RNS_LFSR, RNS_SOBOL, RNS_CEMUX};

  logic [5:0] rdy;
  logic       take;

  assign x_ready = &rdy;
  assign take    = x_valid & x_ready;

  for (genvar v = 0; v < 3; v++) begin : g_var
    sc_fir #(.KIND(KINDS[v]), .ORDER(ORDER), .K(K), .W(W)) u_fir (
      .clk, .rst_n, .x_in, .x_valid(take), .x_ready(rdy[v]), .flip(flip_fir),
      .y(y[v]), .y_valid(y_valid[v]));
    sc_iir_cascade #(.KIND(KINDS[v]), .K(K), .W(W)) u_iir (
      .clk, .rst_n, .x_in, .x_valid(take), .x_ready(rdy[3+v]), .flip(flip_iir),
      .y(y[3+v]), .y_valid(y_valid[3+v]));
  end

endmodule
