// sng: stochastic number generator for bipolar (two's complement) inputs.
//
// A random number source (LFSR or Sobol, chosen by KIND) is compared with
// the input: the output bit is 1 when r < thr. The W-bit two's complement
// input x in [-1, 1) is mapped to the unipolar threshold (x + 1) / 2 by
// inverting its sign bit and left-aligning it to K bits, so over one full
// period of 2^K cycles the stream holds exactly thr ones and its bipolar
// value equals x. Only RNS_LFSR and RNS_SOBOL are meaningful here.
//
// Interface: load restarts the RNS (start of a stochastic number); en
// advances it; s is the current stream bit, combinational from the RNS
// register and x.
module sng #(
  parameter sc_pkg::rns_kind_e KIND = sc_pkg::RNS_LFSR,
  parameter int unsigned       K    = 10,
  parameter int unsigned       W    = 10,
  parameter logic [K-1:0]      SEED = K'(1),
  parameter int unsigned       DIM  = 1
) (
  input  logic                clk,
  input  logic                rst_n,
  input  logic                load,
  input  logic                en,
  input  logic signed [W-1:0] x,
  output logic                s
);
  logic [K-1:0] r;
  logic [K-1:0] thr;

  if (K < W) begin : g_bad
    $error("sng: K must be at least W");
  end

  if (KIND == sc_pkg::RNS_SOBOL) begin : g_sobol
    sobol_rns #(.K(K), .DIM(DIM)) u_rns (.clk, .rst_n, .load, .en, .r(r));
  end else begin : g_lfsr
    lfsr_rns #(.K(K), .SEED(SEED)) u_rns (.clk, .rst_n, .load, .en, .r(r));
  end

  assign thr = K'({~x[W-1], x[W-2:0]}) << (K - W);
  assign s   = (r < thr);

endmodule
