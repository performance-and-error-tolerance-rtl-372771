// lfsr_rns: K-bit linear feedback shift register used as a random number
// source (RNS) for stochastic number generators.
//
// A Fibonacci LFSR shifts left each enabled cycle, feeding back the XOR of
// its tap bits. As in the source design, extra logic inserts the all-zero
// state into the maximal-length sequence: the feedback bit is inverted
// whenever the K-1 low bits are all zero, so the register walks through all
// 2^K states (a de Bruijn sequence) and one period of 2^K values is an exact
// permutation of 0..2^K-1. The tap polynomial (sc_pkg::lfsr_taps) is this
// design's choice; RECIP = 1 selects its reciprocal polynomial, whose
// sequence runs the other way round and so decorrelates generators that
// must be independent of the default ones.
//
// Interface: load (priority) sets the register to SEED; en advances it by one
// state; r is the current value. Reset also loads SEED. One state per cycle.
module lfsr_rns #(
  parameter int unsigned K    = 10,
  parameter logic [K-1:0] SEED = K'(1),
  parameter bit           RECIP = 1'b0
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         load,
  input  logic         en,
  output logic [K-1:0] r
);
  import sc_pkg::*;

  localparam logic [MAX_K-1:0] TAPS_FULL = lfsr_taps(K);
  localparam logic [K-1:0]     TAPS_DIR  = TAPS_FULL[K-1:0];

  // reciprocal polynomial: tap t < K moves to K - t
  function automatic logic [K-1:0] recip_taps(input logic [K-1:0] t);
    logic [K-1:0] m;
    m = '0;
    m[K-1] = 1'b1;
    for (int i = 0; i < K - 1; i++)
      if (t[i]) m[K-2-i] = 1'b1;
    return m;
  endfunction

  localparam logic [K-1:0]     TAPS      = RECIP ? recip_taps(TAPS_DIR) : TAPS_DIR;

  logic fb;

  always_comb begin
    fb = ^(r & TAPS);
    // all-zero state insertion
    if (r[K-2:0] == '0) fb = ~fb;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)    r <= SEED;
    else if (load) r <= SEED;
    else if (en)   r <= {r[K-2:0], fb};
  end

endmodule
