// sobol_rns: Gray-code Sobol sequence generator used as a low-discrepancy
// random number source.
//
// Structure as in the source design: a K-bit index counter n feeds a
// least-significant-zero detector (the address generator), whose output
// addresses a direction-vector storage array; the addressed direction vector
// is XORed into the output register every cycle, so
//   x(n+1) = x(n) XOR v(c+1), c = position of the lowest zero bit of n,
// which yields the Sobol point whose Gray-code index is n (x(0) = 0). The
// direction vectors of dimension DIM are computed at elaboration time
// (sc_pkg::sobol_dir); which dimension each generator uses is this design's
// choice. One period of 2^K outputs is a permutation of 0..2^K-1.
//
// Interface: load clears n and x (the register's reset at the start of
// every stochastic number); en advances by one point per cycle; r = x(n).
module sobol_rns #(
  parameter int unsigned K   = 10,
  parameter int unsigned DIM = 0
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         load,
  input  logic         en,
  output logic [K-1:0] r
);
  import sc_pkg::*;

  localparam int unsigned AW = (K > 1) ? $clog2(K) : 1;

  // direction-vector storage array
  logic [K-1:0] dir_mem [K];
  for (genvar j = 0; j < K; j++) begin : g_dir
    assign dir_mem[j] = K'(sobol_dir(DIM, j + 1, K));
  end

  logic [K-1:0]  n;
  logic [AW-1:0] addr;
  logic          none;

  lsz_detector #(.K(K)) u_lsz (.n(n), .idx(addr), .none(none));

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      n <= '0;
      r <= '0;
    end else if (load) begin
      n <= '0;
      r <= '0;
    end else if (en) begin
      n <= n + 1'b1;
      r <= none ? r : (r ^ dir_mem[addr]);
    end
  end

endmodule
