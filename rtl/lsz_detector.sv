// lsz_detector: least-significant-zero detector, the address generator of
// the Sobol random number source.
//
// Returns the index of the lowest 0 bit of n. For n with no zero bit the
// result is 0 and 'none' is set; the Sobol generator never uses that case
// within one stochastic-number period. Purely combinational.
module lsz_detector #(
  parameter int unsigned K = 10,
  localparam int unsigned AW = (K > 1) ? $clog2(K) : 1
) (
  input  logic [K-1:0]  n,
  output logic [AW-1:0] idx,
  output logic          none
);
  always_comb begin
    idx  = '0;
    none = 1'b1;
    for (int i = K - 1; i >= 0; i--) begin
      if (!n[i]) begin
        idx  = AW'(i);
        none = 1'b0;
      end
    end
  end
endmodule
