// pcc_array: the probability conversion array of the CeMux adder.
//
// Z comparators share one random number r. Following the source design,
// an input with a positive weight gives c = (r < thr); an input with a
// negative weight is compared against the inverted random number and the
// comparator output is inverted, c = ~(~r < thr). The second form carries
// the bipolar value -x and is of the same "r below a threshold" shape, so all
// Z output streams are maximally positively correlated (SCC = +1), which is
// what makes the following mux tree exact up to its select sampling.
// Thresholds map two's complement inputs to (x + 1) / 2 as in sng.
// NEG[i] is the sign of the weight of input i. Combinational.
module pcc_array #(
  parameter int unsigned  Z   = 3,
  parameter int unsigned  K   = 10,
  parameter int unsigned  W   = 10,
  parameter logic [Z-1:0] NEG = '0
) (
  input  logic [K-1:0]         r,
  input  logic signed [W-1:0]  x [Z],
  output logic [Z-1:0]         c
);
  if (K < W) begin : g_bad
    $error("pcc_array: K must be at least W");
  end

  for (genvar i = 0; i < Z; i++) begin : g_cmp
    logic [K-1:0] thr;
    assign thr = K'({~x[i][W-1], x[i][W-2:0]}) << (K - W);
    if (NEG[i]) begin : g_neg
      assign c[i] = ~((~r) < thr);
    end else begin : g_pos
      assign c[i] = (r < thr);
    end
  end
endmodule
