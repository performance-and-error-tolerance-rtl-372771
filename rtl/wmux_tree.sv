// wmux_tree: hardwired weighted multiplexer tree used as a scaled adder.
//
// A complete binary tree of 2:1 muxes with K levels and 2^K leaves. Leaf j is
// hard-wired to data input owner(j); the inputs own contiguous runs of
// leaves in index order, input i owning LEAVES[i] of them, so with uniformly
// distributed selects the output is input i with probability LEAVES[i]/2^K
// (the coefficient magnitude). Level l (l = 0 at the root) is steered by
// sel[K-1-l]: the MSB of the select word drives the root, as in the source
// design's CeMux sampler, and the selected leaf index equals sel. LEAVES must
// sum to 2^K. The default is the 3-input example tree of the source
// (weights 2/8, 5/8, 1/8). Synthesis folds muxes whose two subtrees are
// hard-wired to the same input. Combinational.
module wmux_tree #(
  parameter int unsigned NIN = 3,
  parameter int unsigned K   = 3,
  parameter int unsigned LEAVES [NIN] = '{2, 5, 1}
) (
  input  logic [NIN-1:0] m,
  input  logic [K-1:0]   sel,
  output logic           s
);
  localparam int unsigned NLEAF = 1 << K;

  function automatic int unsigned leaf_sum();
    int unsigned t = 0;
    for (int i = 0; i < NIN; i++) t += LEAVES[i];
    return t;
  endfunction

  function automatic int unsigned owner(input int unsigned j);
    int unsigned acc = 0;
    for (int i = 0; i < NIN; i++) begin
      acc += LEAVES[i];
      if (j < acc) return i;
    end
    return NIN - 1;
  endfunction

  if (leaf_sum() != NLEAF) begin : g_bad
    $error("wmux_tree: LEAVES must sum to 2^K");
  end

  // heap-ordered nodes: node 1 is the root, node i has children 2i, 2i+1,
  // leaves are nodes NLEAF .. 2*NLEAF-1
  logic node [1:2*NLEAF-1];

  for (genvar j = 0; j < NLEAF; j++) begin : g_leaf
    assign node[NLEAF + j] = m[owner(j)];
  end

  for (genvar i = 1; i < NLEAF; i++) begin : g_mux
    localparam int unsigned LVL = $clog2(i + 1) - 1;
    assign node[i] = sel[K-1-LVL] ? node[2*i+1] : node[2*i];
  end

  assign s = node[1];
endmodule
