// OR tree that merges N request lines into one.
//
// A cluster uses one to merge the error pulses of all its EDSs into the set
// input of the shared error storage, one for the stall requests of all its
// neighbour clusters and one for the error flags of all its upstream
// clusters. The architecture only names an "OR tree"; the layout is this
// design's choice: a complete binary tree of two-input ORs stored as a heap
// (node k has children 2k+1 and 2k+2, the N inputs are the last N nodes,
// node 0 is the root), so the depth grows with log2(N). Combinational.
module or_tree #(
  parameter int unsigned N = 4
) (
  input  logic [N-1:0] in,
  output logic         out
);
  timeunit 1ps;
  timeprecision 1ps;

  logic [2*N-2:0] node;

  for (genvar k = 0; k < N; k++) begin : g_leaf
    assign node[N-1+k] = in[k];
  end
  for (genvar k = 0; k < N - 1; k++) begin : g_node
    assign node[k] = node[2*k+1] | node[2*k+2];
  end

  assign out = node[0];
endmodule
