// red_tree: pipelined binary reduction tree of the processing engine.
//
// The N products sit on the leaves of a complete binary tree with NLEAF = 2^H
// leaves (unused leaves are zero). Every internal node adds its two children
// and registers the sum, so level i (leaves are level 0) holds sums of aligned
// groups of 2^i products, i cycles after the products. Because every partition
// of a window vector has a power-of-two size and is placed on an aligned
// subtree, its reduced value appears at some node of level log2(size); the
// tree exposes all nodes so the shift-and-accumulate stage can collect them.
//
// Output `node` is in heap order: node 1 is the root, node n has children 2n
// and 2n+1, nodes NLEAF..2*NLEAF-1 are the (unregistered) products. New
// products may enter every cycle.
module red_tree
  import overlay_pkg::*;
#(
  parameter int unsigned N     = 3072,
  parameter int unsigned NLEAF = 1 << clog2i(N)
) (
  input  logic clk,
  input  acc_t p    [N],
  output acc_t node [1:2*NLEAF-1]
);

  acc_t sum [1:NLEAF-1];   // registered internal nodes

  always_comb begin
    for (int n = 1; n < int'(NLEAF); n++)
      node[n] = sum[n];
    for (int i = 0; i < int'(NLEAF); i++)
      node[int'(NLEAF) + i] = (i < int'(N)) ? p[i] : '0;
  end

  always_ff @(posedge clk) begin
    for (int n = 1; n < int'(NLEAF); n++)
      sum[n] <= node[2*n] + node[2*n+1];
  end

endmodule
