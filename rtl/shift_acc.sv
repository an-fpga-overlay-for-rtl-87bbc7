// shift_acc: shift-and-accumulate pipeline behind the reduction tree.
//
// A window vector of K*K (or CP) values is split into power-of-two partitions;
// each partition is reduced at a different level of the reduction tree, and
// the partial results of one window must be added across levels. For each tree
// level i (0 = products, H = root) the host configures an enable and a start
// position p(i): vector T_i is the level-i node values starting at node p(i),
// i.e. the level right-shifted by p(i) so that the value of output lane j lies
// at index j of every T_i. Unit i adds T_i to the running vector from unit
// i-1; a disabled level adds zero. Lane j of the result is one convolution
// output (its order is set by how the host lays out the partitions).
//
// Timing: the tree delivers level i i cycles after the products and unit i is
// stage i of this pipeline, so each unit meets its level without extra delay.
// Output `acc` holds the sums H+1 cycles after the products entered the tree.
module shift_acc
  import overlay_pkg::*;
#(
  parameter int unsigned NLEAF = 4096,
  parameter int unsigned LANES = 735,
  parameter int unsigned POS_W = 12
) (
  input  logic             clk,
  input  acc_t             node [1:2*NLEAF-1],
  input  logic             en   [clog2i(NLEAF)+1],
  input  logic [POS_W-1:0] pos  [clog2i(NLEAF)+1],
  output acc_t             acc  [LANES]
);

  localparam int unsigned H = clog2i(NLEAF);

  acc_t stage [H+1][LANES];

  // Element j of T_i: node (NLEAF>>i) + p(i) + j of level i, zero outside it.
  function automatic acc_t t_elem(input acc_t nd [1:2*NLEAF-1], input int unsigned lvl,
                                  input logic e, input logic [POS_W-1:0] p, input int unsigned j);
    int unsigned width = NLEAF >> lvl;
    int unsigned idx = int'(p) + j;
    if (!e || idx >= width) return '0;
    return nd[width + idx];
  endfunction

  always_ff @(posedge clk) begin
    for (int j = 0; j < int'(LANES); j++)
      stage[0][j] <= t_elem(node, 0, en[0], pos[0], j);
    for (int i = 1; i <= int'(H); i++)
      for (int j = 0; j < int'(LANES); j++)
        stage[i][j] <= stage[i-1][j] + t_elem(node, i, en[i], pos[i], j);
  end

  assign acc = stage[H];

endmodule
