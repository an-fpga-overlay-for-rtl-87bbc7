// dist_tree: the distribution tree of the processing engine.
//
// A complete binary tree with NLEAF = 2^H leaves; the first N leaves feed the
// multipliers. Conceptually every node receives a vector, makes two copies,
// right-shifts each by the shift value configured on the edge to that child
// and passes them down; a leaf hands entry 0 of its vector to its multiplier.
// Right-shifting by a then by b equals right-shifting by a+b, so this module
// carries, instead of whole vectors, the accumulated shift of each node (the
// sum of the edge shifts on its root path) and at each leaf selects entry
// `offset` of the aggregate window vector W, or zero when the offset runs past
// the end of W (the vacated positions of a right shift). The routing function
// is exactly that of the shift tree; only the realisation is cheaper.
//
// Edge shifts are control words: edge e is the edge into heap node e+2 (the
// root is node 1, node n has children 2n and 2n+1, leaf i is node NLEAF+i).
// With all shifts zero every multiplier sees W[0]. The shifts are static for a
// batch. Timing: one register; leaf values appear one cycle after W.
module dist_tree
  import overlay_pkg::*;
#(
  parameter int unsigned N     = 3072,
  parameter int unsigned WLEN  = max_wlen(16, 11),
  parameter int unsigned SH_W  = 10,
  parameter int unsigned NLEAF = 1 << clog2i(N)
) (
  input  logic             clk,
  input  logic             in_valid,
  input  pix_t             w     [WLEN],
  input  logic [SH_W-1:0]  shift [2*NLEAF-2],
  output logic             out_valid,
  output pix_t             leaf  [N]
);

  localparam int unsigned H     = clog2i(NLEAF);
  localparam int unsigned OFF_W = SH_W + H + 1;

  localparam int unsigned WIX_W = (WLEN > 1) ? clog2i(WLEN) : 1;

  logic [OFF_W-1:0] off [1:2*NLEAF-1];

  always_comb begin
    off[1] = '0;
    for (int n = 2; n < int'(2 * NLEAF); n++)
      off[n] = off[n/2] + OFF_W'(shift[n-2]);
  end

  always_ff @(posedge clk) begin
    out_valid <= in_valid;
    for (int i = 0; i < int'(N); i++)
      leaf[i] <= (off[int'(NLEAF) + i] < OFF_W'(WLEN)) ? w[WIX_W'(off[int'(NLEAF) + i])] : '0;
  end

endmodule
