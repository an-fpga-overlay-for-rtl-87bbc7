// pe: the processing engine. One aggregate window vector W enters per cycle
// and up to LANES convolution outputs leave per cycle, fully pipelined.
//
//   W -> dist_tree -> mult_array -> red_tree -> shift_acc -> acc[LANES]
//
// The distribution tree makes the FP copies of W and routes every partition of
// every window copy to its aligned group of multipliers; the weights come from
// the double-buffered weight registers, bank chosen by the window's tag; the
// reduction tree reduces each partition in its own subtree and the
// shift-and-accumulate pipeline adds the partitions of one window, which were
// reduced on different tree levels. All routing is set by control words (edge
// shifts, per-level enable and start position); changing them reconfigures the
// engine for another mix of K, FP and SP (or CP for pointwise layers).
//
// Timing: output valid LAT = H+3 cycles after input valid (H = tree height),
// with the input tag delayed alongside.
module pe
  import overlay_pkg::*;
#(
  parameter int unsigned N     = 3072,
  parameter int unsigned WLEN  = max_wlen(16, 11),
  parameter int unsigned LANES = 735,
  parameter int unsigned SH_W  = 10,
  parameter int unsigned POS_W = 12,
  parameter int unsigned NLEAF = 1 << clog2i(N),
  parameter int unsigned H     = clog2i(NLEAF)
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             in_valid,
  input  win_tag_t         in_tag,
  input  pix_t             w       [WLEN],
  input  pix_t             wt      [2][N],
  input  logic [SH_W-1:0]  shift   [2*NLEAF-2],
  input  logic             lvl_en  [H+1],
  input  logic [POS_W-1:0] lvl_pos [H+1],
  output logic             out_valid,
  output win_tag_t         out_tag,
  output acc_t             acc     [LANES]
);

  localparam int unsigned LAT = H + 3;

  pix_t leaf [N];
  acc_t prod [N];
  acc_t node [1:2*NLEAF-1];
  logic dv, mv;
  logic dbank;

  dist_tree #(.N(N), .WLEN(WLEN), .SH_W(SH_W), .NLEAF(NLEAF)) u_dist (
    .clk, .in_valid, .w, .shift, .out_valid(dv), .leaf
  );

  always_ff @(posedge clk) dbank <= in_tag.bank;

  mult_array #(.N(N)) u_mult (
    .clk, .in_valid(dv), .bank(dbank), .a(leaf), .wt, .out_valid(mv), .p(prod)
  );

  red_tree #(.N(N), .NLEAF(NLEAF)) u_red (.clk, .p(prod), .node);

  shift_acc #(.NLEAF(NLEAF), .LANES(LANES), .POS_W(POS_W)) u_sacc (
    .clk, .node, .en(lvl_en), .pos(lvl_pos), .acc
  );

  // valid and tag delay line matching the datapath
  logic     vpipe [LAT];
  win_tag_t tpipe [LAT];
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int i = 0; i < int'(LAT); i++) vpipe[i] <= 1'b0;
    end else begin
      vpipe[0] <= in_valid;
      for (int i = 1; i < int'(LAT); i++) vpipe[i] <= vpipe[i-1];
    end
  end
  always_ff @(posedge clk) begin
    tpipe[0] <= in_tag;
    for (int i = 1; i < int'(LAT); i++) tpipe[i] <= tpipe[i-1];
  end
  assign out_valid = vpipe[LAT-1];
  assign out_tag   = tpipe[LAT-1];

endmodule
