// cnn_overlay: top of the CNN inference overlay.
//
// One processing pipeline computes every convolution layer, one batch of FP
// output feature maps at a time, reconfigured per batch by control words:
//
//   pixels --> line_buffer --W--> pe (dist_tree, mult_array, red_tree,
//   weights -> weight_regs ------^  shift_acc) --> out_accum (Mem 1)
//   --> post_ops --> out_fifo (Mem 2) --> output stream
//
// ctrl_mem holds the control words; overlay_ctrl sequences the channels of a
// batch and the double buffering of weights and of Mem 1. The external links
// (PCIe / DRAM) are replaced by four plain streams: control words, pixels
// (NF lanes per beat), weights (WPC per beat) and output pixels, each with
// valid/ready. Performance counters report busy, compute and stall cycles.
//
// Use: write the control words, pulse cfg_commit, wait for cfg_ack, then send
// for every input channel its weights and its pixels (see line_buffer for the
// pixel order); the batch's OFMAPs come out of the output stream, OFMAP by
// OFMAP in raster order, while the next batch may already run. batch_done
// pulses when a batch has been handed to the drain.
//
// Defaults are the published Virtex7-690t build: 3072 multipliers, 16-row
// line buffer, Mem 1 banks for FP*SP <= 735 outputs per cycle.
module cnn_overlay
  import overlay_pkg::*;
#(
  parameter int unsigned N_MULT   = 3072,
  parameter int unsigned NF       = 16,
  parameter int unsigned MAX_L    = 1024,
  parameter int unsigned BREG     = 11,
  parameter int unsigned LANES    = 735,
  parameter int unsigned M1_DEPTH = 1024,
  parameter int unsigned WPC      = 8,
  parameter int unsigned M2_DEPTH = 512,
  parameter int unsigned WLEN     = max_wlen(NF, BREG),
  parameter int unsigned NLEAF    = 1 << clog2i(N_MULT),
  parameter int unsigned H        = clog2i(NLEAF),
  parameter int unsigned CM_DEPTH = A_DTREE + 2 * NLEAF - 2
) (
  input  logic   clk,
  input  logic   rst_n,
  // control words
  input  logic   cw_valid,
  output logic   cw_ready,
  input  caddr_t cw_addr,
  input  cword_t cw_data,
  input  logic   cfg_commit,
  output logic   cfg_ack,
  output logic   batch_done,
  output logic   busy,
  // input pixels
  input  logic   px_valid,
  output logic   px_ready,
  input  pix_t   px_data [NF],
  // filter weights
  input  logic   wt_valid,
  output logic   wt_ready,
  input  pix_t   wt_data [WPC],
  // output pixels
  output logic   out_valid,
  input  logic   out_ready,
  output pix_t   out_data,
  output perf_t  perf
);

  localparam int unsigned SH_W  = 10;
  localparam int unsigned POS_W = 12;

  // ---------------- control memory and decoded configuration
  cword_t     words [CM_DEPTH];
  cword_t     head  [A_SACC];
  batch_cfg_t cfg;
  logic [4:0]       row_off [NF];
  logic             lvl_en  [H+1];
  logic [POS_W-1:0] lvl_pos [H+1];
  logic [SH_W-1:0]  shift   [2*NLEAF-2];
  logic lock;

  ctrl_mem #(.DEPTH(CM_DEPTH)) u_cmem (
    .clk, .rst_n, .lock, .cw_valid, .cw_ready, .cw_addr, .cw_data, .words
  );

  always_comb begin
    for (int i = 0; i < int'(A_SACC); i++) head[i] = words[i];
    cfg = decode_cfg(head);
    for (int i = 0; i < int'(NF); i++) row_off[i] = words[int'(A_ROWOFF) + (i % 16)][4:0];
    for (int i = 0; i <= int'(H); i++) begin
      lvl_en[i]  = words[int'(A_SACC) + 2*i][0];
      lvl_pos[i] = words[int'(A_SACC) + 2*i + 1][POS_W-1:0];
    end
    for (int e = 0; e < int'(2*NLEAF-2); e++) shift[e] = words[int'(A_DTREE) + e][SH_W-1:0];
  end

  // ---------------- sequencer
  logic lb_start, lb_done, lb_busy;
  logic w_use_ready, w_use_bank, w_release;
  logic first_ch, cur_bank, acc_buf;
  logic drain_busy, drain_start, drain_buf;
  logic weight_stall, flush_stall;

  overlay_ctrl #(.TAIL(6), .PIPE_LAT(H + 8)) u_ctrl (
    .clk, .rst_n, .cfg_commit, .n_ch(cfg.n_ch), .cfg_ack, .lock,
    .lb_start, .lb_ch_done(lb_done), .w_use_ready, .w_use_bank, .w_release,
    .first_ch, .cur_bank, .acc_buf, .drain_busy, .drain_start, .drain_buf,
    .batch_done, .weight_stall, .flush_stall
  );
  assign busy = lock;

  // ---------------- input side
  logic     w_valid;
  pix_t     w [WLEN];
  logic [9:0] w_band, w_x;
  win_tag_t w_tag;

  line_buffer #(.NF(NF), .MAX_L(MAX_L), .BREG(BREG), .WLEN(WLEN)) u_lb (
    .clk, .rst_n, .start(lb_start), .pw(cfg.pw), .k(cfg.k), .s(cfg.s), .sp(cfg.sp),
    .il(cfg.il), .n_bands(cfg.n_bands), .row_off,
    .in_valid(px_valid), .in_ready(px_ready), .in_data(px_data),
    .out_valid(w_valid), .w, .out_band(w_band), .out_x(w_x), .ch_done(lb_done), .busy(lb_busy)
  );

  pix_t wt [2][N_MULT];
  weight_regs #(.N(N_MULT), .WPC(WPC)) u_wregs (
    .clk, .rst_n, .wt_valid, .wt_ready, .wt_data, .release_bank(w_release),
    .use_bank(w_use_bank), .use_ready(w_use_ready), .wt
  );

  assign w_tag = '{band: w_band, x: w_x, first: first_ch, bank: cur_bank};

  // ---------------- processing engine
  logic     pe_valid;
  win_tag_t pe_tag;
  acc_t     pe_acc [LANES];

  pe #(.N(N_MULT), .WLEN(WLEN), .LANES(LANES), .SH_W(SH_W), .POS_W(POS_W), .NLEAF(NLEAF), .H(H)) u_pe (
    .clk, .rst_n, .in_valid(w_valid), .in_tag(w_tag), .w, .wt, .shift,
    .lvl_en, .lvl_pos, .out_valid(pe_valid), .out_tag(pe_tag), .acc(pe_acc)
  );

  // ---------------- Mem 1, output stages, Mem 2
  logic  dr_valid, dr_ready;
  acc_t  dr_data;
  logic  po_valid, po_ready;
  pix_t  po_data;
  logic [4:0]  d_qshift;
  logic        d_relu, d_pool;
  logic [10:0] d_ol;

  out_accum #(.LANES(LANES), .DEPTH(M1_DEPTH)) u_mem1 (
    .clk, .rst_n, .in_valid(pe_valid), .in_tag(pe_tag), .in_acc(pe_acc), .acc_buf,
    .sp(cfg.pw ? 5'd1 : cfg.sp), .n_out(cfg.n_out), .ol(cfg.ol),
    .drain_start, .drain_buf, .drain_fp(cfg.fp), .drain_sp(cfg.pw ? 5'd1 : cfg.sp),
    .drain_ol(cfg.ol), .drain_busy, .dr_valid, .dr_ready, .dr_data
  );

  // output-stage settings are latched for the whole drain of a batch
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      d_qshift <= '0; d_relu <= 1'b0; d_pool <= 1'b0; d_ol <= 11'd1;
    end else if (drain_start) begin
      d_qshift <= cfg.qshift; d_relu <= cfg.relu_en; d_pool <= cfg.pool_en; d_ol <= cfg.ol;
    end
  end

  post_ops #(.MAX_L(MAX_L)) u_post (
    .clk, .rst_n, .qshift(d_qshift), .relu_en(d_relu), .pool_en(d_pool), .ol(d_ol),
    .in_valid(dr_valid), .in_ready(dr_ready), .in_data(dr_data),
    .out_valid(po_valid), .out_ready(po_ready), .out_data(po_data)
  );

  out_fifo #(.DEPTH(M2_DEPTH)) u_mem2 (
    .clk, .rst_n, .in_valid(po_valid), .in_ready(po_ready), .in_data(po_data),
    .out_valid, .out_ready, .out_data
  );

  // ---------------- performance counters
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) perf <= '0;
    else begin
      if (lock)                    perf.busy         <= perf.busy + 1;
      if (w_valid)                 perf.pe_active    <= perf.pe_active + 1;
      if (lb_busy && !px_valid)    perf.in_stall     <= perf.in_stall + 1;
      if (weight_stall)            perf.weight_stall <= perf.weight_stall + 1;
      if (flush_stall)             perf.flush_stall  <= perf.flush_stall + 1;
      if (out_valid && !out_ready) perf.out_stall    <= perf.out_stall + 1;
      if (batch_done)              perf.batches      <= perf.batches + 1;
    end
  end

endmodule
