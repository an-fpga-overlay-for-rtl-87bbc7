// overlay_pkg: types, sizes and the control-memory address map shared by the
// CNN overlay. Pixels and weights are 16-bit signed fixed point (the format the
// overlay is evaluated with); products and partial sums are 32-bit signed and
// wrap on overflow. The number of fraction bits is not fixed by the hardware:
// the host picks the output re-quantisation shift per batch.
//
// Default sizes follow the Virtex7-690t build: 3072 multipliers in the
// processing engine, a 16-row line buffer, Mem 1 sized by the BRAM budget
// 2*FP*SP <= 1470. Sizes that the hardware derives rather than the published design
// states (window-vector length, tree depth, field widths) are computed here.
package overlay_pkg;

  localparam int unsigned PIX_W = 16;
  localparam int unsigned ACC_W = 32;

  typedef logic signed [PIX_W-1:0] pix_t;
  typedef logic signed [ACC_W-1:0] acc_t;

  // Control words are 16 bits wide.
  localparam int unsigned CW_W   = 16;
  localparam int unsigned CADR_W = 14;
  typedef logic [CW_W-1:0]   cword_t;
  typedef logic [CADR_W-1:0] caddr_t;

  // ceil(log2(n)) for n >= 1
  function automatic int unsigned clog2i(input int unsigned n);
    int unsigned r = 0;
    while ((1 << r) < n) r++;
    return r;
  endfunction

  // Longest aggregate window vector W = SP*K*K the line buffer can build when it
  // holds NF rows and windows are at most KMAX wide: max over K of K*K*(NF-K+1).
  function automatic int unsigned max_wlen(input int unsigned nf, input int unsigned kmax);
    int unsigned best = 0;
    for (int unsigned k = 1; k <= kmax && k <= nf; k++)
      if (k * k * (nf - k + 1) > best) best = k * k * (nf - k + 1);
    return best;
  endfunction

  // Tag that travels with a window through the pipeline.
  typedef struct packed {
    logic [9:0] band;   // band of SP output rows (pointwise: output row)
    logic [9:0] x;      // output column
    logic       first;  // first input channel of the batch: overwrite Mem 1
    logic       bank;   // weight bank used for this window
  } win_tag_t;

  // Per-batch scalar configuration, decoded from the control memory.
  typedef struct packed {
    logic        pw;        // pointwise mode: line buffer bypassed, W = CP channels
    logic        relu_en;   // ReLU stage enabled
    logic        pool_en;   // 2x2/2 max-pool stage enabled
    logic [3:0]  k;         // kernel size K (1..11)
    logic [2:0]  s;         // stride S (1..4)
    logic [4:0]  sp;        // surface parallelism SP (pointwise: CP)
    logic [9:0]  fp;        // filter parallelism FP
    logic [10:0] il;        // IFMAP row length IL
    logic [10:0] ol;        // OFMAP side OL
    logic [11:0] n_ch;      // input channels (pointwise: channel groups)
    logic [10:0] n_bands;   // bands per channel (pointwise: rows)
    logic [9:0]  n_out;     // FP*SP output lanes in use
    logic [4:0]  qshift;    // output re-quantisation right shift
  } batch_cfg_t;

  // Hardware performance counters (cycles unless noted).
  typedef struct packed {
    logic [31:0] busy;          // a batch is configured and being computed
    logic [31:0] pe_active;     // the engine took a window vector
    logic [31:0] in_stall;      // line buffer waiting for pixels
    logic [31:0] weight_stall;  // channel waiting for its weights
    logic [31:0] flush_stall;   // batch done, previous drain not finished
    logic [31:0] out_stall;     // output stream back-pressure
    logic [31:0] batches;       // batches completed (count)
  } perf_t;

  // Control-memory address map.
  localparam int unsigned A_MODE    = 0;  // bit0 pw, bit1 relu_en, bit2 pool_en
  localparam int unsigned A_K       = 1;
  localparam int unsigned A_S       = 2;
  localparam int unsigned A_SP      = 3;
  localparam int unsigned A_FP      = 4;
  localparam int unsigned A_IL      = 5;
  localparam int unsigned A_OL      = 6;
  localparam int unsigned A_NCH     = 7;
  localparam int unsigned A_NBANDS  = 8;
  localparam int unsigned A_NOUT    = 9;
  localparam int unsigned A_QSHIFT  = 10;
  localparam int unsigned A_ROWOFF  = 16;  // 16 copy-register row selects
  localparam int unsigned A_SACC    = 32;  // per tree level: 2*i enable, 2*i+1 start position
  localparam int unsigned A_DTREE   = 64;  // distribution-tree edge shifts, edge e at A_DTREE+e

  function automatic batch_cfg_t decode_cfg(input cword_t m [A_SACC]);
    batch_cfg_t c;
    c.pw      = m[A_MODE][0];
    c.relu_en = m[A_MODE][1];
    c.pool_en = m[A_MODE][2];
    c.k       = m[A_K][3:0];
    c.s       = m[A_S][2:0];
    c.sp      = m[A_SP][4:0];
    c.fp      = m[A_FP][9:0];
    c.il      = m[A_IL][10:0];
    c.ol      = m[A_OL][10:0];
    c.n_ch    = m[A_NCH][11:0];
    c.n_bands = m[A_NBANDS][10:0];
    c.n_out   = m[A_NOUT][9:0];
    c.qshift  = m[A_QSHIFT][4:0];
    return c;
  endfunction

endpackage
