// line_buffer: programmable line buffer that turns a streamed IFMAP into SP
// vertically stacked K x K windows per step, packed into one window vector W.
//
// Storage is NF row FIFOs of up to MAX_L entries (one block RAM each) plus a
// register section of BREG entries per FIFO holding the most recent columns;
// together they are the hybrid FIFOs. SP windows of stride S need
// Z = K + S*(SP-1) rows. Operation per input channel:
//  * initial loading: rows 0..Z-1 are streamed one pixel per beat, row after
//    row, into FIFOs 0..Z-1;
//  * lateral loading: each beat carries S*SP pixels, column c of the S*SP rows
//    the next band needs. Every FIFO is read at column c (a dequeue); the new
//    pixels are enqueued into FIFOs K-S..Z-1 and the value dequeued from FIFO i
//    is enqueued into FIFO i-S*SP, which keeps the K-S rows shared by two
//    consecutive bands. This FIFO-to-FIFO routing depends on S and SP and is
//    the programmable interconnect. The dequeued column is shifted into the
//    register section, which then holds a Z x BREG base window.
//  * window extraction: on every S-th column from column K-1 on, copy register
//    s takes the K rows starting at row row_off[s] (set by the host to s*S),
//    masks the columns to K and places the rows one after another in W, so that
//    W = [W_SP .. W_1] with W_1 at index 0 and row-major order inside a window.
// In pointwise mode (pw) the line buffer is bypassed: each beat carries one
// pixel of CP (=sp field) adjacent channels and becomes W directly.
//
// Host contract: a channel is Z*IL initial beats then n_bands*IL lateral
// beats; rows beyond the image are sent as zeros. Requires K >= S and
// Z <= NF, K <= BREG. Pointwise: n_bands*IL beats (rows x columns).
// Timing: a window set leaves 3 cycles after the beat that completes it
// (pointwise: 1 cycle). ch_done pulses when the channel's last beat is taken.
module line_buffer
  import overlay_pkg::*;
#(
  parameter int unsigned NF    = 16,
  parameter int unsigned MAX_L = 1024,
  parameter int unsigned BREG  = 11,
  parameter int unsigned WLEN  = max_wlen(NF, BREG)
) (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        start,
  input  logic        pw,
  input  logic [3:0]  k,
  input  logic [2:0]  s,
  input  logic [4:0]  sp,
  input  logic [10:0] il,
  input  logic [10:0] n_bands,
  input  logic [4:0]  row_off [NF],
  input  logic        in_valid,
  output logic        in_ready,
  input  pix_t        in_data [NF],
  output logic        out_valid,
  output pix_t        w [WLEN],
  output logic [9:0]  out_band,
  output logic [9:0]  out_x,
  output logic        ch_done,
  output logic        busy
);

  localparam int unsigned AW = clog2i(MAX_L);
  localparam int unsigned RW = clog2i(NF);
  localparam int unsigned CW = clog2i(BREG);

  typedef enum logic [1:0] {S_IDLE, S_INIT, S_LAT, S_PW} state_t;
  state_t state;

  pix_t fifo [NF][MAX_L];
  pix_t regw [NF][BREG];
  pix_t rd   [NF];

  logic [10:0] c;        // column of the current beat
  logic [10:0] r;        // row (initial loading, pointwise) or band (lateral)
  logic [5:0]  z, step, ovl;
  logic        acc;

  // stage 1: dequeued column
  logic        rdv;
  logic [10:0] cd;
  logic [9:0]  bd;
  // stage 2: window emission
  logic        ev;
  logic [9:0]  eb, ex;
  logic [2:0]  ph;
  logic [9:0]  xc;

  // W assembly map, rebuilt at every start
  logic [RW-1:0] map_row [WLEN];
  logic [CW-1:0] map_col [WLEN];
  logic          map_v   [WLEN];
  logic [RW-1:0] nrow    [WLEN];
  logic [CW-1:0] ncol    [WLEN];
  logic          nv      [WLEN];

  assign z    = 6'(k) + 6'(s) * (6'(sp) - 6'd1);
  assign step = 6'(s) * 6'(sp);
  assign ovl  = 6'(k) - 6'(s);
  assign in_ready = (state != S_IDLE);
  assign busy     = (state != S_IDLE);
  assign acc      = in_valid && in_ready;

  // Element e of W: window sidx, row rr, column cc of that window.
  always_comb begin
    int unsigned cc, rr, sidx;
    cc = 0; rr = 0; sidx = 0;
    for (int e = 0; e < int'(WLEN); e++) begin
      nv[e]   = (k != 0) && (sidx < int'(sp));
      nrow[e] = RW'(int'(row_off[sidx % NF]) + rr);
      ncol[e] = CW'(int'(k) - 1 - cc);
      if (cc + 1 >= int'(k)) begin
        cc = 0;
        if (rr + 1 >= int'(k)) begin
          rr = 0;
          sidx++;
        end else rr++;
      end else cc++;
    end
  end

  always_ff @(posedge clk) begin
    if (start) begin
      map_row <= nrow;
      map_col <= ncol;
      map_v   <= nv;
    end
  end

  // Row FIFOs: read-first block RAMs, one read and up to two writes per cycle
  // at different addresses (the enqueue of column c and the FIFO-to-FIFO move
  // of the column dequeued one cycle earlier).
  always_ff @(posedge clk) begin
    for (int i = 0; i < int'(NF); i++) begin
      if (state == S_INIT && acc && int'(r) == i)
        fifo[i][AW'(c)] <= in_data[0];
      if (state == S_LAT && acc) begin
        rd[i] <= fifo[i][AW'(c)];
        if (i >= int'(ovl) && i < int'(z))
          fifo[i][AW'(c)] <= in_data[(i - int'(ovl)) % NF];
      end
      if (rdv && i < int'(ovl))
        fifo[i][AW'(cd)] <= rd[(i + int'(step)) % NF];
    end
    if (rdv) begin
      for (int i = 0; i < int'(NF); i++) begin
        regw[i][0] <= rd[i];
        for (int q = 1; q < int'(BREG); q++) regw[i][q] <= regw[i][q-1];
      end
    end
  end

  // Control: phases and counters.
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state   <= S_IDLE;
      c       <= '0;
      r       <= '0;
      ch_done <= 1'b0;
      rdv     <= 1'b0;
      cd      <= '0;
      bd      <= '0;
      ev      <= 1'b0;
      eb      <= '0;
      ex      <= '0;
      ph      <= '0;
      xc      <= '0;
    end else begin
      ch_done <= 1'b0;
      rdv     <= (state == S_LAT) && acc;
      cd      <= c;
      bd      <= r[9:0];
      case (state)
        S_IDLE: if (start) begin
          state <= pw ? S_PW : S_INIT;
          c <= '0;
          r <= '0;
        end
        S_INIT: if (acc) begin
          if (c == il - 11'd1) begin
            c <= '0;
            if (r == 11'(z) - 11'd1) begin
              r <= '0;
              state <= S_LAT;
            end else r <= r + 11'd1;
          end else c <= c + 11'd1;
        end
        S_LAT, S_PW: if (acc) begin
          if (c == il - 11'd1) begin
            c <= '0;
            if (r == n_bands - 11'd1) begin
              r <= '0;
              state <= S_IDLE;
              ch_done <= 1'b1;
            end else r <= r + 11'd1;
          end else c <= c + 11'd1;
        end
        default: state <= S_IDLE;
      endcase

      // window emission: every S-th column from column K-1 on
      ev <= 1'b0;
      if (rdv && cd >= 11'(k) - 11'd1) begin
        if (cd == 11'(k) - 11'd1 || ph == s - 3'd1) begin
          ev <= 1'b1;
          eb <= bd;
          ex <= (cd == 11'(k) - 11'd1) ? 10'd0 : xc;
          xc <= (cd == 11'(k) - 11'd1) ? 10'd1 : xc + 10'd1;
          ph <= '0;
        end else ph <= ph + 3'd1;
      end
    end
  end

  // Output register: W from the window map, or the pointwise beat.
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      out_valid <= 1'b0;
      out_band  <= '0;
      out_x     <= '0;
    end else begin
      out_valid <= (state == S_PW && acc) || ev;
      if (state == S_PW && acc) begin
        out_band <= r[9:0];
        out_x    <= c[9:0];
      end else if (ev) begin
        out_band <= eb;
        out_x    <= ex;
      end
    end
  end

  always_ff @(posedge clk) begin
    if (state == S_PW && acc) begin
      for (int e = 0; e < int'(WLEN); e++)
        w[e] <= (e < int'(sp) && e < int'(NF)) ? in_data[e % NF] : '0;
    end else if (ev) begin
      for (int e = 0; e < int'(WLEN); e++)
        w[e] <= map_v[e] ? regw[map_row[e]][map_col[e]] : '0;
    end
  end

  // Configuration rules the host must respect.
  assert property (@(posedge clk) disable iff (!rst_n) start && !pw |-> (k >= 4'(s)) && (z <= 6'(NF)) && (k <= 4'(BREG)))
    else $error("line_buffer: unsupported K/S/SP configuration");

endmodule
