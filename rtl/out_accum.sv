// out_accum: Mem 1, the double-buffered output memory with channel summation.
//
// Each of LANES banks is one block RAM of DEPTH partial sums. Output lane
// j = f*SP + s of the processing engine (filter f of the batch, window s of the
// band) always goes to bank j, so OFMAP f is stored in SP banks, interleaved by
// rows: row y = band*SP + s, column x lives in bank f*SP + (y mod SP) at
// address band*OL + x. All lanes of one engine output are written in the same
// cycle. The first input channel of a batch overwrites, later channels add to
// what is stored (read-modify-write), which sums the partial OFMAPs over the
// input channels. Rows at or beyond OL (the unused windows of the last band)
// and lanes at or beyond n_out are not written.
//
// Two buffer sets: the controller accumulates batch k into set acc_buf while
// set drain_buf (latched at drain_start, together with FP, SP and OL) is read
// out. The drain walks OFMAP by OFMAP in raster order and emits one partial sum
// per cycle on a valid/ready stream; drain_busy is high until the last value
// has been accepted.
module out_accum
  import overlay_pkg::*;
#(
  parameter int unsigned LANES = 735,
  parameter int unsigned DEPTH = 1024
) (
  input  logic        clk,
  input  logic        rst_n,
  // accumulate side
  input  logic        in_valid,
  input  win_tag_t    in_tag,
  input  acc_t        in_acc [LANES],
  input  logic        acc_buf,
  input  logic [4:0]  sp,
  input  logic [9:0]  n_out,
  input  logic [10:0] ol,
  // drain side
  input  logic        drain_start,
  input  logic        drain_buf,
  input  logic [9:0]  drain_fp,
  input  logic [4:0]  drain_sp,
  input  logic [10:0] drain_ol,
  output logic        drain_busy,
  output logic        dr_valid,
  input  logic        dr_ready,
  output acc_t        dr_data
);

  localparam int unsigned AW = clog2i(DEPTH);
  localparam int unsigned LW = clog2i(LANES);

  acc_t mem [2][LANES][DEPTH];

  // window index s = j mod SP of every lane (static for a batch)
  logic [4:0] lane_s [LANES];
  always_comb begin
    int unsigned sc;
    sc = 0;
    for (int j = 0; j < int'(LANES); j++) begin
      lane_s[j] = 5'(sc);
      sc = (sc + 1 >= int'(sp)) ? 0 : sc + 1;
    end
  end

  logic [AW-1:0] waddr;
  logic [15:0]   row0;
  assign waddr = AW'(int'(in_tag.band) * int'(ol) + int'(in_tag.x));
  assign row0  = 16'(int'(in_tag.band) * int'(sp));

  always_ff @(posedge clk) begin
    if (in_valid) begin
      for (int j = 0; j < int'(LANES); j++) begin
        if (j < int'(n_out) && (int'(row0) + int'(lane_s[j])) < int'(ol)) begin
          if (in_tag.first) mem[acc_buf][j][waddr] <= in_acc[j];
          else              mem[acc_buf][j][waddr] <= mem[acc_buf][j][waddr] + in_acc[j];
        end
      end
    end
  end

  // drain walker
  logic        dbuf;
  logic [9:0]  dfp, f;
  logic [4:0]  dsp, ys;
  logic [10:0] dol, yb, x, y;
  logic        walking;
  logic [LW-1:0] rbank;
  logic [AW-1:0] raddr;

  assign rbank = LW'(int'(f) * int'(dsp) + int'(ys));
  assign raddr = AW'(int'(yb) * int'(dol) + int'(x));
  assign drain_busy = walking || dr_valid;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      walking  <= 1'b0;
      dr_valid <= 1'b0;
      dr_data  <= '0;
      dbuf <= 1'b0; dfp <= '0; dsp <= 5'd1; dol <= '0;
      f <= '0; ys <= '0; yb <= '0; x <= '0; y <= '0;
    end else begin
      if (dr_valid && dr_ready) dr_valid <= 1'b0;
      if (drain_start && !drain_busy) begin
        walking <= (drain_fp != 0) && (drain_ol != 0);
        dbuf <= drain_buf; dfp <= drain_fp; dsp <= drain_sp; dol <= drain_ol;
        f <= '0; ys <= '0; yb <= '0; x <= '0; y <= '0;
      end else if (walking && (!dr_valid || dr_ready)) begin
        dr_valid <= 1'b1;
        dr_data  <= mem[dbuf][rbank][raddr];
        if (x == dol - 11'd1) begin
          x <= '0;
          if (y == dol - 11'd1) begin
            y <= '0; ys <= '0; yb <= '0;
            if (f == dfp - 10'd1) walking <= 1'b0;
            else f <= f + 10'd1;
          end else begin
            y <= y + 11'd1;
            if (ys == dsp - 5'd1) begin
              ys <= '0;
              yb <= yb + 11'd1;
            end else ys <= ys + 5'd1;
          end
        end else x <= x + 11'd1;
      end
    end
  end

  assert property (@(posedge clk) disable iff (!rst_n) dr_valid && !dr_ready |=> dr_valid && $stable(dr_data))
    else $error("out_accum: drain stream dropped a value");

endmodule
