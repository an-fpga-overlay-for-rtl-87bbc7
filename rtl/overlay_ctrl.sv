// overlay_ctrl: batch sequencer of the overlay.
//
// A batch is one set of FP filters applied to the whole input volume with one
// configuration. The host first fills the control memory and then pulses
// cfg_commit; the sequencer acknowledges (cfg_ack), locks the control memory
// and walks the input channels: for each channel it waits until the weight
// bank for that channel is full (weight stall), starts the line buffer, waits
// for the channel's last beat, lets the last windows pass the multipliers
// (TAIL cycles) and releases the weight bank so the loader can prefetch into
// it; one more cycle passes before the next channel looks for its bank. After the last channel it waits PIPE_LAT cycles until the last partial
// sums are in Mem 1, then swaps the Mem 1 buffer sets and starts the drain of
// the finished batch. If the previous batch is still draining, the swap waits
// (flush stall). The control memory is unlocked at the swap, so the host can
// configure the next batch while this one drains.
//
// Outputs first_ch and cur_bank are steady for a whole channel and tag the
// windows of that channel.
module overlay_ctrl
  import overlay_pkg::*;
#(
  parameter int unsigned TAIL     = 6,
  parameter int unsigned PIPE_LAT = 20
) (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        cfg_commit,
  input  logic [11:0] n_ch,
  output logic        cfg_ack,
  output logic        lock,
  output logic        lb_start,
  input  logic        lb_ch_done,
  input  logic        w_use_ready,
  input  logic        w_use_bank,
  output logic        w_release,
  output logic        first_ch,
  output logic        cur_bank,
  output logic        acc_buf,
  input  logic        drain_busy,
  output logic        drain_start,
  output logic        drain_buf,
  output logic        batch_done,
  output logic        weight_stall,
  output logic        flush_stall
);

  typedef enum logic [2:0] {S_IDLE, S_CH_WAIT, S_CH_RUN, S_CH_TAIL, S_CH_NEXT, S_FLUSH, S_SWAP} state_t;
  state_t state;

  logic [11:0] ch;
  logic [7:0]  cnt;

  assign weight_stall = (state == S_CH_WAIT) && !w_use_ready;
  assign flush_stall  = (state == S_SWAP) && drain_busy;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state <= S_IDLE;
      ch <= '0; cnt <= '0;
      cfg_ack <= 1'b0; lock <= 1'b0; lb_start <= 1'b0; w_release <= 1'b0;
      first_ch <= 1'b0; cur_bank <= 1'b0; acc_buf <= 1'b0;
      drain_start <= 1'b0; drain_buf <= 1'b0; batch_done <= 1'b0;
    end else begin
      cfg_ack <= 1'b0; lb_start <= 1'b0; w_release <= 1'b0;
      drain_start <= 1'b0; batch_done <= 1'b0;
      case (state)
        S_IDLE: if (cfg_commit) begin
          cfg_ack <= 1'b1;
          lock    <= 1'b1;
          ch      <= '0;
          state   <= (n_ch == 0) ? S_FLUSH : S_CH_WAIT;
          cnt     <= '0;
        end
        S_CH_WAIT: if (w_use_ready) begin
          lb_start <= 1'b1;
          cur_bank <= w_use_bank;
          first_ch <= (ch == 0);
          state    <= S_CH_RUN;
        end
        S_CH_RUN: if (lb_ch_done) begin
          cnt   <= '0;
          state <= S_CH_TAIL;
        end
        S_CH_TAIL: begin
          cnt <= cnt + 8'd1;
          if (cnt == 8'(TAIL - 1)) begin
            w_release <= 1'b1;
            cnt <= '0;
            ch  <= ch + 12'd1;
            state <= S_CH_NEXT;
          end
        end
        // one cycle for the release to reach the weight registers
        S_CH_NEXT: state <= (ch == n_ch) ? S_FLUSH : S_CH_WAIT;
        S_FLUSH: begin
          cnt <= cnt + 8'd1;
          if (cnt == 8'(PIPE_LAT - 1)) state <= S_SWAP;
        end
        S_SWAP: if (!drain_busy) begin
          drain_start <= 1'b1;
          drain_buf   <= acc_buf;
          acc_buf     <= !acc_buf;
          batch_done  <= 1'b1;
          lock        <= 1'b0;
          state       <= S_IDLE;
        end
        default: state <= S_IDLE;
      endcase
    end
  end

  assert property (@(posedge clk) disable iff (!rst_n) lb_start |-> w_use_ready)
    else $error("overlay_ctrl: channel started without its weights");

endmodule
