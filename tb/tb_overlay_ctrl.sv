// Self-checking testbench for overlay_ctrl. A behavioural model stands in for
// the weight registers (two banks, refilled after a random delay), the line
// buffer (channel done after a random time) and the Mem1 drain. Checked: the
// handshake with the host, one line-buffer start per channel on the bank that
// holds its weights, first-channel flag, release timing, flush delay, buffer
// swapping and the stall indicators.
module tb_overlay_ctrl;
  import overlay_pkg::*;
  localparam int TAIL = 3, PIPE_LAT = 7;
  logic clk = 0, rst_n = 0, cfg_commit = 0;
  logic [11:0] n_ch = 0;
  logic cfg_ack, lock, lb_start, lb_ch_done = 0, w_use_ready, w_use_bank, w_release;
  logic first_ch, cur_bank, acc_buf, drain_busy, drain_start, drain_buf, batch_done;
  logic weight_stall, flush_stall;
  int checks = 0, failures = 0;
  overlay_ctrl #(.TAIL(TAIL), .PIPE_LAT(PIPE_LAT)) dut (.*);
  always #5 clk = ~clk;
  initial begin #400000; $display("WATCHDOG"); $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1); $finish; end

  task automatic chk(input bit ok, input string msg);
    checks++;
    if (!ok) begin failures++; $display("%0t: %s", $time, msg); end
  endtask

  // ---- weight-register model
  logic full [2];
  logic ub;
  int refill [2];
  assign w_use_bank = ub;
  assign w_use_ready = full[ub];
  int wdelay = 0;
  always @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin full[0] <= 1; full[1] <= 1; ub <= 0; refill[0] <= 0; refill[1] <= 0; end
    else begin
      for (int b = 0; b < 2; b++)
        if (!full[b]) begin
          if (refill[b] == 0) full[b] <= 1; else refill[b] <= refill[b] - 1;
        end
      if (w_release) begin full[ub] <= 0; refill[ub] <= wdelay; ub <= !ub; end
    end
  end

  // ---- drain model: busy for a while after each start
  int dcnt = 0, ddelay = 0;
  assign drain_busy = (dcnt != 0);
  always @(posedge clk) if (drain_start) dcnt <= ddelay; else if (dcnt != 0) dcnt <= dcnt - 1;

  // ---- line-buffer model and checks, all sampled at negedge
  int cyc = 0, run_left = -1, starts = 0, releases = 0, done_cyc = 0, last_rel = 0;
  int ws_cycles = 0, fs_cycles = 0, exp_drain_buf = 0;
  bit in_batch = 0;
  always @(negedge clk) begin
    cyc++;
    lb_ch_done = 0;
    if (rst_n) begin
      if (weight_stall) ws_cycles++;
      if (flush_stall) fs_cycles++;
      if (weight_stall) chk(!w_use_ready && lock, "weight_stall flag");
      if (flush_stall) chk(drain_busy && lock, "flush_stall flag");
      if (lb_start) begin
        chk(w_use_ready, "start without weights");
        chk(cur_bank == ub, "channel bank is not the bank in use");
        chk(first_ch == (starts == 0), "first_ch flag");
        chk(lock, "start while unlocked");
        starts++;
        run_left = $urandom_range(1, 12);
      end
      if (run_left > 0) run_left--;
      else if (run_left == 0) begin lb_ch_done = 1; run_left = -1; done_cyc = cyc; end
      if (w_release) begin
        releases++;
        chk(cyc - done_cyc == TAIL + 1, $sformatf("release %0d cycles after done", cyc - done_cyc));
        last_rel = cyc;
      end
      if (drain_start) begin
        chk(!drain_busy, "drain started while busy");
        chk(drain_buf == exp_drain_buf, "drain buffer");
        chk(batch_done, "batch_done with drain_start");
        chk(cyc - last_rel >= PIPE_LAT, "flush too short");
        exp_drain_buf = !exp_drain_buf;
      end
      chk(acc_buf == exp_drain_buf, "accumulation buffer");
    end
  end

  task automatic batch(input int nch, input int wd, input int dd);
    wdelay = wd; ddelay = dd;
    starts = 0; releases = 0; last_rel = cyc;
    n_ch = 12'(nch);
    cfg_commit = 1;
    @(negedge clk);
    chk(cfg_ack && lock, "commit not acknowledged");
    cfg_commit = 0;
    while (!batch_done) @(negedge clk);
    chk(starts == nch, $sformatf("%0d channel starts for %0d channels", starts, nch));
    chk(releases == nch, "release count");
    @(negedge clk);
    chk(!lock, "still locked after batch");
  endtask

  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1;
    repeat (2) @(negedge clk);
    batch(1, 0, 0);
    batch(3, 0, 30);
    batch(4, 25, 5);
    batch(2, 40, 80);
    batch(0, 0, 0);
    batch(5, 3, 0);
    chk(ws_cycles > 0, "weight stall never seen");
    chk(fs_cycles > 0, "flush stall never seen");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
