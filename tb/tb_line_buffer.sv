// tb_line_buffer: line buffer at reduced size (8 row FIFOs, rows up to 16,
// 5 register columns). For 3x3 stride 1 with SP=2, 3x3 stride 2 with SP=2,
// 5x5 stride 1 with SP=1 and a pointwise pass with CP=3, it streams an image
// as the host would (initial rows, then S*SP rows per beat, zeros below the
// image) and compares every window vector with the image. It also checks the
// number of windows, that a stride-1 band delivers a window set on every beat
// once K columns are in, and the channel-done pulse.
module tb_line_buffer;
  import overlay_pkg::*;

  localparam int unsigned NF = 8, MAX_L = 16, BREG = 5;
  localparam int unsigned WLEN = max_wlen(NF, BREG);

  logic clk = 0, rst_n = 0;
  always #5 clk = !clk;

  logic        start = 0, pw = 0;
  logic [3:0]  k = 0;
  logic [2:0]  s = 1;
  logic [4:0]  sp = 1;
  logic [10:0] il = 0, n_bands = 0;
  logic [4:0]  row_off [NF];
  logic        in_valid = 0, in_ready;
  pix_t        in_data [NF];
  logic        out_valid, ch_done, busy;
  pix_t        w [WLEN];
  logic [9:0]  out_band, out_x;

  line_buffer #(.NF(NF), .MAX_L(MAX_L), .BREG(BREG)) dut (
    .clk, .rst_n, .start, .pw, .k, .s, .sp, .il, .n_bands, .row_off,
    .in_valid, .in_ready, .in_data, .out_valid, .w, .out_band, .out_x, .ch_done, .busy
  );

  int checks = 0, failures = 0;
  int img [];
  int cur_k, cur_s, cur_sp, cur_il, cur_pw;
  int nwin = 0, ndone = 0, back_to_back = 0, last_out = -10, cycle = 0;
  always @(posedge clk) cycle++;

  function automatic int px(input int c, input int y, input int x);
    if (y >= cur_il || x >= cur_il) return 0;
    return img[(c*cur_il + y)*cur_il + x];
  endfunction

  always @(posedge clk) begin
    if (rst_n && ch_done) ndone++;
    if (rst_n && out_valid) begin
      nwin++;
      if (cycle == last_out + 1) back_to_back++;
      last_out = cycle;
      for (int e = 0; e < int'(WLEN); e++) begin
        int ex, wi, r, cc;
        ex = 0;
        if (cur_pw) ex = (e < cur_sp) ? px(e, int'(out_band), int'(out_x)) : 0;
        else if (e < cur_sp * cur_k * cur_k) begin
          wi = e / (cur_k * cur_k); r = (e % (cur_k * cur_k)) / cur_k; cc = e % cur_k;
          ex = px(0, (int'(out_band) * cur_sp + wi) * cur_s + r, int'(out_x) * cur_s + cc);
        end
        checks++;
        if (int'(w[e]) != ex) begin
          failures++;
          if (failures < 10) $display("band %0d x %0d e %0d: got %0d expected %0d", out_band, out_x, e, w[e], ex);
        end
      end
    end
  end

  task automatic beat(input int vals [], input int n);
    for (int l = 0; l < int'(NF); l++) in_data[l] = pix_t'((l < n) ? vals[l] : 0);
    in_valid = 1;
    while (!in_ready) @(negedge clk);
    @(negedge clk);
    in_valid = 0;
  endtask

  task automatic run(input int kk, input int ss, input int spp, input int ill, input bit p);
    int ol = p ? ill : (ill - kk) / ss + 1;
    int nb = p ? ill : (ol + spp - 1) / spp;
    int z = kk + ss * (spp - 1), step = ss * spp;
    int v [] = new[NF];
    int nwin0 = nwin, nd0 = ndone, bb0 = back_to_back;
    cur_k = kk; cur_s = ss; cur_sp = spp; cur_il = ill; cur_pw = p;
    img = new[(p ? spp : 1) * ill * ill];
    foreach (img[i]) img[i] = $urandom_range(1, 1000);
    pw = p; k = 4'(kk); s = 3'(ss); sp = 5'(spp); il = 11'(ill); n_bands = 11'(nb);
    for (int i = 0; i < int'(NF); i++) row_off[i] = 5'(i * ss);
    start = 1; @(negedge clk); start = 0;
    if (p) begin
      for (int y = 0; y < ill; y++)
        for (int x = 0; x < ill; x++) begin
          for (int t = 0; t < spp; t++) v[t] = px(t, y, x);
          beat(v, spp);
        end
    end else begin
      for (int r = 0; r < z; r++)
        for (int x = 0; x < ill; x++) begin v[0] = px(0, r, x); beat(v, 1); end
      for (int b = 0; b < nb; b++)
        for (int x = 0; x < ill; x++) begin
          for (int m = 0; m < step; m++) v[m] = px(0, b*step + z + m, x);
          beat(v, step);
        end
    end
    repeat (6) @(negedge clk);
    checks++;
    if (nwin - nwin0 != nb * ol) begin
      failures++; $display("windows %0d expected %0d", nwin - nwin0, nb * ol);
    end
    checks++;
    if (ndone - nd0 != 1) begin failures++; $display("channel done pulses %0d", ndone - nd0); end
    if (!p && ss == 1) begin
      checks++;
      // in every band all but the first window follow the previous one directly
      if (back_to_back - bb0 < nb * (ol - 1)) begin
        failures++; $display("stride-1 rate: %0d back-to-back windows, expected %0d", back_to_back - bb0, nb * (ol - 1));
      end
    end
  endtask

  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1;
    @(negedge clk);
    run(3, 1, 2, 7, 0);
    run(3, 2, 2, 9, 0);
    run(5, 1, 1, 6, 0);
    run(3, 1, 3, 8, 0);
    run(1, 1, 3, 4, 1);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
