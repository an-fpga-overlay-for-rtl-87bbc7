// tb_pe: processing engine at reduced size (64 multipliers). For several
// (window size, SP, FP) mixes, including windows that split over two and three
// tree levels and a pointwise-style CP window, the host layout functions set the
// edge shifts and level settings; random window vectors and weights go in
// back to back, and every output lane is compared with the dot product of its
// window and filter. The latency must be H+3 cycles and one result set must
// leave per cycle.
module tb_pe;
  import overlay_pkg::*;
  import tb_host_pkg::*;

  localparam int unsigned N = 64, WLEN = 40, LANES = 16;
  localparam int unsigned NLEAF = 64, H = 6;

  logic clk = 0, rst_n = 0;
  always #5 clk = !clk;

  logic             in_valid = 0;
  win_tag_t         in_tag = '0;
  pix_t             w [WLEN];
  pix_t             wt [2][N];
  logic [9:0]       shift [2*NLEAF-2];
  logic             lvl_en [H+1];
  logic [11:0]      lvl_pos [H+1];
  logic             out_valid;
  win_tag_t         out_tag;
  acc_t             acc [LANES];

  pe #(.N(N), .WLEN(WLEN), .LANES(LANES), .NLEAF(NLEAF), .H(H)) dut (
    .clk, .rst_n, .in_valid, .in_tag, .w, .wt, .shift, .lvl_en, .lvl_pos,
    .out_valid, .out_tag, .acc
  );

  int checks = 0, failures = 0, cycle = 0;
  always @(posedge clk) cycle++;

  // expected lane results, by window sequence number
  int exp_q [$][];
  int sent_cycle [$];

  task automatic run_mix(input int kk, input int sp, input int fp, input int nwin);
    int_da lw, lf, le, len, lpos, sh;
    int fw [] = new[fp * kk];
    pe_layout(kk, sp, fp, NLEAF, lw, lf, le, len, lpos);
    sh = edge_shifts(lw, NLEAF);
    foreach (fw[i]) fw[i] = $urandom_range(0, 200) - 100;
    for (int e = 0; e < 2*NLEAF-2; e++) shift[e] = 10'(sh[e]);
    for (int i = 0; i <= H; i++) begin lvl_en[i] = len[i][0]; lvl_pos[i] = 12'(lpos[i]); end
    for (int i = 0; i < N; i++) begin
      wt[0][i] = (lw[i] < 0) ? 16'sd0 : pix_t'(fw[lf[i]*kk + le[i]]);
      wt[1][i] = -wt[0][i];
    end
    for (int n = 0; n < nwin; n++) begin
      int ex [] = new[LANES];
      int wv [] = new[WLEN];
      bit bank = n[0];
      foreach (wv[i]) wv[i] = (i < sp*kk) ? $urandom_range(0, 2000) - 1000 : $urandom_range(0, 50);
      foreach (ex[j]) ex[j] = 0;
      for (int f = 0; f < fp; f++)
        for (int s = 0; s < sp; s++)
          for (int e = 0; e < kk; e++)
            ex[f*sp + s] += wv[s*kk + e] * fw[f*kk + e] * (bank ? -1 : 1);
      for (int i = 0; i < WLEN; i++) w[i] = pix_t'(wv[i]);
      in_valid = 1;
      in_tag = '{band: 10'(n), x: 10'(kk), first: 1'b0, bank: bank};
      exp_q.push_back(ex);
      sent_cycle.push_back(cycle);
      @(negedge clk);
    end
    in_valid = 0;
    repeat (H + 6) @(negedge clk);
  endtask

  int lanes_used = 0;
  always @(posedge clk) begin
    if (rst_n && out_valid) begin
      int ex [];
      int sc;
      ex = exp_q.pop_front();
      sc = sent_cycle.pop_front();
      checks++;
      if (cycle - sc - 1 != int'(H) + 3) begin
        failures++;
        $display("latency %0d expected %0d", cycle - sc - 1, H + 3);
      end
      for (int j = 0; j < lanes_used; j++) begin
        checks++;
        if (int'(acc[j]) != ex[j]) begin
          failures++;
          if (failures < 10) $display("lane %0d got %0d expected %0d", j, acc[j], ex[j]);
        end
      end
    end
  end

  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1;
    @(negedge clk);
    lanes_used = 6;  run_mix(9, 3, 2, 8);    // 3x3, SP=3, FP=2: partitions 8+1
    lanes_used = 2;  run_mix(25, 1, 2, 6);   // 5x5: partitions 16+8+1
    lanes_used = 4;  run_mix(7, 1, 4, 6);    // CP=7: partitions 4+2+1
    lanes_used = 16; run_mix(4, 4, 4, 6);    // 2x2: one partition
    lanes_used = 6;  run_mix(9, 2, 3, 6);    // 3x3, SP=2, FP=3
    checks++;
    if (exp_q.size() != 0) begin failures++; $display("%0d results missing", exp_q.size()); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
