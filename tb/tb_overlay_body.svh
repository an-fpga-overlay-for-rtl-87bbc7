// Shared body of the end-to-end overlay testbenches. The including module
// defines the size localparams N_MULT, NF, BREG, LANES, WPC, WLEN, NLEAF, H,
// CM_DEPTH, the DUT instance `dut`, and the list of layers in `run_all`.
// The testbench acts as host and external memory: it writes control words,
// streams weights and pixels, collects the output stream with random
// back-pressure and compares every output pixel with a reference computed here.

  import overlay_pkg::*;
  import tb_host_pkg::*;

  logic   clk = 0, rst_n = 0;
  logic   cw_valid = 0, cw_ready;
  caddr_t cw_addr = '0;
  cword_t cw_data = '0;
  logic   cfg_commit = 0, cfg_ack, batch_done, busy;
  logic   px_valid = 0, px_ready;
  pix_t   px_data [NF];
  logic   wt_valid = 0, wt_ready;
  pix_t   wt_data [WPC];
  logic   out_valid, out_ready = 1;
  pix_t   out_data;
  perf_t  perf;

  always #5 clk = !clk;

  int checks = 0, failures = 0;
  int cycle = 0;
  always @(posedge clk) cycle++;

  // one layer batch as the host sees it
  typedef struct {
    bit pw; bit relu; bit pool;
    int k; int s; int sp; int fp; int il; int id; int qs;
    int w_delay;     // cycles the weight stream waits before this batch
    int out_hold;    // cycles out_ready is held low after this batch's commit
  } layer_t;

  layer_t layers [$];
  int exp_q [$];
  int n_windows_exp = 0;
  int relu_clipped = 0, saturated = 0;
  int n_pw = 0, n_stride = 0, n_pool = 0, n_multilevel = 0;
  bit pixels_done = 0, weights_done = 0;

  // per-batch data, filled by prepare()
  int img [$][];          // pixels of each batch, [c*IL*IL + y*IL + x]
  int wts [$][];          // weights of each batch, [(f*ID + c)*KK + e]
  int cwords [$][];       // control words
  int leafw [$][], leaff [$][], leafe [$][];

  function automatic int ol_of(layer_t L);
    return L.pw ? L.il : (L.il - L.k) / L.s + 1;
  endfunction

  task automatic prepare(layer_t L);
    int kk = L.pw ? L.sp : L.k * L.k;
    int sp = L.pw ? 1 : L.sp;
    int ol = ol_of(L);
    int nb = L.pw ? L.il : (ol + L.sp - 1) / L.sp;
    int nch = L.pw ? L.id / L.sp : L.id;
    int_da lw, lf, le, len, lpos, sh;
    int im [] = new[L.id * L.il * L.il];
    int wt [] = new[L.fp * L.id * (L.pw ? 1 : kk)];
    int cw [] = new[CM_DEPTH];
    int ref_o [] = new[L.fp * ol * ol];
    foreach (im[i]) im[i] = $urandom_range(0, 30) - 15;
    foreach (wt[i]) wt[i] = $urandom_range(0, 30) - 15;
    pe_layout(kk, sp, L.fp, NLEAF, lw, lf, le, len, lpos);
    sh = edge_shifts(lw, NLEAF);
    foreach (cw[i]) cw[i] = 0;
    cw[A_MODE] = (L.pw ? 1 : 0) | (L.relu ? 2 : 0) | (L.pool ? 4 : 0);
    cw[A_K] = L.pw ? 1 : L.k;  cw[A_S] = L.pw ? 1 : L.s;  cw[A_SP] = L.sp;
    cw[A_FP] = L.fp;  cw[A_IL] = L.il;  cw[A_OL] = ol;  cw[A_NCH] = nch;
    cw[A_NBANDS] = nb;  cw[A_NOUT] = L.fp * sp;  cw[A_QSHIFT] = L.qs;
    for (int s = 0; s < 16; s++) cw[A_ROWOFF + s] = s * L.s;
    for (int i = 0; i <= H; i++) begin
      cw[A_SACC + 2*i] = len[i];
      cw[A_SACC + 2*i + 1] = lpos[i];
    end
    for (int e = 0; e < 2*NLEAF-2; e++) cw[A_DTREE + e] = sh[e];
    // reference convolution
    for (int f = 0; f < L.fp; f++)
      for (int y = 0; y < ol; y++)
        for (int x = 0; x < ol; x++) begin
          int acc = 0;
          if (L.pw) begin
            for (int c = 0; c < L.id; c++)
              acc += im[(c*L.il + y)*L.il + x] * wt[f*L.id + c];
          end else begin
            for (int c = 0; c < L.id; c++)
              for (int ky = 0; ky < L.k; ky++)
                for (int kx = 0; kx < L.k; kx++)
                  acc += im[(c*L.il + y*L.s + ky)*L.il + x*L.s + kx] * wt[(f*L.id + c)*kk + ky*L.k + kx];
          end
          if (L.relu && (acc >>> L.qs) < 0) relu_clipped++;
          if ((acc >>> L.qs) > 32767 || (acc >>> L.qs) < -32768) saturated++;
          ref_o[(f*ol + y)*ol + x] = satq(acc, L.qs, L.relu);
        end
    for (int f = 0; f < L.fp; f++) begin
      if (L.pool) begin
        for (int y = 0; y < ol/2; y++)
          for (int x = 0; x < ol/2; x++) begin
            int m = ref_o[(f*ol + 2*y)*ol + 2*x];
            for (int dy = 0; dy < 2; dy++)
              for (int dx = 0; dx < 2; dx++)
                if (ref_o[(f*ol + 2*y+dy)*ol + 2*x+dx] > m) m = ref_o[(f*ol + 2*y+dy)*ol + 2*x+dx];
            exp_q.push_back(m);
          end
      end else begin
        for (int i = 0; i < ol*ol; i++) exp_q.push_back(ref_o[f*ol*ol + i]);
      end
    end
    n_windows_exp += nch * nb * (L.pw ? L.il : ol);
    if (L.pw) n_pw++;
    if (!L.pw && L.s > 1) n_stride++;
    if (L.pool) n_pool++;
    if ($countones(kk) > 1) n_multilevel++;
    img.push_back(im); wts.push_back(wt); cwords.push_back(cw);
    leafw.push_back(lw); leaff.push_back(lf); leafe.push_back(le);
  endtask

  // ---- host control: configure and commit each batch
  task automatic host_ctrl();
    @(negedge clk);
    foreach (layers[b]) begin
      for (int a = 0; a < CM_DEPTH; a++) begin
        cw_valid = 1; cw_addr = caddr_t'(a); cw_data = cword_t'(cwords[b][a]);
        while (!cw_ready) @(negedge clk);
        @(negedge clk);
      end
      cw_valid = 0;
      cfg_commit = 1;
      @(negedge clk);
      cfg_commit = 0;
      while (!cfg_ack) @(negedge clk);
      if (layers[b].out_hold > 0) out_hold_until = cycle + layers[b].out_hold;
      // wait until the batch hands over to the drain
      while (!batch_done) @(negedge clk);
      @(negedge clk);
    end
  endtask

  // ---- weight stream
  task automatic host_weights();
    @(negedge clk);
    foreach (layers[b]) begin
      layer_t L = layers[b];
      int nch = L.pw ? L.id / L.sp : L.id;
      int kk = L.pw ? L.sp : L.k * L.k;
      repeat (L.w_delay) @(negedge clk);
      for (int c = 0; c < nch; c++) begin
        int beats = (N_MULT + WPC - 1) / WPC;
        if (c > 0) repeat (L.w_delay) @(negedge clk);
        for (int bt = 0; bt < beats; bt++) begin
          for (int l = 0; l < WPC; l++) begin
            int i = bt * WPC + l;
            int v = 0;
            if (i < N_MULT && leafw[b][i] >= 0) begin
              if (L.pw) v = wts[b][leaff[b][i]*L.id + c*L.sp + leafe[b][i]];
              else      v = wts[b][(leaff[b][i]*L.id + c)*kk + leafe[b][i]];
            end
            wt_data[l] = pix_t'(v);
          end
          wt_valid = 1;
          while (!wt_ready) @(negedge clk);
          @(negedge clk);
        end
        wt_valid = 0;
      end
    end
    weights_done = 1;
  endtask

  // ---- pixel stream (with random gaps)
  // called at a falling edge; returns at the falling edge after acceptance
  task automatic send_beat(input int vals [], input int n);
    for (int l = 0; l < NF; l++) px_data[l] = pix_t'((l < n) ? vals[l] : 0);
    px_valid = 1;
    while (!px_ready) @(negedge clk);
    @(negedge clk);
    px_valid = 0;
    if ($urandom_range(0, 9) == 0) @(negedge clk);
  endtask

  task automatic host_pixels();
    int v [] = new[NF];
    @(negedge clk);
    foreach (layers[b]) begin
      layer_t L = layers[b];
      int ol = ol_of(L);
      if (L.pw) begin
        for (int g = 0; g < L.id / L.sp; g++)
          for (int y = 0; y < L.il; y++)
            for (int x = 0; x < L.il; x++) begin
              for (int t = 0; t < L.sp; t++) v[t] = img[b][((g*L.sp + t)*L.il + y)*L.il + x];
              send_beat(v, L.sp);
            end
      end else begin
        int z = L.k + L.s * (L.sp - 1);
        int step = L.s * L.sp;
        int nb = (ol + L.sp - 1) / L.sp;
        for (int c = 0; c < L.id; c++) begin
          for (int r = 0; r < z; r++)
            for (int x = 0; x < L.il; x++) begin
              v[0] = (r < L.il) ? img[b][(c*L.il + r)*L.il + x] : 0;
              send_beat(v, 1);
            end
          for (int bd = 0; bd < nb; bd++)
            for (int x = 0; x < L.il; x++) begin
              for (int m = 0; m < step; m++) begin
                int row = bd*step + z + m;
                v[m] = (row < L.il) ? img[b][(c*L.il + row)*L.il + x] : 0;
              end
              send_beat(v, step);
            end
        end
      end
    end
    pixels_done = 1;
  endtask

  // ---- output collection with random back-pressure
  int n_out_seen = 0;
  int out_hold_until = 0;
  always @(posedge clk) begin
    out_ready <= (cycle >= out_hold_until) && ($urandom_range(0, 3) != 0);
    if (rst_n && out_valid && out_ready) begin
      checks++;
      if (exp_q.size() == 0) begin
        failures++;
        $display("unexpected output %0d", out_data);
      end else begin
        int e;
        e = exp_q.pop_front();
        if (int'(out_data) != e) begin
          failures++;
          if (failures < 10) $display("output %0d: got %0d expected %0d", n_out_seen, out_data, e);
        end
      end
      n_out_seen++;
    end
  end

  // the full-size test runs too few cycles for every stall; it only reports them
  bit require_all_mech = 1'b1;

  task automatic mech(input string name, input int count);
    checks++;
    $display("mechanism %-28s %0d", name, count);
    if (count == 0 && require_all_mech) begin
      failures++;
      $display("mechanism %s never happened", name);
    end
  endtask

  task automatic run_and_check();
    int total_exp;
    foreach (layers[b]) prepare(layers[b]);
    total_exp = exp_q.size();
    repeat (3) @(posedge clk);
    rst_n = 1;
    repeat (2) @(posedge clk);
    fork
      host_ctrl();
      host_weights();
      host_pixels();
    join
    wait (exp_q.size() == 0);
    repeat (20) @(posedge clk);
    checks++;
    if (n_out_seen != total_exp) begin failures++; $display("outputs %0d of %0d", n_out_seen, total_exp); end
    checks++;
    if (perf.pe_active != n_windows_exp) begin
      failures++; $display("window vectors %0d expected %0d", perf.pe_active, n_windows_exp);
    end
    mech("batches (Mem 1 swaps)", (perf.batches >= 2) ? perf.batches : 0);
    mech("weight stall cycles", perf.weight_stall);
    mech("pixel stall cycles", perf.in_stall);
    mech("flush stall cycles", perf.flush_stall);
    mech("output back-pressure cycles", perf.out_stall);
    mech("pointwise batches", n_pw);
    mech("stride>1 batches", n_stride);
    mech("pooled batches", n_pool);
    mech("multi-level windows", n_multilevel);
    mech("ReLU clipped outputs", relu_clipped);
    $display("busy=%0d pe_active=%0d outputs=%0d", perf.busy, perf.pe_active, n_out_seen);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  endtask
