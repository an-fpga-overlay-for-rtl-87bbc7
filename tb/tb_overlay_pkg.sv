// Self-checking testbench for overlay_pkg: the sizing functions against
// brute-force values and the control-word decoder against random words.
module tb_overlay_pkg;
  import overlay_pkg::*;
  int checks = 0, failures = 0;
  task automatic chk(input bit ok, input string msg);
    checks++;
    if (!ok) begin failures++; $display("%s", msg); end
  endtask
  initial begin #100000; $display("WATCHDOG"); $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1); $finish; end
  initial begin
    cword_t m [A_SACC];
    batch_cfg_t c;
    int best, r;
    for (int n = 1; n <= 5000; n++) begin
      r = 0;
      while ((1 << r) < n) r++;
      chk(clog2i(n) == r, $sformatf("clog2i(%0d)", n));
    end
    chk(max_wlen(16, 11) == 726, "max_wlen(16,11)");
    for (int nf = 1; nf <= 20; nf++)
      for (int km = 1; km <= 12; km++) begin
        best = 0;
        for (int k = 1; k <= km && k <= nf; k++) if (k * k * (nf - k + 1) > best) best = k * k * (nf - k + 1);
        chk(max_wlen(nf, km) == best, $sformatf("max_wlen(%0d,%0d)", nf, km));
      end
    for (int t = 0; t < 200; t++) begin
      foreach (m[i]) m[i] = cword_t'($urandom);
      c = decode_cfg(m);
      chk(c.pw == m[A_MODE][0] && c.relu_en == m[A_MODE][1] && c.pool_en == m[A_MODE][2], "mode bits");
      chk(c.k == m[A_K][3:0] && c.s == m[A_S][2:0] && c.sp == m[A_SP][4:0], "k/s/sp");
      chk(c.fp == m[A_FP][9:0] && c.il == m[A_IL][10:0] && c.ol == m[A_OL][10:0], "fp/il/ol");
      chk(c.n_ch == m[A_NCH][11:0] && c.n_bands == m[A_NBANDS][10:0], "n_ch/n_bands");
      chk(c.n_out == m[A_NOUT][9:0] && c.qshift == m[A_QSHIFT][4:0], "n_out/qshift");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
