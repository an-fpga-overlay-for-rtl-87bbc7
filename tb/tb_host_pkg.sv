// tb_host_pkg: host-side configuration and reference arithmetic for the
// testbenches. It plays the part of the host software: it lays window
// partitions out on the multipliers, derives the distribution-tree edge shifts
// and the shift-and-accumulate level settings, and computes expected results.
//
// Layout rule (the one the processing engine is built for): a window of KK
// values (K*K, or CP for pointwise layers) is split into power-of-two
// partitions, one per set bit of KK, largest first in window order. All
// partitions of one size, for every output lane j = f*SP + s, are placed next
// to each other; size groups follow in decreasing size. Partition of size m of
// lane j is then reduced at tree level log2(m), node pos(m) + j.
package tb_host_pkg;

  typedef int int_da[];

  // leaf_w[i]   : index into W feeding leaf i, -1 when unused
  // leaf_f[i]   : filter of leaf i; leaf_e[i]: element of the window
  // lvl_en/pos  : per tree level
  function automatic void pe_layout(input int kk, input int sp, input int fp, input int nleaf,
                                    output int_da leaf_w, output int_da leaf_f, output int_da leaf_e,
                                    output int_da lvl_en, output int_da lvl_pos);
    int h = $clog2(nleaf);
    int base = 0;
    leaf_w = new[nleaf]; leaf_f = new[nleaf]; leaf_e = new[nleaf];
    lvl_en = new[h+1]; lvl_pos = new[h+1];
    foreach (leaf_w[i]) begin leaf_w[i] = -1; leaf_f[i] = 0; leaf_e[i] = 0; end
    foreach (lvl_en[i]) begin lvl_en[i] = 0; lvl_pos[i] = 0; end
    for (int lv = h; lv >= 0; lv--) begin
      int m = 1 << lv;
      int poff;
      if (((kk >> lv) & 1) == 0) continue;
      poff = (kk >> (lv + 1)) << (lv + 1);   // sizes larger than m come first
      lvl_en[lv] = 1;
      lvl_pos[lv] = base / m;
      for (int f = 0; f < fp; f++)
        for (int s = 0; s < sp; s++)
          for (int t = 0; t < m; t++) begin
            leaf_w[base] = s * kk + poff + t;
            leaf_f[base] = f;
            leaf_e[base] = poff + t;
            base++;
          end
    end
  endfunction

  // Edge shifts so that leaf i receives W[leaf_w[i]]; edge e enters node e+2.
  function automatic int_da edge_shifts(input int_da leaf_w, input int nleaf);
    int o [] = new[2*nleaf];
    int oe [] = new[2*nleaf];
    int_da sh = new[2*nleaf-2];
    localparam int INF = 32'h3fffffff;
    for (int i = 0; i < nleaf; i++) o[nleaf+i] = (leaf_w[i] < 0) ? INF : leaf_w[i];
    for (int n = nleaf-1; n >= 1; n--) o[n] = (o[2*n] < o[2*n+1]) ? o[2*n] : o[2*n+1];
    oe[1] = 0;
    for (int n = 2; n < 2*nleaf; n++) begin
      oe[n] = (o[n] == INF) ? oe[n/2] : o[n];
      sh[n-2] = oe[n] - oe[n/2];
    end
    return sh;
  endfunction

  function automatic int satq(input int v, input int qs, input bit relu);
    int q = v >>> qs;
    if (q > 32767) q = 32767;
    if (q < -32768) q = -32768;
    if (relu && q < 0) q = 0;
    return q;
  endfunction

endpackage
