// Self-checking testbench for red_tree: a new random product vector every
// cycle; every tree node at depth d must equal the sum of its leaves as they
// were H-d cycles earlier (one register per level).
module tb_red_tree;
  import overlay_pkg::*;
  localparam int N = 6, NLEAF = 8, H = 3;
  logic clk = 0;
  acc_t p [N];
  acc_t node [1:2*NLEAF-1];
  int checks = 0, failures = 0;
  int hist [$][NLEAF];
  red_tree #(.N(N), .NLEAF(NLEAF)) dut (.*);
  always #5 clk = ~clk;
  initial begin #200000; $display("WATCHDOG"); $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1); $finish; end
  function automatic int depth_of(int n);
    int d = 0;
    while (n > 1) begin n = n / 2; d++; end
    return d;
  endfunction
  initial begin
    int v [NLEAF];
    int d, lat, lo, span, s;
    foreach (p[i]) p[i] = 0;
    @(negedge clk);
    for (int t = 0; t < 300; t++) begin
      for (int i = 0; i < NLEAF; i++) v[i] = (i < N) ? ((t < 100) ? $urandom_range(0, 1000) : int'($urandom)) : 0;
      for (int i = 0; i < N; i++) p[i] = acc_t'(v[i]);
      hist.push_front(v);        // hist[k] = vector applied k cycles ago
      #1;
      if (t >= H) begin
        for (int n = 1; n < 2 * NLEAF; n++) begin
          d = depth_of(n);
          lat = H - d;
          span = NLEAF >> d;
          lo = (n - (1 << d)) * span;
          s = 0;
          for (int i = lo; i < lo + span; i++) s += hist[lat][i];
          checks++;
          if (node[n] !== acc_t'(s)) begin failures++; $display("t=%0d node %0d got %0d exp %0d", t, n, node[n], s); end
        end
      end
      @(negedge clk);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
