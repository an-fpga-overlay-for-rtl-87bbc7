// Self-checking testbench for dist_tree: random edge shifts, checks that each
// leaf receives window element (sum of shifts on its root path), or zero past
// the window, one cycle after the input.
module tb_dist_tree;
  import overlay_pkg::*;
  localparam int N = 6, WLEN = 10, SH_W = 3, NLEAF = 8;
  logic clk = 0, in_valid = 0, out_valid;
  pix_t w [WLEN];
  logic [SH_W-1:0] shift [2*NLEAF-2];
  pix_t leaf [N];
  int checks = 0, failures = 0;
  dist_tree #(.N(N), .WLEN(WLEN), .SH_W(SH_W), .NLEAF(NLEAF)) dut (.*);
  always #5 clk = ~clk;
  initial begin #200000; $display("WATCHDOG"); $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1); $finish; end
  initial begin
    int off [1:2*NLEAF-1];
    int exp_l [N];
    logic ev;
    foreach (w[i]) w[i] = 0;
    foreach (shift[i]) shift[i] = 0;
    @(negedge clk);
    for (int t = 0; t < 300; t++) begin
      foreach (w[i]) w[i] = pix_t'($urandom);
      // the first rounds use small shifts so most leaves land inside the window
      foreach (shift[i]) shift[i] = (t < 150) ? SH_W'($urandom_range(0, 1)) : SH_W'($urandom);
      in_valid = $urandom_range(0, 1);
      off[1] = 0;
      for (int n = 2; n < 2 * NLEAF; n++) off[n] = off[n/2] + int'(shift[n-2]);
      for (int i = 0; i < N; i++) exp_l[i] = (off[NLEAF+i] < WLEN) ? int'(w[off[NLEAF+i]]) : 0;
      ev = in_valid;
      @(negedge clk);
      checks++; if (out_valid !== ev) begin failures++; $display("valid t=%0d", t); end
      for (int i = 0; i < N; i++) begin
        checks++;
        if (int'(leaf[i]) != exp_l[i]) begin failures++; $display("t=%0d leaf %0d got %0d exp %0d", t, i, leaf[i], exp_l[i]); end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
