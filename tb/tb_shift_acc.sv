// Self-checking testbench for shift_acc: random tree node values every cycle
// and random level enables/positions; lane j of the result must be the sum over
// levels i of node (NLEAF>>i)+pos_i+j, taken from the cycle when unit i saw it.
module tb_shift_acc;
  import overlay_pkg::*;
  localparam int NLEAF = 8, LANES = 4, POS_W = 4, H = 3;
  logic clk = 0;
  acc_t node [1:2*NLEAF-1];
  logic en [H+1];
  logic [POS_W-1:0] pos [H+1];
  acc_t acc [LANES];
  int checks = 0, failures = 0;
  // history of level terms T_i[j] per cycle
  typedef int term_t [H+1][LANES];
  term_t hist [$];
  shift_acc #(.NLEAF(NLEAF), .LANES(LANES), .POS_W(POS_W)) dut (.*);
  always #5 clk = ~clk;
  initial begin #200000; $display("WATCHDOG"); $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1); $finish; end
  initial begin
    term_t tv;
    int width, idx, s;
    for (int n = 1; n < 2 * NLEAF; n++) node[n] = 0;
    for (int i = 0; i <= H; i++) begin en[i] = 0; pos[i] = 0; end
    @(negedge clk);
    for (int t = 0; t < 400; t++) begin
      for (int n = 1; n < 2 * NLEAF; n++) node[n] = acc_t'($urandom_range(0, 255));
      for (int i = 0; i <= H; i++) begin
        en[i] = $urandom_range(0, 1);
        pos[i] = POS_W'($urandom_range(0, NLEAF >> i));
      end
      for (int i = 0; i <= H; i++) begin
        width = NLEAF >> i;
        for (int j = 0; j < LANES; j++) begin
          idx = int'(pos[i]) + j;
          tv[i][j] = (en[i] && idx < width) ? int'(node[width + idx]) : 0;
        end
      end
      hist.push_front(tv);
      @(negedge clk);
      // after this edge, acc = sum_i T_i applied H-i cycles before the latest input
      if (t >= H) begin
        for (int j = 0; j < LANES; j++) begin
          s = 0;
          for (int i = 0; i <= H; i++) s += hist[H - i][i][j];
          checks++;
          if (acc[j] !== acc_t'(s)) begin failures++; $display("t=%0d lane %0d got %0d exp %0d", t, j, acc[j], s); end
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
