// Self-checking testbench for mult_array: random operands, both weight banks,
// checks every product and the one-cycle valid delay.
module tb_mult_array;
  import overlay_pkg::*;
  localparam int N = 8;
  logic clk = 0, in_valid = 0, bank = 0, out_valid;
  pix_t a [N];
  pix_t wt [2][N];
  acc_t p [N];
  int checks = 0, failures = 0;
  mult_array #(.N(N)) dut (.*);
  always #5 clk = ~clk;
  initial begin #200000; $display("WATCHDOG"); $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1); $finish; end
  initial begin
    int ea [N];
    logic ev, eb;
    for (int i = 0; i < N; i++) begin a[i] = 0; wt[0][i] = 0; wt[1][i] = 0; end
    @(negedge clk);
    for (int t = 0; t < 200; t++) begin
      for (int i = 0; i < N; i++) begin
        a[i] = pix_t'($urandom); wt[0][i] = pix_t'($urandom); wt[1][i] = pix_t'($urandom);
      end
      if (t < 4) begin a[0] = 16'sh8000; wt[0][0] = 16'sh8000; wt[1][0] = 16'sh7fff; end
      bank = $urandom_range(0, 1);
      in_valid = $urandom_range(0, 1);
      for (int i = 0; i < N; i++) ea[i] = int'(a[i]) * int'(wt[bank][i]);
      ev = in_valid;
      @(negedge clk);
      checks++; if (out_valid !== ev) begin failures++; $display("valid mismatch t=%0d", t); end
      for (int i = 0; i < N; i++) begin
        checks++;
        if (p[i] !== ea[i]) begin failures++; $display("t=%0d i=%0d got %0d exp %0d", t, i, p[i], ea[i]); end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
