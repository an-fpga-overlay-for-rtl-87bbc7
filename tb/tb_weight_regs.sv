// Self-checking testbench for weight_regs: random weight sets are streamed in
// beats with random gaps while the consumer releases banks at random times.
// Checks bank contents, the ready flags and that the loader prefetches into
// the free bank but never overwrites a bank still in use.
module tb_weight_regs;
  import overlay_pkg::*;
  localparam int N = 10, WPC = 4, BEATS = 3;
  logic clk = 0, rst_n = 0, wt_valid = 0, wt_ready, release_bank = 0, use_bank, use_ready;
  pix_t wt_data [WPC];
  pix_t wt [2][N];
  int checks = 0, failures = 0;
  int sets [$][N];      // weight sets sent, in order
  int used = 0, sent = 0, filled = 0;
  weight_regs #(.N(N), .WPC(WPC)) dut (.*);
  always #5 clk = ~clk;
  initial begin #200000; $display("WATCHDOG"); $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1); $finish; end

  // producer: NSETS weight sets
  localparam int NSETS = 12;
  initial begin
    int s [N];
    foreach (wt_data[l]) wt_data[l] = 0;
    repeat (3) @(negedge clk);
    for (int k = 0; k < NSETS; k++) begin
      foreach (s[i]) s[i] = $urandom_range(0, 65535) - 32768;
      sets.push_back(s);
      for (int bt = 0; bt < BEATS; bt++) begin
        while ($urandom_range(0, 2) == 0) @(negedge clk);
        for (int l = 0; l < WPC; l++) wt_data[l] = (bt * WPC + l < N) ? pix_t'(s[bt * WPC + l]) : '0;
        wt_valid = 1;
        #1;
        while (!wt_ready) begin @(negedge clk); #1; end
        @(negedge clk);
        wt_valid = 0;
      end
      sent++;
    end
  end

  // consumer: uses bank contents, then releases
  initial begin
    int expb = 0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    @(negedge clk);
    checks++; if (use_ready || !wt_ready) begin failures++; $display("flags after reset"); end
    while (used < NSETS) begin
      while (!use_ready) @(negedge clk);
      checks++; if (use_bank !== expb[0]) begin failures++; $display("use_bank %0d exp %0d", use_bank, expb); end
      for (int i = 0; i < N; i++) begin
        checks++;
        if (int'(wt[use_bank][i]) != sets[used][i]) begin failures++; $display("set %0d w%0d got %0d exp %0d", used, i, wt[use_bank][i], sets[used][i]); end
      end
      // hold the bank for a while; contents must stay put
      repeat ($urandom_range(0, 30)) begin
        @(negedge clk);
        checks++; if (int'(wt[use_bank][0]) != sets[used][0]) begin failures++; $display("bank in use overwritten"); end
        // with both banks full the loader must wait
        if (sent > used + 1 && sets.size() > used + 2) begin
          checks++; if (wt_ready && wt_valid) begin failures++; $display("loader not stalled with both banks full"); end
        end
      end
      release_bank = 1;
      @(negedge clk);
      release_bank = 0;
      used++;
      expb++;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
