// Self-checking testbench for out_accum: two batches with different SP/FP/OL
// are accumulated over two channels into the two buffers; the first buffer
// is drained while the second is being written. The drain stream (OFMAP,
// row, column order, random back-pressure) is compared with a model.
module tb_out_accum;
  import overlay_pkg::*;
  localparam int LANES = 6, DEPTH = 16;
  logic clk = 0, rst_n = 0, in_valid = 0, acc_buf = 0;
  win_tag_t in_tag;
  acc_t in_acc [LANES];
  logic [4:0] sp = 1, drain_sp = 1;
  logic [9:0] n_out = 0, drain_fp = 0;
  logic [10:0] ol = 0, drain_ol = 0;
  logic drain_start = 0, drain_buf = 0, drain_busy, dr_valid, dr_ready = 0;
  acc_t dr_data;
  int checks = 0, failures = 0;
  int expq [$];
  int n_seen = 0;
  out_accum #(.LANES(LANES), .DEPTH(DEPTH)) dut (.*);
  always #5 clk = ~clk;
  initial begin #200000; $display("WATCHDOG"); $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1); $finish; end

  // drain checker with random ready
  always @(negedge clk) begin
    int e;
    dr_ready = ($urandom_range(0, 2) != 0);
    #1;
    if (dr_valid && dr_ready) begin
      checks++;
      if (expq.size() == 0) begin failures++; $display("unexpected drain value %0d", dr_data); end
      else begin
        e = expq.pop_front();
        if (dr_data !== acc_t'(e)) begin failures++; $display("drain %0d got %0d exp %0d", n_seen, dr_data, e); end
      end
      n_seen++;
    end
  end

  // accumulate one batch (2 channels) into buffer b; returns the model
  task automatic run_batch(input bit b, input int s_p, input int f_p, input int o_l, ref int model [$]);
    int bands = (o_l + s_p - 1) / s_p;
    int out [LANES][DEPTH];
    int v;
    foreach (out[j, a]) out[j][a] = 0;
    acc_buf = b; sp = 5'(s_p); n_out = 10'(f_p * s_p); ol = 11'(o_l);
    for (int c = 0; c < 2; c++)
      for (int bd = 0; bd < bands; bd++)
        for (int x = 0; x < o_l; x++) begin
          in_tag = '{band: 10'(bd), x: 10'(x), first: (c == 0), bank: 1'b0};
          for (int j = 0; j < LANES; j++) begin
            v = $urandom_range(0, 1000) - 500;
            in_acc[j] = acc_t'(v);
            out[j][bd * o_l + x] += v;
          end
          in_valid = 1;
          @(negedge clk);
          in_valid = 0;
          if ($urandom_range(0, 3) == 0) @(negedge clk);
        end
    // model stream order: OFMAP f, row y = band*SP+s, column x
    for (int f = 0; f < f_p; f++)
      for (int y = 0; y < o_l; y++)
        for (int x = 0; x < o_l; x++)
          model.push_back(out[f * s_p + y % s_p][(y / s_p) * o_l + x]);
  endtask

  task automatic drain(input bit b, input int s_p, input int f_p, input int o_l, ref int model [$]);
    while (drain_busy) @(negedge clk);
    foreach (model[i]) expq.push_back(model[i]);
    drain_buf = b; drain_sp = 5'(s_p); drain_fp = 10'(f_p); drain_ol = 11'(o_l);
    drain_start = 1;
    @(negedge clk);
    drain_start = 0;
  endtask

  initial begin
    int m0 [$], m1 [$], m2 [$];
    in_tag = '0;
    foreach (in_acc[j]) in_acc[j] = 0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    @(negedge clk);
    run_batch(0, 2, 3, 5, m0);
    drain(0, 2, 3, 5, m0);
    run_batch(1, 1, 6, 4, m1);       // written while buffer 0 drains
    checks++; if (!drain_busy) begin failures++; $display("drain finished too early to overlap"); end
    drain(1, 1, 6, 4, m1);
    run_batch(0, 3, 2, 5, m2);
    drain(0, 3, 2, 5, m2);
    while (drain_busy || expq.size() != 0) @(negedge clk);
    checks++;
    if (n_seen != m0.size() + m1.size() + m2.size()) begin failures++; $display("drained %0d values", n_seen); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
