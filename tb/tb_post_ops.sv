// Self-checking testbench for post_ops: requantising shift with saturation,
// ReLU and 2x2 max pooling on random OFMAP streams (even and odd sizes) with
// random valid/ready on both sides.
module tb_post_ops;
  import overlay_pkg::*;
  import tb_host_pkg::*;
  localparam int MAX_L = 16;
  logic clk = 0, rst_n = 0;
  logic [4:0] qshift = 0;
  logic relu_en = 0, pool_en = 0;
  logic [10:0] ol = 0;
  logic in_valid = 0, in_ready, out_valid, out_ready = 0;
  acc_t in_data = 0;
  pix_t out_data;
  int checks = 0, failures = 0;
  int expq [$];
  int n_seen = 0;
  post_ops #(.MAX_L(MAX_L)) dut (.*);
  always #5 clk = ~clk;
  initial begin #200000; $display("WATCHDOG"); $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1); $finish; end

  always @(negedge clk) begin
    int e;
    out_ready = ($urandom_range(0, 2) != 0);
    #1;
    if (out_valid && out_ready) begin
      checks++;
      if (expq.size() == 0) begin failures++; $display("unexpected output %0d", out_data); end
      else begin
        e = expq.pop_front();
        if (int'(out_data) != e) begin failures++; $display("out %0d got %0d exp %0d", n_seen, out_data, e); end
      end
      n_seen++;
    end
  end

  task automatic run(input int qs, input bit relu, input bit pool, input int l, input int maps);
    int img [MAX_L][MAX_L];
    int m;
    qshift = 5'(qs); relu_en = relu; pool_en = pool; ol = 11'(l);
    for (int f = 0; f < maps; f++) begin
      for (int y = 0; y < l; y++)
        for (int x = 0; x < l; x++)
          img[y][x] = (y + x < 2) ? ((x == 0) ? 32'sh7fff_0000 : 32'sh8000_0000) : $urandom_range(0, 2000000) - 1000000;
      if (!pool) begin
        for (int y = 0; y < l; y++)
          for (int x = 0; x < l; x++)
            expq.push_back(satq(img[y][x], qs, relu));
      end else begin
        for (int y = 0; y + 1 < l; y += 2)
          for (int x = 0; x + 1 < l; x += 2) begin
            m = satq(img[y][x], qs, relu);
            if (satq(img[y][x+1], qs, relu) > m) m = satq(img[y][x+1], qs, relu);
            if (satq(img[y+1][x], qs, relu) > m) m = satq(img[y+1][x], qs, relu);
            if (satq(img[y+1][x+1], qs, relu) > m) m = satq(img[y+1][x+1], qs, relu);
            expq.push_back(m);
          end
      end
      for (int y = 0; y < l; y++)
        for (int x = 0; x < l; x++) begin
          while ($urandom_range(0, 3) == 0) @(negedge clk);
          in_data = acc_t'(img[y][x]);
          in_valid = 1;
          #1;
          while (!in_ready) begin @(negedge clk); #1; end
          @(negedge clk);
          in_valid = 0;
        end
    end
    while (expq.size() != 0) @(negedge clk);
    repeat (3) @(negedge clk);
  endtask

  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1;
    @(negedge clk);
    run(4, 1, 0, 5, 2);
    run(0, 0, 0, 3, 1);
    run(6, 0, 1, 6, 2);
    run(3, 1, 1, 7, 2);
    run(8, 1, 1, 4, 1);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
