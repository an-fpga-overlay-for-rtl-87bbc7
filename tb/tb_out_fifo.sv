// Self-checking testbench for out_fifo: random push/pop against a queue model,
// checks order, full/empty flags and that nothing is lost or invented.
module tb_out_fifo;
  import overlay_pkg::*;
  localparam int DEPTH = 4;
  logic clk = 0, rst_n = 0, in_valid = 0, in_ready, out_valid, out_ready = 0;
  pix_t in_data = 0, out_data;
  int checks = 0, failures = 0;
  pix_t q [$];
  out_fifo #(.DEPTH(DEPTH)) dut (.*);
  always #5 clk = ~clk;
  initial begin #200000; $display("WATCHDOG"); $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1); $finish; end
  initial begin
    logic push, pop;
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int t = 0; t < 2000; t++) begin
      in_valid = ($urandom_range(0, 99) < (t < 1000 ? 70 : 30));
      in_data = pix_t'($urandom);
      out_ready = ($urandom_range(0, 99) < (t < 1000 ? 30 : 70));
      #1;
      checks++; if (in_ready !== (q.size() < DEPTH)) begin failures++; $display("in_ready t=%0d size=%0d", t, q.size()); end
      checks++; if (out_valid !== (q.size() > 0)) begin failures++; $display("out_valid t=%0d size=%0d", t, q.size()); end
      if (out_valid && q.size() > 0) begin
        checks++; if (out_data !== q[0]) begin failures++; $display("data t=%0d got %0d exp %0d", t, out_data, q[0]); end
      end
      push = in_valid && in_ready;
      pop = out_valid && out_ready;
      @(negedge clk);
      if (pop) void'(q.pop_front());
      if (push) q.push_back(in_data);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
