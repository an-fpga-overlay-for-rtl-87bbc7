// Self-checking testbench for ctrl_mem: writes, ignored out-of-range writes,
// lock back-pressure and reset clearing.
module tb_ctrl_mem;
  import overlay_pkg::*;
  localparam int DEPTH = 20;
  logic clk = 0, rst_n = 0, lock = 0, cw_valid = 0, cw_ready;
  caddr_t cw_addr = 0;
  cword_t cw_data = 0;
  cword_t words [DEPTH];
  int checks = 0, failures = 0;
  cword_t model [DEPTH];
  ctrl_mem #(.DEPTH(DEPTH)) dut (.*);
  always #5 clk = ~clk;
  initial begin #200000; $display("WATCHDOG"); $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1); $finish; end
  task automatic compare(input string tag);
    for (int i = 0; i < DEPTH; i++) begin
      checks++;
      if (words[i] !== model[i]) begin failures++; $display("%s word %0d got %h exp %h", tag, i, words[i], model[i]); end
    end
  endtask
  initial begin
    foreach (model[i]) model[i] = '0;
    repeat (2) @(negedge clk);
    compare("reset");
    rst_n = 1;
    for (int t = 0; t < 400; t++) begin
      lock = ($urandom_range(0, 3) == 0);
      cw_valid = $urandom_range(0, 1);
      cw_addr = caddr_t'($urandom_range(0, DEPTH + 5));
      cw_data = cword_t'($urandom);
      #1;
      checks++; if (cw_ready !== !lock) begin failures++; $display("cw_ready t=%0d", t); end
      if (cw_valid && cw_ready && cw_addr < DEPTH) model[cw_addr] = cw_data;
      @(negedge clk);
      compare("run");
    end
    cw_valid = 0;
    rst_n = 0; #1;
    foreach (model[i]) model[i] = '0;
    compare("reset2");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
