// tb_cnn_overlay_full: the overlay at its default size (3072 multipliers,
// 16-row line buffer, 735 output lanes), built without any parameter override.
// Two small batches (a 3x3 layer over two input channels and a pointwise
// layer) are run and every output pixel is compared with a reference
// convolution; the same host model and checks as tb_cnn_overlay are used,
// except that the stall counts are only reported (the batches are too short
// for every stall to occur).
module tb_cnn_overlay_full;
  localparam int unsigned N_MULT = 3072, NF = 16, MAX_L = 1024, BREG = 11, LANES = 735;
  localparam int unsigned M1_DEPTH = 1024, WPC = 8, M2_DEPTH = 512;
  localparam int unsigned WLEN  = overlay_pkg::max_wlen(NF, BREG);
  localparam int unsigned NLEAF = 1 << overlay_pkg::clog2i(N_MULT);
  localparam int unsigned H     = overlay_pkg::clog2i(NLEAF);
  localparam int unsigned CM_DEPTH = overlay_pkg::A_DTREE + 2 * NLEAF - 2;

`include "tb_overlay_body.svh"

  cnn_overlay dut (
    .clk, .rst_n, .cw_valid, .cw_ready, .cw_addr, .cw_data, .cfg_commit, .cfg_ack,
    .batch_done, .busy, .px_valid, .px_ready, .px_data, .wt_valid, .wt_ready, .wt_data,
    .out_valid, .out_ready, .out_data, .perf
  );

  initial begin
    require_all_mech = 1'b0;
    //                 pw relu pool k  s  sp fp il id qs wdel hold
    layers.push_back('{0, 1,   1,   3, 1, 2, 2, 6, 2, 2, 300, 0});
    layers.push_back('{1, 0,   0,   1, 1, 2, 3, 4, 4, 1, 0,   2000});
    layers.push_back('{0, 0,   0,   3, 2, 1, 2, 7, 1, 0, 0,   0});
    run_and_check();
  end

  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
