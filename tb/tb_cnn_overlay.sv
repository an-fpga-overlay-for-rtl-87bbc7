// tb_cnn_overlay: end-to-end test of the overlay at reduced size (64
// multipliers, 8-row line buffer, 16 output lanes). Five batches cover a 3x3
// stride-1 layer with ReLU, a 3x3 stride-2 layer with max pooling, a pointwise
// layer with channel parallelism, a 5x5 layer whose windows split over three
// tree levels, and a short layer that finishes while the previous drain is
// held up by output back-pressure. Every output pixel is compared with a
// reference convolution; the number of window vectors the engine takes is
// compared with the count the layer shapes imply; each stall, swap and mode
// must occur at least once.
module tb_cnn_overlay;
  localparam int unsigned N_MULT = 64, NF = 8, MAX_L = 32, BREG = 5, LANES = 16;
  localparam int unsigned M1_DEPTH = 64, WPC = 4, M2_DEPTH = 8;
  localparam int unsigned WLEN  = overlay_pkg::max_wlen(NF, BREG);
  localparam int unsigned NLEAF = 1 << overlay_pkg::clog2i(N_MULT);
  localparam int unsigned H     = overlay_pkg::clog2i(NLEAF);
  localparam int unsigned CM_DEPTH = overlay_pkg::A_DTREE + 2 * NLEAF - 2;

`include "tb_overlay_body.svh"

  cnn_overlay #(.N_MULT(N_MULT), .NF(NF), .MAX_L(MAX_L), .BREG(BREG), .LANES(LANES),
                .M1_DEPTH(M1_DEPTH), .WPC(WPC), .M2_DEPTH(M2_DEPTH)) dut (
    .clk, .rst_n, .cw_valid, .cw_ready, .cw_addr, .cw_data, .cfg_commit, .cfg_ack,
    .batch_done, .busy, .px_valid, .px_ready, .px_data, .wt_valid, .wt_ready, .wt_data,
    .out_valid, .out_ready, .out_data, .perf
  );

  initial begin
    //                 pw relu pool k  s  sp fp il id qs wdel hold
    layers.push_back('{0, 1,   0,   3, 1, 2, 2, 7, 2, 2, 0,   0});
    layers.push_back('{0, 0,   1,   3, 2, 2, 1, 9, 2, 1, 400, 0});
    layers.push_back('{1, 1,   0,   1, 1, 3, 3, 4, 6, 0, 0,   3000});
    layers.push_back('{0, 0,   0,   5, 1, 1, 2, 6, 1, 3, 0,   0});
    layers.push_back('{0, 1,   1,   2, 2, 1, 4, 6, 1, 0, 0,   0});
    run_and_check();
  end

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
