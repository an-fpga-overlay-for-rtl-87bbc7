// weight_regs: double-buffered filter weight register array.
//
// One 16-bit register per multiplier, in two banks. The host sends the
// weights of one input channel for the whole batch as a stream of WPC-wide
// beats, already arranged in the multiplier layout (the partition order the
// distribution tree produces, every copy of a partition in place). The fill
// bank is loaded by shift logic: each beat shifts the bank down by WPC
// positions and enters at the top, so after ceil(N/WPC) beats the first beat
// sits at registers 0..WPC-1. A full bank is handed to the processing engine;
// while the engine works on one bank the other is loaded with the next
// channel's weights (compute/prefetch overlap).
//
// Interface: wt_valid/wt_ready/wt_data load port. use_bank is the bank the
// engine should use next and use_ready says it is full. A release pulse frees
// use_bank and moves use_bank to the other bank. wt_ready is low while the
// fill bank is still full, i.e. both banks hold weights not yet released.
module weight_regs
  import overlay_pkg::*;
#(
  parameter int unsigned N   = 3072,
  parameter int unsigned WPC = 8
) (
  input  logic clk,
  input  logic rst_n,
  input  logic wt_valid,
  output logic wt_ready,
  input  pix_t wt_data [WPC],
  input  logic release_bank,
  output logic use_bank,
  output logic use_ready,
  output pix_t wt [2][N]
);

  localparam int unsigned BEATS = (N + WPC - 1) / WPC;
  localparam int unsigned NPAD  = BEATS * WPC;
  localparam int unsigned CNT_W = clog2i(BEATS + 1);

  pix_t             sh [2][NPAD];
  logic [1:0]       full;
  logic             fill_bank;
  logic [CNT_W-1:0] cnt;

  assign wt_ready  = !full[fill_bank];
  assign use_ready = full[use_bank];

  always_ff @(posedge clk) begin
    if (wt_valid && wt_ready) begin
      for (int i = 0; i < int'(NPAD) - int'(WPC); i++)
        sh[fill_bank][i] <= sh[fill_bank][i + int'(WPC)];
      for (int i = 0; i < int'(WPC); i++)
        sh[fill_bank][int'(NPAD) - int'(WPC) + i] <= wt_data[i];
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      full      <= '0;
      fill_bank <= 1'b0;
      use_bank  <= 1'b0;
      cnt       <= '0;
    end else begin
      if (wt_valid && wt_ready) begin
        if (cnt == CNT_W'(BEATS - 1)) begin
          cnt             <= '0;
          full[fill_bank] <= 1'b1;
          fill_bank       <= !fill_bank;
        end else begin
          cnt <= cnt + 1'b1;
        end
      end
      if (release_bank) begin
        full[use_bank] <= 1'b0;
        use_bank       <= !use_bank;
      end
    end
  end

  always_comb begin
    for (int b = 0; b < 2; b++)
      for (int i = 0; i < int'(N); i++)
        wt[b][i] = sh[b][i];
  end

  // A bank is released only after it was filled.
  assert property (@(posedge clk) disable iff (!rst_n) release_bank |-> use_ready)
    else $error("weight_regs: release of a bank that is not full");

endmodule
