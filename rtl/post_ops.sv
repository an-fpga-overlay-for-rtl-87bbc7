// post_ops: the fused stages that follow a convolution, applied to the final
// OFMAPs as they are drained from Mem 1.
//
// Stage 1 re-quantises a 32-bit sum to a 16-bit pixel: arithmetic right shift
// by qshift (the fraction bits gained by the multiplication) with saturation.
// Stage 2 is ReLU. Stage 3 is a 2x2 max pool of stride 2 over each OL x OL
// OFMAP arriving in raster order: the maximum of each column pair of an even
// row is kept in a row buffer and combined with the pair below it; a last odd
// row or column is dropped. Stages 2 and 3 can be disabled, in which case the
// value passes unchanged. Enables and OL are latched by the caller for the
// whole drain.
//
// Interface: valid/ready in and out, one value per cycle. Output register
// only, so results appear one cycle after the value that completes them.
module post_ops
  import overlay_pkg::*;
#(
  parameter int unsigned MAX_L = 1024
) (
  input  logic        clk,
  input  logic        rst_n,
  input  logic [4:0]  qshift,
  input  logic        relu_en,
  input  logic        pool_en,
  input  logic [10:0] ol,
  input  logic        in_valid,
  output logic        in_ready,
  input  acc_t        in_data,
  output logic        out_valid,
  input  logic        out_ready,
  output pix_t        out_data
);

  localparam int unsigned HW = clog2i(MAX_L / 2);

  pix_t        rowbuf [MAX_L/2];
  pix_t        hold;               // left value of the current column pair
  logic [10:0] x, y;
  acc_t        shifted;
  pix_t        q, r, hmax;
  logic        acc;

  always_comb begin
    shifted = in_data >>> qshift;
    if (shifted > acc_t'(32767))       q = 16'sh7fff;
    else if (shifted < acc_t'(-32768)) q = 16'sh8000;
    else                               q = pix_t'(shifted);
    r = (relu_en && q < 0) ? '0 : q;
    hmax = (hold > r) ? hold : r;
  end

  assign in_ready = !out_valid || out_ready;
  assign acc      = in_valid && in_ready;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      out_valid <= 1'b0;
      out_data  <= '0;
      x <= '0; y <= '0;
      hold <= '0;
    end else begin
      if (out_valid && out_ready) out_valid <= 1'b0;
      if (acc) begin
        if (x == ol - 11'd1) begin
          x <= '0;
          y <= (y == ol - 11'd1) ? 11'd0 : y + 11'd1;
        end else x <= x + 11'd1;
        if (!pool_en) begin
          out_valid <= 1'b1;
          out_data  <= r;
        end else if (!x[0]) begin
          hold <= r;
        end else if (y[0] && (y >> 1) < (ol >> 1)) begin
          out_valid <= 1'b1;
          out_data  <= (rowbuf[HW'(x >> 1)] > hmax) ? rowbuf[HW'(x >> 1)] : hmax;
        end
      end
    end
  end

  always_ff @(posedge clk) begin
    if (acc && pool_en && x[0] && !y[0]) rowbuf[HW'(x >> 1)] <= hmax;
  end

endmodule
