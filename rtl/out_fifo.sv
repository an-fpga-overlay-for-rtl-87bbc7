// out_fifo: Mem 2, the buffer between the output stages and the external
// memory write port. A synchronous first-in first-out queue of DEPTH pixels
// with valid/ready on both sides; it absorbs stalls of the write port so the
// drain of Mem 1 keeps running. Output is registered-free: out_data shows the
// oldest entry whenever out_valid is high. Reset empties it.
module out_fifo
  import overlay_pkg::*;
#(
  parameter int unsigned DEPTH = 512
) (
  input  logic clk,
  input  logic rst_n,
  input  logic in_valid,
  output logic in_ready,
  input  pix_t in_data,
  output logic out_valid,
  input  logic out_ready,
  output pix_t out_data
);

  localparam int unsigned AW = clog2i(DEPTH);

  pix_t          mem [DEPTH];
  logic [AW-1:0] wp, rp;
  logic [AW:0]   cnt;
  logic          push, pop;

  assign in_ready  = (cnt != (AW+1)'(DEPTH));
  assign out_valid = (cnt != '0);
  assign out_data  = mem[rp];
  assign push = in_valid && in_ready;
  assign pop  = out_valid && out_ready;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      wp <= '0; rp <= '0; cnt <= '0;
    end else begin
      if (push) wp <= (wp == AW'(DEPTH - 1)) ? '0 : wp + 1'b1;
      if (pop)  rp <= (rp == AW'(DEPTH - 1)) ? '0 : rp + 1'b1;
      cnt <= cnt + (AW+1)'(push) - (AW+1)'(pop);
    end
  end

  always_ff @(posedge clk) if (push) mem[wp] <= in_data;

  assert property (@(posedge clk) disable iff (!rst_n) cnt <= (AW+1)'(DEPTH))
    else $error("out_fifo: overflow");

endmodule
