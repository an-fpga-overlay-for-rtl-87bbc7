// mult_array: the multiplier array at the base of the processing engine.
//
// Each of N multipliers multiplies the IFMAP value routed to it by the
// distribution tree with the filter weight held in its own weight register.
// Two weight banks exist (double buffering); the bank is chosen per window by
// `bank`, which travels with the data, so a bank can be swapped while the
// previous channel's last windows are still in flight. One pipeline register:
// a product appears one cycle after its operands.
module mult_array
  import overlay_pkg::*;
#(
  parameter int unsigned N = 3072
) (
  input  logic clk,
  input  logic in_valid,
  input  logic bank,
  input  pix_t a  [N],
  input  pix_t wt [2][N],
  output logic out_valid,
  output acc_t p  [N]
);

  always_ff @(posedge clk) begin
    out_valid <= in_valid;
    for (int i = 0; i < int'(N); i++)
      p[i] <= acc_t'(a[i]) * acc_t'(wt[bank][i]);
  end

endmodule
