// ctrl_mem: register-based control memory of the overlay.
//
// The host writes control words one per cycle as (address, data) pairs. Every
// word is a flip-flop register, so all of them are visible in parallel to the
// line buffer, the processing engine and the output stages, which read their
// runtime configuration straight from these registers. Writes are refused
// (cw_ready low) while `lock` is high, i.e. while a batch is being computed, so
// a batch always runs with a stable configuration; the next batch may be
// written while the previous one is still draining.
//
// Interface: cw_valid/cw_ready/cw_addr/cw_data write port; `words` is the whole
// memory. Timing: a word accepted in cycle t is visible in `words` from t+1.
// Reset clears every word. Writes to addresses >= DEPTH are dropped.
module ctrl_mem
  import overlay_pkg::*;
#(
  parameter int unsigned DEPTH = A_DTREE + 2 * 4096 - 2
) (
  input  logic   clk,
  input  logic   rst_n,
  input  logic   lock,
  input  logic   cw_valid,
  output logic   cw_ready,
  input  caddr_t cw_addr,
  input  cword_t cw_data,
  output cword_t words [DEPTH]
);

  assign cw_ready = !lock;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int i = 0; i < int'(DEPTH); i++) words[i] <= '0;
    end else if (cw_valid && cw_ready && (int'(cw_addr) < int'(DEPTH))) begin
      words[cw_addr] <= cw_data;
    end
  end

endmodule
