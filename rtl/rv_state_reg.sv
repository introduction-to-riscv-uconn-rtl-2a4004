// rv_state_reg: one pipeline register between two stages, holding the State record of the
// instruction in flight (see rv_pkg::state_t). On reset or flush it loads a bubble
// (valid = 0, a no-operation); otherwise it loads d when en is high and holds when en is low.
// Flush has priority over hold, so a squashed instruction is removed even during a stall.
module rv_state_reg
  import rv_pkg::*;
(
  input  logic   clk,
  input  logic   rst_n,
  input  logic   en,
  input  logic   flush,
  input  state_t d,
  output state_t q
);

  always_ff @(posedge clk) begin
    if (!rst_n || flush) q <= BUBBLE;
    else if (en)         q <= d;
  end

endmodule
