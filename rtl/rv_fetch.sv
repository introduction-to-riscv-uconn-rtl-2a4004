// rv_fetch: the fetch stage and the program counter.
// pc is a byte address that starts at 0 after reset; the instruction word is read from
// memory index pc/4 (pc[AW+1:2], so the index wraps at the memory size). The fetched word
// and its address leave as a State record for the IF/ID register. Each cycle pc advances by
// 4, unless hold is high (stall or termination), or redirect is high, when pc loads
// redirect_pc: the pc_n of a jump resolved in decode or a taken branch resolved in execute.
// Redirect has priority over hold. The memory read is combinational, so fetch takes one cycle.
module rv_fetch
  import rv_pkg::*;
#(
  parameter int unsigned AW = 14
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          hold,
  input  logic          redirect,
  input  word_t         redirect_pc,
  output logic [AW-1:0] imem_index,
  input  word_t         imem_rdata,
  output state_t        if_out,
  output word_t         pc
);

  always_ff @(posedge clk) begin
    if (!rst_n)        pc <= '0;
    else if (redirect) pc <= redirect_pc;
    else if (!hold)    pc <= pc + 32'd4;   // advance_pc()
  end

  assign imem_index = pc[AW+1:2];

  always_comb begin
    if_out           = BUBBLE;
    if_out.valid     = 1'b1;
    if_out.inst      = imem_rdata;
    if_out.inst_addr = pc;
  end

endmodule
