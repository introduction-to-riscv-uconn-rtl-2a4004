// rv_mem_stage: the memory stage. Combinational, driving the data port of rv_memory.
// mem_addr is a word address (data starts at word 256); its low AW bits index the memory.
// LW copies memory[mem_addr] into mem_buffer for writeback; SW writes mem_buffer (the
// rs2 value captured in decode) to memory[mem_addr] at the end of the cycle. kill blocks
// the store; the core raises it in the cycle an older instruction terminates the program.
module rv_mem_stage
  import rv_pkg::*;
#(
  parameter int unsigned AW = 14
) (
  input  state_t        mem_in,
  input  logic          kill,
  output logic [AW-1:0] dmem_index,
  output logic          dmem_we,
  output word_t         dmem_wdata,
  input  word_t         dmem_rdata,
  output state_t        mem_out
);

  always_comb begin
    dmem_index = mem_in.mem_addr[AW-1:0];
    dmem_we    = mem_in.valid && (mem_in.op == OP_SW) && !kill;
    dmem_wdata = mem_in.mem_buffer;
    mem_out    = mem_in;
    if (mem_in.op == OP_LW) mem_out.mem_buffer = dmem_rdata;
  end

endmodule
