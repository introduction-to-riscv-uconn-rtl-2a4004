// rv_hazard: pipeline control for the riscv-uconn core. Combinational.
// Control hazards: a taken branch resolves in execute and a JAL/JALR in decode. A taken
// branch redirects pc_n to its target and squashes the two younger instructions (those in
// fetch and decode); it overrides a jump in decode, which is on the wrong path. A jump
// redirects pc_n and squashes the one instruction in fetch. No prediction is made.
// Data hazards (this design's choice, no forwarding): decode stalls while an older
// instruction still in execute or memory will write a register decode reads (x0 excepted);
// the register file passes a writeback-stage write straight to decode. A stall holds pc and
// IF/ID and sends a bubble into execute; a stalled jump does not redirect until its operand
// is ready. After termination (halted) everything holds.
module rv_hazard
  import rv_pkg::*;
(
  input  logic       id_valid,
  input  logic [4:0] id_rs1,
  input  logic [4:0] id_rs2,
  input  logic       id_uses_rs1,
  input  logic       id_uses_rs2,
  input  logic       id_jump,
  input  word_t      id_jump_pc,
  input  logic       ex_valid,
  input  logic [4:0] ex_rd,
  input  logic       ex_writes,
  input  logic       mem_valid,
  input  logic [4:0] mem_rd,
  input  logic       mem_writes,
  input  logic       br_taken,
  input  word_t      br_pc,
  input  logic       halted,
  output logic       stall,
  output logic       flush_ifid,
  output logic       flush_idex,
  output logic       redirect,
  output word_t      redirect_pc
);

  function automatic logic pending(logic [4:0] r);
    return (r != 5'd0) &&
           ((ex_valid  && ex_writes  && ex_rd  == r) ||
            (mem_valid && mem_writes && mem_rd == r));
  endfunction

  logic raw;

  always_comb begin
    raw = id_valid && ((id_uses_rs1 && pending(id_rs1)) || (id_uses_rs2 && pending(id_rs2)));

    stall       = 1'b0;
    flush_ifid  = 1'b0;
    flush_idex  = 1'b0;
    redirect    = 1'b0;
    redirect_pc = br_pc;

    if (halted) begin
      // frozen
    end else if (br_taken) begin
      redirect    = 1'b1;
      redirect_pc = br_pc;
      flush_ifid  = 1'b1;
      flush_idex  = 1'b1;
    end else if (raw) begin
      stall      = 1'b1;
      flush_idex = 1'b1;
    end else if (id_jump) begin
      redirect    = 1'b1;
      redirect_pc = id_jump_pc;
      flush_ifid  = 1'b1;
    end
  end

endmodule
