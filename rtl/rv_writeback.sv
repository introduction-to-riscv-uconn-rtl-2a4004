// rv_writeback: the writeback stage. Combinational, driving the register-file write port.
// A valid instruction that writes a register sends registers[rd] its value: mem_buffer for
// LW, link_addr for JAL/JALR, alu_out otherwise. Every valid instruction raises commit.
// The program ends when an instruction writes the value 1 to x0 (e.g. addi x0, x0, 1):
// terminate rises in that cycle. The write itself reaches the register file, which
// discards writes to x0, so x0 keeps reading 0.
module rv_writeback
  import rv_pkg::*;
(
  input  state_t     wb_in,
  output logic       rf_we,
  output logic [4:0] rf_wa,
  output word_t      rf_wd,
  output logic       terminate,
  output logic       commit
);

  always_comb begin
    rf_we = wb_in.valid && op_writes_rd(wb_in.op);
    rf_wa = wb_in.rd;
    unique case (wb_in.op)
      OP_LW:           rf_wd = wb_in.mem_buffer;
      OP_JAL, OP_JALR: rf_wd = wb_in.link_addr;
      default:         rf_wd = wb_in.alu_out;
    endcase
    terminate = rf_we && (rf_wa == 5'd0) && (rf_wd == 32'd1);
    commit    = wb_in.valid;
  end

endmodule
