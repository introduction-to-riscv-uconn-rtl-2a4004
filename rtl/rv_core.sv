// rv_core: the riscv-uconn five-stage in-order pipeline (fetch, decode, execute, memory,
// writeback) for an RV32I subset of 18 instructions.
// Each stage is a combinational block; the State record of each instruction moves through
// four rv_state_reg registers (IF/ID, ID/EX, EX/MEM, MEM/WB), one stage per cycle.
// JAL/JALR resolve in decode (one squashed instruction), taken branches in execute (two
// squashed instructions); rv_hazard orders these and stalls decode on a source register
// that an instruction in execute or memory has yet to write (no forwarding; this design's
// choice). When an instruction writes 1 to x0 the core terminates: in that cycle a store in
// the memory stage is blocked, and from the next cycle every register holds and halted
// stays high until reset.
// Interface: imem_* is the fetch port and dmem_* the data port of a memory with
// combinational read and clocked write; dbg_reg reads any register. cycles counts clock
// cycles from reset up to and including the terminating one; committed counts instructions
// that reached writeback, the terminating one included. events gives one-cycle pulses.
module rv_core
  import rv_pkg::*;
#(
  parameter int unsigned AW = 14
) (
  input  logic          clk,
  input  logic          rst_n,
  output logic [AW-1:0] imem_index,
  input  word_t         imem_rdata,
  output logic [AW-1:0] dmem_index,
  output logic          dmem_we,
  output word_t         dmem_wdata,
  input  word_t         dmem_rdata,
  input  logic [4:0]    dbg_reg,
  output word_t         dbg_reg_data,
  output logic          halted,
  output logic [31:0]   cycles,
  output logic [31:0]   committed,
  output events_t       events
);

  state_t if_s, ifid_q, id_s, idex_q, ex_s, exmem_q, mem_s, memwb_q;

  logic       stall, flush_ifid, flush_idex, redirect;
  word_t      redirect_pc;
  logic [4:0] rs1_addr, rs2_addr;
  word_t      rs1_data, rs2_data;
  logic       uses_rs1, uses_rs2, jump;
  word_t      jump_pc;
  logic       br_taken;
  word_t      br_pc;
  logic       rf_we, terminate, commit;
  logic [4:0] rf_wa;
  word_t      rf_wd;
  logic       run;

  // Everything advances unless the program has terminated (now or earlier).
  assign run = !halted && !terminate;

  // ---------------- fetch ----------------
  rv_fetch #(.AW(AW)) u_fetch (
    .clk         (clk),
    .rst_n       (rst_n),
    .hold        (stall || !run),
    .redirect    (redirect && run),
    .redirect_pc (redirect_pc),
    .imem_index  (imem_index),
    .imem_rdata  (imem_rdata),
    .if_out      (if_s),
    .pc          ()
  );

  rv_state_reg u_ifid (
    .clk   (clk),
    .rst_n (rst_n),
    .en    (!stall && run),
    .flush (flush_ifid && run),
    .d     (if_s),
    .q     (ifid_q)
  );

  // ---------------- decode ----------------
  rv_decode u_decode (
    .id_in    (ifid_q),
    .rs1_addr (rs1_addr),
    .rs2_addr (rs2_addr),
    .rs1_data (rs1_data),
    .rs2_data (rs2_data),
    .id_out   (id_s),
    .uses_rs1 (uses_rs1),
    .uses_rs2 (uses_rs2),
    .jump     (jump),
    .jump_pc  (jump_pc)
  );

  rv_regfile u_regfile (
    .clk   (clk),
    .rst_n (rst_n),
    .ra1   (rs1_addr),
    .rd1   (rs1_data),
    .ra2   (rs2_addr),
    .rd2   (rs2_data),
    .we    (rf_we && !halted),
    .wa    (rf_wa),
    .wd    (rf_wd),
    .dbg_a (dbg_reg),
    .dbg_d (dbg_reg_data)
  );

  rv_hazard u_hazard (
    .id_valid    (ifid_q.valid),
    .id_rs1      (rs1_addr),
    .id_rs2      (rs2_addr),
    .id_uses_rs1 (uses_rs1),
    .id_uses_rs2 (uses_rs2),
    .id_jump     (jump),
    .id_jump_pc  (jump_pc),
    .ex_valid    (idex_q.valid),
    .ex_rd       (idex_q.rd),
    .ex_writes   (op_writes_rd(idex_q.op)),
    .mem_valid   (exmem_q.valid),
    .mem_rd      (exmem_q.rd),
    .mem_writes  (op_writes_rd(exmem_q.op)),
    .br_taken    (br_taken),
    .br_pc       (br_pc),
    .halted      (halted),
    .stall       (stall),
    .flush_ifid  (flush_ifid),
    .flush_idex  (flush_idex),
    .redirect    (redirect),
    .redirect_pc (redirect_pc)
  );

  rv_state_reg u_idex (
    .clk   (clk),
    .rst_n (rst_n),
    .en    (run),
    .flush (flush_idex && run),
    .d     (id_s),
    .q     (idex_q)
  );

  // ---------------- execute ----------------
  rv_execute u_execute (
    .ex_in    (idex_q),
    .ex_out   (ex_s),
    .br_taken (br_taken),
    .br_pc    (br_pc)
  );

  rv_state_reg u_exmem (
    .clk   (clk),
    .rst_n (rst_n),
    .en    (run),
    .flush (1'b0),
    .d     (ex_s),
    .q     (exmem_q)
  );

  // ---------------- memory ----------------
  rv_mem_stage #(.AW(AW)) u_mem (
    .mem_in     (exmem_q),
    .kill       (!run),
    .dmem_index (dmem_index),
    .dmem_we    (dmem_we),
    .dmem_wdata (dmem_wdata),
    .dmem_rdata (dmem_rdata),
    .mem_out    (mem_s)
  );

  rv_state_reg u_memwb (
    .clk   (clk),
    .rst_n (rst_n),
    .en    (run),
    .flush (1'b0),
    .d     (mem_s),
    .q     (memwb_q)
  );

  // ---------------- writeback ----------------
  rv_writeback u_wb (
    .wb_in     (memwb_q),
    .rf_we     (rf_we),
    .rf_wa     (rf_wa),
    .rf_wd     (rf_wd),
    .terminate (terminate),
    .commit    (commit)
  );

  // ---------------- termination and counters ----------------
  always_ff @(posedge clk) begin
    if (!rst_n) begin
      halted    <= 1'b0;
      cycles    <= '0;
      committed <= '0;
    end else if (!halted) begin
      halted    <= terminate;
      cycles    <= cycles + 32'd1;
      committed <= committed + {31'd0, commit};
    end
  end

  always_comb begin
    events.stall        = stall;
    events.jump         = redirect && !br_taken && run;
    events.branch_taken = br_taken && run;
    events.load         = exmem_q.valid && exmem_q.op == OP_LW && !halted;
    events.store        = dmem_we;
    events.commit       = commit && !halted;
  end

  // A redirect always squashes what was fetched behind it.
  assert property (@(posedge clk) disable iff (!rst_n) redirect |-> flush_ifid);
  // The pipeline never stalls on x0.
  assert property (@(posedge clk) disable iff (!rst_n) stall |-> ifid_q.valid);

endmodule
