// riscv_uconn_top: the complete riscv-uconn machine, a five-stage pipelined RV32I-subset
// core (rv_core) joined to its unified word-addressed memory of MEM_WORDS 32-bit words
// (rv_memory): instructions at words 0..255, data from word 256 up.
// Use: hold rst_n low, write the program and data through the host port (host_index,
// host_we, host_wdata; one word per cycle), release rst_n; the core starts at pc 0 and
// runs until an instruction writes 1 to x0, when halted rises and the machine freezes.
// Results are read through host_rdata (combinational, any word) and dbg_reg/dbg_reg_data
// (any register). cycles and committed give the run's cycle count and instruction count;
// events gives one-cycle pulses of stalls, jumps, taken branches, loads, stores and
// commits. The host port is this design's way of loading a program.
module riscv_uconn_top #(
  parameter int unsigned MEM_WORDS = rv_pkg::MEM_WORDS,
  localparam int unsigned AW       = $clog2(MEM_WORDS)
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic [AW-1:0] host_index,
  input  logic          host_we,
  input  rv_pkg::word_t         host_wdata,
  output rv_pkg::word_t         host_rdata,
  input  logic [4:0]    dbg_reg,
  output rv_pkg::word_t         dbg_reg_data,
  output logic          halted,
  output logic [31:0]   cycles,
  output logic [31:0]   committed,
  output rv_pkg::events_t events
);

  logic [AW-1:0] imem_index, dmem_index;
  rv_pkg::word_t         imem_rdata, dmem_rdata, dmem_wdata;
  logic          dmem_we;

  rv_core #(.AW(AW)) u_core (
    .clk          (clk),
    .rst_n        (rst_n),
    .imem_index   (imem_index),
    .imem_rdata   (imem_rdata),
    .dmem_index   (dmem_index),
    .dmem_we      (dmem_we),
    .dmem_wdata   (dmem_wdata),
    .dmem_rdata   (dmem_rdata),
    .dbg_reg      (dbg_reg),
    .dbg_reg_data (dbg_reg_data),
    .halted       (halted),
    .cycles       (cycles),
    .committed    (committed),
    .events       (events)
  );

  rv_memory #(.WORDS(MEM_WORDS)) u_mem (
    .clk     (clk),
    .i_index (imem_index),
    .i_rdata (imem_rdata),
    .d_index (dmem_index),
    .d_we    (dmem_we),
    .d_wdata (dmem_wdata),
    .d_rdata (dmem_rdata),
    .h_index (host_index),
    .h_we    (host_we),
    .h_wdata (host_wdata),
    .h_rdata (host_rdata)
  );

endmodule
