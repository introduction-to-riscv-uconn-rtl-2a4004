// rv_memory: the machine's single word-addressed memory, 16,384 words of 32 bits
// (65,536 bytes). Instructions occupy word addresses 0..255 and data 256..16,383, but the
// array itself is unified, so a store may reach any word.
// Three ports: a fetch read port (i_*), a data read/write port for the memory stage (d_*),
// and a host port (h_*) used to load a program and read results. Reads are combinational;
// writes happen at the rising clock edge. If the data and host ports write the same word in
// one cycle the data port wins. The contents are not reset. The three-port arrangement and
// the combinational read are this design's choices, made so that fetch and the memory stage
// each finish in one cycle.
module rv_memory
  import rv_pkg::*;
#(
  parameter int unsigned WORDS = MEM_WORDS,
  localparam int unsigned AW   = $clog2(WORDS)
) (
  input  logic          clk,
  input  logic [AW-1:0] i_index,
  output word_t         i_rdata,
  input  logic [AW-1:0] d_index,
  input  logic          d_we,
  input  word_t         d_wdata,
  output word_t         d_rdata,
  input  logic [AW-1:0] h_index,
  input  logic          h_we,
  input  word_t         h_wdata,
  output word_t         h_rdata
);

  word_t mem [WORDS];

  always_ff @(posedge clk) begin
    if (h_we && !(d_we && d_index == h_index)) mem[h_index] <= h_wdata;
    if (d_we)                                  mem[d_index] <= d_wdata;
  end

  assign i_rdata = mem[i_index];
  assign d_rdata = mem[d_index];
  assign h_rdata = mem[h_index];

endmodule
