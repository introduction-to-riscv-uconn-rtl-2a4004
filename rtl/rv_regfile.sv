// rv_regfile: the 32 x 32-bit architectural register file (x0..x31).
// Two combinational read ports serve decode, one synchronous write port serves writeback,
// and a third read port lets a debugger or testbench inspect any register. x0 always reads
// as 0 and writes to it are discarded (the terminating write of 1 to x0 is detected by
// writeback, not stored). A write and a read of the same register in the same cycle return
// the new value (write-before-read), which lets decode read a result in the cycle it is
// written back. All registers clear to 0 on reset. Reset value and pass-through are this
// design's choices.
module rv_regfile
  import rv_pkg::*;
(
  input  logic       clk,
  input  logic       rst_n,
  input  logic [4:0] ra1,
  output word_t      rd1,
  input  logic [4:0] ra2,
  output word_t      rd2,
  input  logic       we,
  input  logic [4:0] wa,
  input  word_t      wd,
  input  logic [4:0] dbg_a,
  output word_t      dbg_d
);

  word_t regs [32];

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      for (int i = 0; i < 32; i++) regs[i] <= '0;
    end else if (we && wa != 5'd0) begin
      regs[wa] <= wd;
    end
  end

  function automatic word_t read_port(logic [4:0] a);
    if (a == 5'd0)              return '0;
    else if (we && wa == a)     return wd;
    else                        return regs[a];
  endfunction

  always_comb begin
    rd1   = read_port(ra1);
    rd2   = read_port(ra2);
    dbg_d = (dbg_a == 5'd0) ? '0 : regs[dbg_a];
  end

endmodule
