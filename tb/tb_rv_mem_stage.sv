// tb_rv_mem_stage: drives the memory stage with a memory array kept here; checks that LW
// returns memory[mem_addr] in mem_buffer, SW writes mem_buffer to memory[mem_addr], other
// instructions and bubbles leave memory alone, and kill blocks a store.
module tb_rv_mem_stage;
  import rv_pkg::*;
  logic clk = 0;
  always #5 clk = ~clk;
  state_t mem_in, mem_out;
  logic kill, dmem_we;
  logic [13:0] dmem_index;
  word_t dmem_wdata, dmem_rdata;
  word_t mem [16384], shadow [16384];
  int checks = 0, failures = 0;

  rv_mem_stage dut (.*);
  assign dmem_rdata = mem[dmem_index];
  always @(posedge clk) if (dmem_we) mem[dmem_index] <= dmem_wdata;

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    foreach (mem[i]) begin mem[i] = word_t'(i) * 32'h0101_0101; shadow[i] = mem[i]; end
    for (int k = 0; k < 3000; k++) begin
      automatic int sel = $urandom_range(0, 3);
      automatic word_t a = 256 + $urandom_range(0, 63);
      mem_in = BUBBLE;
      mem_in.valid = (k % 9 != 0);
      mem_in.op = (sel == 0) ? OP_LW : (sel == 1) ? OP_SW : (sel == 2) ? OP_ADD : OP_BEQ;
      mem_in.mem_addr = a;
      mem_in.mem_buffer = $urandom;
      mem_in.alu_out = $urandom;
      kill = (k % 7 == 0);
      #1;
      if (mem_in.op == OP_LW) check(mem_out.mem_buffer == shadow[a], $sformatf("LW word %0d", a));
      else check(mem_out.mem_buffer == mem_in.mem_buffer, "mem_buffer passes");
      check(mem_out.alu_out == mem_in.alu_out, "State passes");
      @(posedge clk);
      if (mem_in.valid && mem_in.op == OP_SW && !kill) shadow[a] = mem_in.mem_buffer;
      #1 check(mem[a] == shadow[a], $sformatf("memory word %0d after %s", a, mem_in.op.name()));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
