// tb_rv_fetch: pc starts at 0 and steps by 4 each cycle; hold keeps it; redirect loads the
// new pc_n even while holding; the memory index is pc/4 and the fetched word and its
// address appear in the outgoing State.
module tb_rv_fetch;
  import rv_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic hold, redirect;
  word_t redirect_pc, imem_rdata, pc, model_pc;
  logic [13:0] imem_index;
  state_t if_out;
  int checks = 0, failures = 0;

  rv_fetch dut (.*);
  assign imem_rdata = {18'h2A5A5, imem_index} ^ 32'h1357_9BDF;

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
    hold = 0; redirect = 0; redirect_pc = 0;
    repeat (2) @(posedge clk);
    #1 check(pc == 0, "reset pc 0");
    rst_n = 1;
    model_pc = 0;
    for (int k = 0; k < 3000; k++) begin
      hold = $urandom_range(0, 3) == 0;
      redirect = $urandom_range(0, 5) == 0;
      redirect_pc = {$urandom_range(0, 1023), 2'b00};
      #1;
      check(imem_index == model_pc[15:2], "index is pc/4");
      check(if_out.valid && if_out.inst_addr == model_pc && if_out.inst == imem_rdata, "State out");
      @(posedge clk);
      if (redirect) model_pc = redirect_pc;
      else if (!hold) model_pc = model_pc + 4;
      #1 check(pc == model_pc, $sformatf("pc %h expected %h", pc, model_pc));
    end
    // straight-line rate: one instruction per cycle
    hold = 0; redirect = 0;
    model_pc = pc;
    repeat (10) @(posedge clk);
    #1 check(pc == model_pc + 40, "10 cycles advance 10 words");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
