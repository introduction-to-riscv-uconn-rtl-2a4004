// tb_rv_state_reg: random load, hold and flush sequences against an expected copy; reset and
// flush must leave a bubble (valid = 0, no-operation), flush must win over hold.
module tb_rv_state_reg;
  import rv_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic en, flush;
  state_t d, q, expect_q;
  int checks = 0, failures = 0;

  rv_state_reg dut (.*);

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  function automatic state_t random_state();
    state_t s;
    s = BUBBLE;
    s.valid = 1'b1;
    s.op = OP_ADD;
    s.inst = $urandom; s.inst_addr = $urandom; s.rd = 5'($urandom); s.imm = $urandom;
    s.alu_in1 = $urandom; s.alu_in2 = $urandom; s.alu_out = $urandom; s.mem_buffer = $urandom;
    s.mem_addr = $urandom; s.br_addr = $urandom; s.link_addr = $urandom;
    return s;
  endfunction

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    en = 1; flush = 0; d = random_state();
    repeat (2) @(posedge clk);
    #1 check(q == BUBBLE && !q.valid, "reset gives bubble");
    rst_n = 1;
    expect_q = BUBBLE;
    for (int k = 0; k < 2000; k++) begin
      en = $urandom_range(0, 2) != 0;
      flush = $urandom_range(0, 5) == 0;
      d = random_state();
      @(posedge clk);
      if (flush) expect_q = BUBBLE;
      else if (en) expect_q = d;
      #1 check(q == expect_q, $sformatf("step %0d en %0b flush %0b", k, en, flush));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
