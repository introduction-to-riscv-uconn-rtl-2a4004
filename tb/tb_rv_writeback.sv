// tb_rv_writeback: checks which value each operation writes (alu_out, mem_buffer or
// link_addr), that non-writing operations and bubbles write nothing, that commit follows
// valid, and that terminate rises exactly for a write of 1 to x0.
module tb_rv_writeback;
  import rv_pkg::*;
  state_t wb_in;
  logic rf_we, terminate, commit;
  logic [4:0] rf_wa;
  word_t rf_wd;
  int checks = 0, failures = 0;

  rv_writeback dut (.*);

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int k = 0; k < 4000; k++) begin
      automatic op_e op = op_e'($urandom_range(0, int'(OP_JALR)));
      automatic bit writes, v;
      automatic word_t val;
      wb_in = BUBBLE;
      v = (k % 8 != 0);
      wb_in.valid = v;
      wb_in.op = op;
      wb_in.rd = (k % 5 == 0) ? 5'd0 : 5'($urandom);
      wb_in.alu_out = (k % 3 == 0) ? 32'd1 : $urandom;
      wb_in.mem_buffer = (k % 4 == 0) ? 32'd1 : $urandom;
      wb_in.link_addr = $urandom;
      #1;
      writes = v && !(op inside {OP_NOP, OP_SW, OP_BEQ, OP_BNE, OP_BLT, OP_BGE});
      val = (op == OP_LW) ? wb_in.mem_buffer : (op == OP_JAL || op == OP_JALR) ? wb_in.link_addr : wb_in.alu_out;
      check(rf_we == writes, $sformatf("%s write enable", op.name()));
      if (writes) check(rf_wa == wb_in.rd && rf_wd == val, $sformatf("%s value", op.name()));
      check(terminate == (writes && wb_in.rd == 0 && val == 1), $sformatf("%s terminate", op.name()));
      check(commit == v, "commit");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
