// tb_rv_hazard: random combinations of pipeline contents checked against the control rules
// worked out here: taken branch first (redirect to its target, flush IF/ID and ID/EX), then a
// decode stall for a pending source register other than x0 (bubble into ID/EX), then a jump
// in decode (redirect, flush IF/ID); nothing once halted.
module tb_rv_hazard;
  import rv_pkg::*;
  logic id_valid, id_uses_rs1, id_uses_rs2, id_jump, ex_valid, ex_writes, mem_valid, mem_writes, br_taken, halted;
  logic [4:0] id_rs1, id_rs2, ex_rd, mem_rd;
  word_t id_jump_pc, br_pc, redirect_pc;
  logic stall, flush_ifid, flush_idex, redirect;
  int checks = 0, failures = 0;

  rv_hazard dut (.*);

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
    for (int k = 0; k < 6000; k++) begin
      automatic bit raw, e_stall, e_fi, e_fe, e_red;
      automatic word_t e_pc;
      id_valid = $urandom_range(0, 4) != 0;
      id_rs1 = 5'($urandom_range(0, 4)); id_rs2 = 5'($urandom_range(0, 4));
      id_uses_rs1 = $urandom; id_uses_rs2 = $urandom;
      id_jump = $urandom_range(0, 3) == 0; id_jump_pc = $urandom;
      ex_valid = $urandom; ex_writes = $urandom; ex_rd = 5'($urandom_range(0, 4));
      mem_valid = $urandom; mem_writes = $urandom; mem_rd = 5'($urandom_range(0, 4));
      br_taken = $urandom_range(0, 4) == 0; br_pc = $urandom;
      halted = $urandom_range(0, 15) == 0;
      #1;
      raw = 0;
      if (id_valid) begin
        if (id_uses_rs1 && id_rs1 != 0 && ((ex_valid && ex_writes && ex_rd == id_rs1) || (mem_valid && mem_writes && mem_rd == id_rs1))) raw = 1;
        if (id_uses_rs2 && id_rs2 != 0 && ((ex_valid && ex_writes && ex_rd == id_rs2) || (mem_valid && mem_writes && mem_rd == id_rs2))) raw = 1;
      end
      e_stall = 0; e_fi = 0; e_fe = 0; e_red = 0; e_pc = 0;
      if (!halted) begin
        if (br_taken) begin e_red = 1; e_pc = br_pc; e_fi = 1; e_fe = 1; end
        else if (raw) begin e_stall = 1; e_fe = 1; end
        else if (id_jump) begin e_red = 1; e_pc = id_jump_pc; e_fi = 1; end
      end
      check(stall == e_stall && flush_ifid == e_fi && flush_idex == e_fe && redirect == e_red,
            $sformatf("case %0d: stall %0b/%0b fi %0b/%0b fe %0b/%0b red %0b/%0b", k, stall, e_stall, flush_ifid, e_fi, flush_idex, e_fe, redirect, e_red));
      if (e_red) check(redirect_pc == e_pc, "redirect target");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
