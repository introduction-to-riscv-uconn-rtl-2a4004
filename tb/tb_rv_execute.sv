// tb_rv_execute: feeds decoded States for every operation and checks alu_out, mem_addr for
// LW/SW, and the branch decision and target against values computed here; a bubble never
// branches.
module tb_rv_execute;
  import rv_pkg::*;
  state_t ex_in, ex_out;
  logic br_taken;
  word_t br_pc;
  int checks = 0, failures = 0;

  rv_execute dut (.*);

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
    for (int k = 0; k < 5000; k++) begin
      automatic op_e op = op_e'($urandom_range(0, int'(OP_JALR)));
      automatic word_t a = (k % 4 == 0) ? word_t'($urandom_range(0, 3)) : $urandom;
      automatic word_t b = (k % 4 == 0) ? word_t'($urandom_range(0, 3)) : (k % 4 == 1) ? word_t'($urandom_range(0, 40)) : $urandom;
      automatic word_t y;
      automatic bit t;
      ex_in = BUBBLE;
      ex_in.valid = (k % 10 != 0);
      ex_in.op = op;
      ex_in.alu_in1 = a; ex_in.alu_in2 = b;
      ex_in.br_addr = $urandom; ex_in.mem_addr = 32'hDEAD_BEEF;
      #1;
      case (op)
        OP_SUB:          y = a - b;
        OP_AND, OP_ANDI: y = a & b;
        OP_OR,  OP_ORI:  y = a | b;
        OP_XOR, OP_XORI: y = a ^ b;
        OP_SLT, OP_SLTI: y = word_t'($signed(a) < $signed(b));
        OP_SLL, OP_SLLI: y = (b >= 32) ? 0 : a << b[4:0];
        OP_SRL, OP_SRLI: y = (b >= 32) ? 0 : a >> b[4:0];
        OP_LUI:          y = b;
        default:         y = a + b;
      endcase
      case (op)
        OP_BEQ: t = a == b;
        OP_BNE: t = a != b;
        OP_BLT: t = $signed(a) < $signed(b);
        OP_BGE: t = $signed(a) >= $signed(b);
        default: t = 0;
      endcase
      t = t && ex_in.valid;
      if (op != OP_BEQ && op != OP_BNE && op != OP_BLT && op != OP_BGE && op != OP_JAL && op != OP_JALR && op != OP_NOP && op != OP_SW)
        check(ex_out.alu_out == y, $sformatf("%s %h %h -> %h expected %h", op.name(), a, b, ex_out.alu_out, y));
      if (op == OP_LW || op == OP_SW) check(ex_out.mem_addr == a + b, "mem_addr");
      else check(ex_out.mem_addr == 32'hDEAD_BEEF, "mem_addr untouched");
      check(br_taken == t, $sformatf("%s taken %0b expected %0b", op.name(), br_taken, t));
      if (t) check(br_pc == ex_in.br_addr, "branch target");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
