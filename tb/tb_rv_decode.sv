// tb_rv_decode: encodes random instances of all 18 instructions with the testbench
// encoders and checks what decode derives from them against the values the instruction was
// built from: operation, register numbers, sign-extended immediate, ALU operands,
// mem_buffer, br_addr, link_addr, the jump decision and target, and which registers are read.
// Also checks that an unsupported encoding becomes a no-operation and a bubble never jumps.
module tb_rv_decode;
  import rv_pkg::*;
  import rv_tb_pkg::*;
  state_t id_in, id_out;
  logic [4:0] rs1_addr, rs2_addr;
  word_t rs1_data, rs2_data, jump_pc;
  logic uses_rs1, uses_rs2, jump;
  int checks = 0, failures = 0;

  rv_decode dut (.*);
  // register file model: value derived from the register number
  assign rs1_data = (rs1_addr == 0) ? 0 : {rs1_addr, 27'h155_0000} + 32'(rs1_addr);
  assign rs2_data = (rs2_addr == 0) ? 0 : {rs2_addr, 27'h0AA_0000} + 32'(rs2_addr) * 3;

  function automatic word_t rv1(int r); return (r == 0) ? 0 : {5'(r), 27'h155_0000} + 32'(r); endfunction
  function automatic word_t rv2(int r); return (r == 0) ? 0 : {5'(r), 27'h0AA_0000} + 32'(r) * 3; endfunction

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  task automatic apply(word_t inst, word_t addr);
    id_in = BUBBLE;
    id_in.valid = 1'b1;
    id_in.inst = inst;
    id_in.inst_addr = addr;
    #1;
  endtask

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int k = 0; k < 3000; k++) begin
      automatic int rd = $urandom_range(0, 31), r1 = $urandom_range(0, 31), r2 = $urandom_range(0, 31);
      automatic int imm12 = $urandom_range(0, 4095) - 2048;
      automatic int sh = $urandom_range(0, 31);
      automatic int boff = ($urandom_range(0, 4095) - 2048) * 2;
      automatic int joff = ($urandom_range(0, 1048575) - 524288) * 2;
      automatic int up = $urandom_range(0, 1048575);
      automatic word_t addr = {$urandom_range(0, 255), 2'b00};
      automatic int kind = k % 18;
      automatic op_e  exp_op;
      case (kind)
        0: begin apply(a_add(rd, r1, r2), addr); exp_op = OP_ADD; end
        1: begin apply(a_sub(rd, r1, r2), addr); exp_op = OP_SUB; end
        2: begin apply(a_and(rd, r1, r2), addr); exp_op = OP_AND; end
        3: begin apply(a_or (rd, r1, r2), addr); exp_op = OP_OR;  end
        4: begin apply(a_xor(rd, r1, r2), addr); exp_op = OP_XOR; end
        5: begin apply(a_slt(rd, r1, r2), addr); exp_op = OP_SLT; end
        6: begin apply(a_sll(rd, r1, r2), addr); exp_op = OP_SLL; end
        7: begin apply(a_srl(rd, r1, r2), addr); exp_op = OP_SRL; end
        8: begin apply(a_addi(rd, r1, imm12), addr); exp_op = OP_ADDI; end
        9: begin apply(a_andi(rd, r1, imm12), addr); exp_op = OP_ANDI; end
        10: begin apply(a_ori(rd, r1, imm12), addr); exp_op = OP_ORI; end
        11: begin apply(a_xori(rd, r1, imm12), addr); exp_op = OP_XORI; end
        12: begin apply(a_slti(rd, r1, imm12), addr); exp_op = OP_SLTI; end
        13: begin
              if (k % 2 == 0) begin apply(a_slli(rd, r1, sh), addr); exp_op = OP_SLLI; end
              else begin apply(a_srli(rd, r1, sh), addr); exp_op = OP_SRLI; end
            end
        14: begin
              if (k % 2 == 0) begin apply(a_lw(rd, imm12, r1), addr); exp_op = OP_LW; end
              else begin apply(a_sw(r2, imm12, r1), addr); exp_op = OP_SW; end
            end
        15: case ((k / 18) % 4)
              0: begin apply(a_beq(r1, r2, boff), addr); exp_op = OP_BEQ; end
              1: begin apply(a_bne(r1, r2, boff), addr); exp_op = OP_BNE; end
              2: begin apply(a_blt(r1, r2, boff), addr); exp_op = OP_BLT; end
              default: begin apply(a_bge(r1, r2, boff), addr); exp_op = OP_BGE; end
            endcase
        16: begin apply(a_lui(rd, up), addr); exp_op = OP_LUI; end
        default: begin
              if (k % 2 == 0) begin apply(a_jal(rd, joff), addr); exp_op = OP_JAL; end
              else begin apply(a_jalr(rd, r1, imm12), addr); exp_op = OP_JALR; end
            end
      endcase
      check(id_out.op == exp_op, $sformatf("op %s expected %s", id_out.op.name(), exp_op.name()));
      check(id_out.valid && id_out.inst_addr == addr, "State passes through");
      case (exp_op)
        OP_ADD, OP_SUB, OP_AND, OP_OR, OP_XOR, OP_SLT, OP_SLL, OP_SRL: begin
          check(id_out.rd == 5'(rd) && id_out.rs1 == 5'(r1) && id_out.rs2 == 5'(r2), "R fields");
          check(id_out.alu_in1 == rv1(r1) && id_out.alu_in2 == rv2(r2), "R operands");
          check(uses_rs1 && uses_rs2 && !jump, "R uses");
        end
        OP_ADDI, OP_ANDI, OP_ORI, OP_XORI, OP_SLTI, OP_LW: begin
          check(id_out.rd == 5'(rd) && id_out.imm == word_t'(imm12), $sformatf("I imm %h expected %0d", id_out.imm, imm12));
          check(id_out.alu_in1 == rv1(r1) && id_out.alu_in2 == word_t'(imm12), "I operands");
          check(uses_rs1 && !uses_rs2 && !jump, "I uses");
        end
        OP_SLLI, OP_SRLI: begin
          check(id_out.alu_in1 == rv1(r1) && id_out.alu_in2 == word_t'(sh), "shift-immediate operands");
        end
        OP_SW: begin
          check(id_out.imm == word_t'(imm12) && id_out.alu_in2 == word_t'(imm12), $sformatf("S imm %h expected %0d", id_out.imm, imm12));
          check(id_out.alu_in1 == rv1(r1) && id_out.mem_buffer == rv2(r2), "SW operands and mem_buffer");
          check(uses_rs1 && uses_rs2 && !jump, "S uses");
        end
        OP_BEQ, OP_BNE, OP_BLT, OP_BGE: begin
          check(id_out.imm == word_t'(boff) && id_out.br_addr == addr + word_t'(boff), $sformatf("B imm %h expected %0d", id_out.imm, boff));
          check(id_out.alu_in1 == rv1(r1) && id_out.alu_in2 == rv2(r2), "B operands");
          check(uses_rs1 && uses_rs2 && !jump, "B uses");
        end
        OP_LUI: begin
          check(id_out.rd == 5'(rd) && id_out.alu_in2 == word_t'(up) * 4096, "LUI operand");
          check(!uses_rs1 && !uses_rs2 && !jump, "LUI uses");
        end
        OP_JAL: begin
          check(jump && jump_pc == addr + word_t'(joff), $sformatf("JAL target %h expected %h", jump_pc, addr + word_t'(joff)));
          check(id_out.link_addr == addr + 4 && id_out.rd == 5'(rd), "JAL link");
          check(!uses_rs1 && !uses_rs2, "JAL uses");
        end
        OP_JALR: begin
          check(jump && jump_pc == rv1(r1) + word_t'(imm12), "JALR target");
          check(id_out.link_addr == addr + 4 && uses_rs1 && !uses_rs2, "JALR link and uses");
        end
        default: ;
      endcase
    end
    // unsupported encodings
    apply(32'h4000_5033, 0);          // SRA: not supported
    check(id_out.op == OP_NOP && !jump && !uses_rs1, "SRA is a no-operation");
    apply(32'h0000_0073, 0);          // ECALL: not supported
    check(id_out.op == OP_NOP, "system opcode is a no-operation");
    apply(32'h0000_1003, 0);          // LH: not supported
    check(id_out.op == OP_NOP, "LH is a no-operation");
    // a bubble never jumps or reads
    id_in = BUBBLE; id_in.inst = a_jal(1, 64); #1;
    check(!jump && !uses_rs1 && !uses_rs2, "bubble does not jump");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
