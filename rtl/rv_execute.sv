// rv_execute: the execute stage. Combinational.
// It selects the ALU operation from the decoded operation and computes alu_out from
// alu_in1/alu_in2. For LW and SW the sum is the word address and is also stored in
// mem_addr. Conditional branches (BEQ, BNE, BLT, BGE) are resolved here: br_taken rises
// for a valid branch whose condition holds, and br_pc is its br_addr, the new pc_n.
// JAL, JALR and LUI need nothing from the ALU but LUI's pass-through of the upper immediate.
module rv_execute
  import rv_pkg::*;
(
  input  state_t ex_in,
  output state_t ex_out,
  output logic   br_taken,
  output word_t  br_pc
);

  alu_op_e alu_op;
  word_t   alu_y;
  logic    alu_eq, alu_lt;

  always_comb begin
    unique case (ex_in.op)
      OP_SUB:           alu_op = ALU_SUB;
      OP_AND, OP_ANDI:  alu_op = ALU_AND;
      OP_OR,  OP_ORI:   alu_op = ALU_OR;
      OP_XOR, OP_XORI:  alu_op = ALU_XOR;
      OP_SLT, OP_SLTI:  alu_op = ALU_SLT;
      OP_SLL, OP_SLLI:  alu_op = ALU_SLL;
      OP_SRL, OP_SRLI:  alu_op = ALU_SRL;
      OP_LUI:           alu_op = ALU_PASS_B;
      default:          alu_op = ALU_ADD;
    endcase
  end

  rv_alu u_alu (
    .op (alu_op),
    .a  (ex_in.alu_in1),
    .b  (ex_in.alu_in2),
    .y  (alu_y),
    .eq (alu_eq),
    .lt (alu_lt)
  );

  always_comb begin
    ex_out         = ex_in;
    ex_out.alu_out = alu_y;
    if (ex_in.op == OP_LW || ex_in.op == OP_SW) ex_out.mem_addr = alu_y;

    unique case (ex_in.op)
      OP_BEQ:  br_taken = alu_eq;
      OP_BNE:  br_taken = !alu_eq;
      OP_BLT:  br_taken = alu_lt;
      OP_BGE:  br_taken = !alu_lt;
      default: br_taken = 1'b0;
    endcase
    br_taken = br_taken && ex_in.valid;
    br_pc    = ex_in.br_addr;
  end

endmodule
