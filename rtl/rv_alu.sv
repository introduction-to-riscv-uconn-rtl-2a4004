// rv_alu: the execute-stage arithmetic unit of the riscv-uconn pipeline.
// Combinational. It computes alu_out = a op b for add, subtract, AND, OR, XOR,
// set-less-than, shift left and shift right logical, and passes b through for LUI
// (whose upper-immediate has already been placed in b by decode). It also gives
// eq (a == b) and lt (a < b, signed) for the branch decision.
// Shifts use the whole 32-bit amount in b, so an amount of 32 or more yields 0, as the
// machine's register-register shifts are defined; for SLLI/SRLI decode supplies only the
// low 5 immediate bits. Signed comparison for SLT/SLTI/BLT/BGE is this design's reading
// of the plain "<" in the instruction definitions (it matches standard RV32I).
module rv_alu
  import rv_pkg::*;
(
  input  alu_op_e op,
  input  word_t   a,
  input  word_t   b,
  output word_t   y,
  output logic    eq,
  output logic    lt
);

  always_comb begin
    eq = (a == b);
    lt = ($signed(a) < $signed(b));
    unique case (op)
      ALU_ADD:    y = a + b;
      ALU_SUB:    y = a - b;
      ALU_AND:    y = a & b;
      ALU_OR:     y = a | b;
      ALU_XOR:    y = a ^ b;
      ALU_SLT:    y = {31'd0, lt};
      ALU_SLL:    y = a << b;
      ALU_SRL:    y = a >> b;
      ALU_PASS_B: y = b;
      default:    y = '0;
    endcase
  end

endmodule
