// rv_decode: the decode stage. Combinational.
// It splits the instruction into opcode, funct3, funct7, rd, rs1 and rs2, builds the
// sign-extended immediate of its format (I, S, B, U or J), and names the operation. It
// reads registers[rs1] and registers[rs2] and fills the State record as each instruction
// needs: alu_in1/alu_in2 for R- and I-type, LW and SW; mem_buffer = registers[rs2] for SW;
// br_addr = inst_addr + imm for branches; link_addr = inst_addr + 4 for JAL/JALR.
// JAL and JALR are resolved here: jump is raised with jump_pc = inst_addr + imm (JAL) or
// registers[rs1] + imm (JALR, bit 0 kept as computed). uses_rs1/uses_rs2 tell the hazard
// unit which registers the instruction really reads. An encoding that is none of the 18
// supported instructions becomes a no-operation (this design's choice).
module rv_decode
  import rv_pkg::*;
(
  input  state_t     id_in,
  output logic [4:0] rs1_addr,
  output logic [4:0] rs2_addr,
  input  word_t      rs1_data,
  input  word_t      rs2_data,
  output state_t     id_out,
  output logic       uses_rs1,
  output logic       uses_rs2,
  output logic       jump,
  output word_t      jump_pc
);

  word_t      inst;
  logic [6:0] opcode;
  logic [2:0] f3;
  logic [6:0] f7;
  word_t      imm_i, imm_s, imm_b, imm_u, imm_j;
  op_e        op;

  always_comb begin
    inst   = id_in.inst;
    opcode = inst[6:0];
    f3     = inst[14:12];
    f7     = inst[31:25];
    imm_i  = {{20{inst[31]}}, inst[31:20]};
    imm_s  = {{20{inst[31]}}, inst[31:25], inst[11:7]};
    imm_b  = {{19{inst[31]}}, inst[31], inst[7], inst[30:25], inst[11:8], 1'b0};
    imm_u  = {inst[31:12], 12'd0};
    imm_j  = {{11{inst[31]}}, inst[31], inst[19:12], inst[20], inst[30:21], 1'b0};

    op = OP_NOP;
    unique case (opcode)
      OPC_R: begin
        if (f7 == F7_BASE) begin
          unique case (f3)
            F3_ADD_SUB: op = OP_ADD;
            F3_AND:     op = OP_AND;
            F3_OR:      op = OP_OR;
            F3_XOR:     op = OP_XOR;
            F3_SLT:     op = OP_SLT;
            F3_SLL:     op = OP_SLL;
            F3_SRL:     op = OP_SRL;
            default:    op = OP_NOP;
          endcase
        end else if (f7 == F7_SUB && f3 == F3_ADD_SUB) begin
          op = OP_SUB;
        end
      end
      OPC_I_ALU: begin
        unique case (f3)
          F3_ADD_SUB: op = OP_ADDI;
          F3_AND:     op = OP_ANDI;
          F3_OR:      op = OP_ORI;
          F3_XOR:     op = OP_XORI;
          F3_SLT:     op = OP_SLTI;
          F3_SLL:     op = (f7 == F7_BASE) ? OP_SLLI : OP_NOP;
          F3_SRL:     op = (f7 == F7_BASE) ? OP_SRLI : OP_NOP;
          default:    op = OP_NOP;
        endcase
      end
      OPC_LOAD:   op = (f3 == F3_LW)   ? OP_LW   : OP_NOP;
      OPC_STORE:  op = (f3 == F3_SW)   ? OP_SW   : OP_NOP;
      OPC_JALR:   op = (f3 == F3_JALR) ? OP_JALR : OP_NOP;
      OPC_JAL:    op = OP_JAL;
      OPC_LUI:    op = OP_LUI;
      OPC_BRANCH: begin
        unique case (f3)
          F3_BEQ:  op = OP_BEQ;
          F3_BNE:  op = OP_BNE;
          F3_BLT:  op = OP_BLT;
          F3_BGE:  op = OP_BGE;
          default: op = OP_NOP;
        endcase
      end
      default: op = OP_NOP;
    endcase

    rs1_addr = inst[19:15];
    rs2_addr = inst[24:20];

    id_out        = id_in;
    id_out.op     = op;
    id_out.opcode = opcode;
    id_out.funct3 = f3;
    id_out.funct7 = f7;
    id_out.rd     = inst[11:7];
    id_out.rs1    = rs1_addr;
    id_out.rs2    = rs2_addr;

    uses_rs1 = 1'b0;
    uses_rs2 = 1'b0;
    jump     = 1'b0;
    jump_pc  = '0;

    unique case (op)
      OP_ADD, OP_SUB, OP_AND, OP_OR, OP_XOR, OP_SLT, OP_SLL, OP_SRL: begin
        id_out.alu_in1 = rs1_data;
        id_out.alu_in2 = rs2_data;
        uses_rs1 = 1'b1;
        uses_rs2 = 1'b1;
      end
      OP_ADDI, OP_ANDI, OP_ORI, OP_XORI, OP_SLTI, OP_LW: begin
        id_out.imm     = imm_i;
        id_out.alu_in1 = rs1_data;
        id_out.alu_in2 = imm_i;
        uses_rs1 = 1'b1;
      end
      OP_SLLI, OP_SRLI: begin
        id_out.imm     = imm_i;
        id_out.alu_in1 = rs1_data;
        id_out.alu_in2 = {27'd0, imm_i[4:0]};
        uses_rs1 = 1'b1;
      end
      OP_SW: begin
        id_out.imm        = imm_s;
        id_out.alu_in1    = rs1_data;
        id_out.alu_in2    = imm_s;
        id_out.mem_buffer = rs2_data;
        uses_rs1 = 1'b1;
        uses_rs2 = 1'b1;
      end
      OP_BEQ, OP_BNE, OP_BLT, OP_BGE: begin
        id_out.imm     = imm_b;
        id_out.alu_in1 = rs1_data;
        id_out.alu_in2 = rs2_data;
        id_out.br_addr = id_in.inst_addr + imm_b;
        uses_rs1 = 1'b1;
        uses_rs2 = 1'b1;
      end
      OP_LUI: begin
        id_out.imm     = imm_u;
        id_out.alu_in2 = imm_u;
      end
      OP_JAL: begin
        id_out.imm       = imm_j;
        id_out.link_addr = id_in.inst_addr + 32'd4;
        jump    = id_in.valid;
        jump_pc = id_in.inst_addr + imm_j;
      end
      OP_JALR: begin
        id_out.imm       = imm_i;
        id_out.link_addr = id_in.inst_addr + 32'd4;
        uses_rs1 = 1'b1;
        jump     = id_in.valid;
        jump_pc  = rs1_data + imm_i;
      end
      default: ;
    endcase

    if (!id_in.valid) begin
      uses_rs1 = 1'b0;
      uses_rs2 = 1'b0;
    end
  end

endmodule
