// rv_pkg: shared types and constants of the riscv-uconn pipelined RV32I-subset machine.
// It holds the standard RISC-V opcode and function-field values of the 18 supported
// instructions (ADD SUB AND OR XOR SLT SLL SRL, LW JALR ADDI ANDI ORI XORI SLTI SLLI SRLI,
// SW, BEQ BNE BLT BGE, LUI, JAL), the decoded-operation and ALU-operation enums, and the
// State record carried between pipeline stages. The State fields follow the machine's
// per-instruction record (inst, inst_addr, opcode, funct3, funct7, rd, rs1, rs2, imm,
// mem_buffer, mem_addr, br_addr, link_addr, alu_in1, alu_in2, alu_out); the valid bit and
// the decoded operation are this design's additions.
package rv_pkg;

  localparam int unsigned XLEN       = 32;
  localparam int unsigned MEM_WORDS  = 16384;  // total word addresses; by convention
                                               // instructions at 0..255, data from 256

  typedef logic [XLEN-1:0] word_t;

  // Major opcodes (RV32I)
  localparam logic [6:0] OPC_R      = 7'b0110011;
  localparam logic [6:0] OPC_I_ALU  = 7'b0010011;
  localparam logic [6:0] OPC_LOAD   = 7'b0000011;
  localparam logic [6:0] OPC_STORE  = 7'b0100011;
  localparam logic [6:0] OPC_BRANCH = 7'b1100011;
  localparam logic [6:0] OPC_JAL    = 7'b1101111;
  localparam logic [6:0] OPC_JALR   = 7'b1100111;
  localparam logic [6:0] OPC_LUI    = 7'b0110111;

  // funct3 values
  localparam logic [2:0] F3_ADD_SUB = 3'b000;
  localparam logic [2:0] F3_SLL     = 3'b001;
  localparam logic [2:0] F3_SLT     = 3'b010;
  localparam logic [2:0] F3_XOR     = 3'b100;
  localparam logic [2:0] F3_SRL     = 3'b101;
  localparam logic [2:0] F3_OR      = 3'b110;
  localparam logic [2:0] F3_AND     = 3'b111;
  localparam logic [2:0] F3_LW      = 3'b010;
  localparam logic [2:0] F3_SW      = 3'b010;
  localparam logic [2:0] F3_JALR    = 3'b000;
  localparam logic [2:0] F3_BEQ     = 3'b000;
  localparam logic [2:0] F3_BNE     = 3'b001;
  localparam logic [2:0] F3_BLT     = 3'b100;
  localparam logic [2:0] F3_BGE     = 3'b101;

  localparam logic [6:0] F7_BASE    = 7'b0000000;
  localparam logic [6:0] F7_SUB     = 7'b0100000;

  // addi x0, x0, 0
  localparam word_t NOP_INST = 32'h0000_0013;

  typedef enum logic [4:0] {
    OP_NOP,
    OP_ADD, OP_SUB, OP_AND, OP_OR, OP_XOR, OP_SLT, OP_SLL, OP_SRL,
    OP_ADDI, OP_ANDI, OP_ORI, OP_XORI, OP_SLTI, OP_SLLI, OP_SRLI,
    OP_LW, OP_SW,
    OP_BEQ, OP_BNE, OP_BLT, OP_BGE,
    OP_LUI, OP_JAL, OP_JALR
  } op_e;

  typedef enum logic [3:0] {
    ALU_ADD, ALU_SUB, ALU_AND, ALU_OR, ALU_XOR, ALU_SLT, ALU_SLL, ALU_SRL, ALU_PASS_B
  } alu_op_e;

  // Dynamic record of one instruction as it travels down the pipeline.
  typedef struct packed {
    logic       valid;
    op_e        op;
    word_t      inst;
    word_t      inst_addr;
    logic [6:0] opcode;
    logic [2:0] funct3;
    logic [6:0] funct7;
    logic [4:0] rd;
    logic [4:0] rs1;
    logic [4:0] rs2;
    word_t      imm;
    word_t      mem_buffer;
    word_t      mem_addr;
    word_t      br_addr;
    word_t      link_addr;
    word_t      alu_in1;
    word_t      alu_in2;
    word_t      alu_out;
  } state_t;

  // One-cycle event pulses brought out of the core for counting.
  typedef struct packed {
    logic stall;        // decode held for a register not yet written back
    logic jump;         // JAL/JALR redirected pc_n in decode
    logic branch_taken; // branch redirected pc_n in execute
    logic load;         // LW in the memory stage
    logic store;        // SW wrote memory
    logic commit;       // an instruction retired in writeback
  } events_t;

  localparam state_t BUBBLE = '{valid: 1'b0, op: OP_NOP, inst: NOP_INST, opcode: OPC_I_ALU, default: '0};

  // Operations that write registers[rd]
  function automatic logic op_writes_rd(op_e op);
    case (op)
      OP_ADD, OP_SUB, OP_AND, OP_OR, OP_XOR, OP_SLT, OP_SLL, OP_SRL,
      OP_ADDI, OP_ANDI, OP_ORI, OP_XORI, OP_SLTI, OP_SLLI, OP_SRLI,
      OP_LW, OP_LUI, OP_JAL, OP_JALR: return 1'b1;
      default:                         return 1'b0;
    endcase
  endfunction

endpackage
