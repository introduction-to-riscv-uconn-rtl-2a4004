// rv_tb_pkg: verification helpers shared by the riscv-uconn testbenches.
// 1. Instruction encoders for the 18 supported instructions (standard RV32I bit layouts),
//    used to write test programs without an external assembler. Branch and jump offsets
//    are byte offsets from the instruction's own address.
// 2. A reference instruction-set model (iss_*) that executes a program one instruction at a
//    time on its own copy of the registers and memory, with no pipeline. Testbenches run
//    the same program on the hardware and on this model and compare the final registers,
//    memory and committed-instruction count.
package rv_tb_pkg;
  import rv_pkg::*;

  localparam int unsigned IMEM_WORDS = 256;  // instruction words 0..255
  localparam int unsigned DATA_BASE  = 256;  // first data word

  // ---------------- encoders ----------------
  function automatic word_t enc_r(logic [6:0] f7, logic [4:0] rs2, logic [4:0] rs1,
                                  logic [2:0] f3, logic [4:0] rd);
    return {f7, rs2, rs1, f3, rd, OPC_R};
  endfunction
  function automatic word_t enc_i(logic [6:0] opc, logic [4:0] rd, logic [2:0] f3,
                                  logic [4:0] rs1, int imm);
    logic [11:0] i = imm[11:0];
    return {i, rs1, f3, rd, opc};
  endfunction

  function automatic word_t a_add(int rd, int rs1, int rs2); return enc_r(F7_BASE, 5'(rs2), 5'(rs1), F3_ADD_SUB, 5'(rd)); endfunction
  function automatic word_t a_sub(int rd, int rs1, int rs2); return enc_r(F7_SUB,  5'(rs2), 5'(rs1), F3_ADD_SUB, 5'(rd)); endfunction
  function automatic word_t a_and(int rd, int rs1, int rs2); return enc_r(F7_BASE, 5'(rs2), 5'(rs1), F3_AND, 5'(rd)); endfunction
  function automatic word_t a_or (int rd, int rs1, int rs2); return enc_r(F7_BASE, 5'(rs2), 5'(rs1), F3_OR,  5'(rd)); endfunction
  function automatic word_t a_xor(int rd, int rs1, int rs2); return enc_r(F7_BASE, 5'(rs2), 5'(rs1), F3_XOR, 5'(rd)); endfunction
  function automatic word_t a_slt(int rd, int rs1, int rs2); return enc_r(F7_BASE, 5'(rs2), 5'(rs1), F3_SLT, 5'(rd)); endfunction
  function automatic word_t a_sll(int rd, int rs1, int rs2); return enc_r(F7_BASE, 5'(rs2), 5'(rs1), F3_SLL, 5'(rd)); endfunction
  function automatic word_t a_srl(int rd, int rs1, int rs2); return enc_r(F7_BASE, 5'(rs2), 5'(rs1), F3_SRL, 5'(rd)); endfunction

  function automatic word_t a_addi(int rd, int rs1, int imm); return enc_i(OPC_I_ALU, 5'(rd), F3_ADD_SUB, 5'(rs1), imm); endfunction
  function automatic word_t a_andi(int rd, int rs1, int imm); return enc_i(OPC_I_ALU, 5'(rd), F3_AND, 5'(rs1), imm); endfunction
  function automatic word_t a_ori (int rd, int rs1, int imm); return enc_i(OPC_I_ALU, 5'(rd), F3_OR,  5'(rs1), imm); endfunction
  function automatic word_t a_xori(int rd, int rs1, int imm); return enc_i(OPC_I_ALU, 5'(rd), F3_XOR, 5'(rs1), imm); endfunction
  function automatic word_t a_slti(int rd, int rs1, int imm); return enc_i(OPC_I_ALU, 5'(rd), F3_SLT, 5'(rs1), imm); endfunction
  function automatic word_t a_slli(int rd, int rs1, int sh);  return enc_i(OPC_I_ALU, 5'(rd), F3_SLL, 5'(rs1), sh & 31); endfunction
  function automatic word_t a_srli(int rd, int rs1, int sh);  return enc_i(OPC_I_ALU, 5'(rd), F3_SRL, 5'(rs1), sh & 31); endfunction
  function automatic word_t a_lw  (int rd, int off, int rs1); return enc_i(OPC_LOAD, 5'(rd), F3_LW, 5'(rs1), off); endfunction
  function automatic word_t a_jalr(int rd, int rs1, int off); return enc_i(OPC_JALR, 5'(rd), F3_JALR, 5'(rs1), off); endfunction

  function automatic word_t a_sw(int rs2, int off, int rs1);
    logic [11:0] i = off[11:0];
    return {i[11:5], 5'(rs2), 5'(rs1), F3_SW, i[4:0], OPC_STORE};
  endfunction
  function automatic word_t enc_b(logic [2:0] f3, int rs1, int rs2, int off);
    logic [12:0] i = off[12:0];
    return {i[12], i[10:5], 5'(rs2), 5'(rs1), f3, i[4:1], i[11], OPC_BRANCH};
  endfunction
  function automatic word_t a_beq(int rs1, int rs2, int off); return enc_b(F3_BEQ, rs1, rs2, off); endfunction
  function automatic word_t a_bne(int rs1, int rs2, int off); return enc_b(F3_BNE, rs1, rs2, off); endfunction
  function automatic word_t a_blt(int rs1, int rs2, int off); return enc_b(F3_BLT, rs1, rs2, off); endfunction
  function automatic word_t a_bge(int rs1, int rs2, int off); return enc_b(F3_BGE, rs1, rs2, off); endfunction
  function automatic word_t a_lui(int rd, int imm20);
    logic [19:0] i = imm20[19:0];
    return {i, 5'(rd), OPC_LUI};
  endfunction
  function automatic word_t a_jal(int rd, int off);
    logic [20:0] i = off[20:0];
    return {i[20], i[10:1], i[11], i[19:12], 5'(rd), OPC_JAL};
  endfunction
  function automatic word_t a_halt(); return a_addi(0, 0, 1); endfunction
  function automatic word_t a_nop();  return a_addi(0, 0, 0); endfunction

  // ---------------- reference model ----------------
  word_t iss_mem  [MEM_WORDS];
  word_t iss_regs [32];
  int    iss_committed;
  bit    iss_trace;
  int    iss_loads, iss_stores, iss_taken, iss_jumps;

  function automatic void iss_reset();
    foreach (iss_regs[i]) iss_regs[i] = '0;
    iss_committed = 0;
    iss_loads = 0; iss_stores = 0; iss_taken = 0; iss_jumps = 0;
  endfunction

  function automatic word_t sx(int unsigned v, int bits);
    word_t w = word_t'(v);
    return word_t'($signed(w << (32 - bits)) >>> (32 - bits));
  endfunction

  // Runs from pc 0 until a write of 1 to x0 or max_steps; returns 1 if it terminated.
  function automatic bit iss_run(int max_steps);
    word_t pc = 0;
    for (int step = 0; step < max_steps; step++) begin
      word_t inst = iss_mem[pc[15:2]];
      logic [6:0] opc = inst[6:0];
      logic [2:0] f3  = inst[14:12];
      logic [6:0] f7  = inst[31:25];
      int unsigned rd = inst[11:7], rs1 = inst[19:15], rs2 = inst[24:20];
      word_t a = iss_regs[rs1], b = iss_regs[rs2];
      word_t ii = sx(inst[31:20], 12);
      word_t si = sx({inst[31:25], inst[11:7]}, 12);
      word_t bi = sx({inst[31], inst[7], inst[30:25], inst[11:8], 1'b0}, 13);
      word_t ji = sx({inst[31], inst[19:12], inst[20], inst[30:21], 1'b0}, 21);
      word_t res = 0;
      bit    wr = 0;
      word_t npc = pc + 4;
      case (opc)
        OPC_R: begin
          wr = 1;
          if (f7 == F7_SUB && f3 == 0) res = a - b;
          else if (f7 == F7_BASE)
            case (f3)
              0: res = a + b;
              1: res = (b >= 32) ? 0 : a << b[4:0];
              2: res = ($signed(a) < $signed(b)) ? 1 : 0;
              4: res = a ^ b;
              5: res = (b >= 32) ? 0 : a >> b[4:0];
              6: res = a | b;
              7: res = a & b;
              default: wr = 0;
            endcase
          else wr = 0;
        end
        OPC_I_ALU: begin
          wr = 1;
          case (f3)
            0: res = a + ii;
            1: if (f7 == 0) res = a << inst[24:20]; else wr = 0;
            2: res = ($signed(a) < $signed(ii)) ? 1 : 0;
            4: res = a ^ ii;
            5: if (f7 == 0) res = a >> inst[24:20]; else wr = 0;
            6: res = a | ii;
            7: res = a & ii;
            default: wr = 0;
          endcase
        end
        OPC_LOAD:  if (f3 == 2) begin wr = 1; res = iss_mem[(a + ii) % MEM_WORDS]; iss_loads++; end
        OPC_STORE: if (f3 == 2) begin iss_mem[(a + si) % MEM_WORDS] = b; iss_stores++; end
        OPC_BRANCH: begin
          bit t = 0;
          case (f3)
            0: t = (a == b);
            1: t = (a != b);
            4: t = ($signed(a) < $signed(b));
            5: t = ($signed(a) >= $signed(b));
            default: t = 0;
          endcase
          if (t) begin npc = pc + bi; iss_taken++; end
        end
        OPC_JAL:  begin wr = 1; res = pc + 4; npc = pc + ji; iss_jumps++; end
        OPC_JALR: if (f3 == 0) begin wr = 1; res = pc + 4; npc = a + ii; iss_jumps++; end
        OPC_LUI:  begin wr = 1; res = {inst[31:12], 12'd0}; end
        default: ;
      endcase
      iss_committed++;
      if (iss_trace) $display("pc %0d inst %h", pc[15:2], inst);
      if (wr && rd == 0 && res == 1) return 1;
      if (wr && rd != 0) iss_regs[rd] = res;
      pc = npc;
    end
    return 0;
  endfunction

  // ---------------- random test programs ----------------
  // A program image: a preamble that loads random values into x1..x12, the data base 256
  // into x31 and a loop count into x30; a loop body of random instructions (ALU, LUI, LW
  // and SW relative to x31, forward branches, JAL and JALR that stay inside the body);
  // the loop closing branch; the terminating addi x0, x0, 1; and a store after it that must
  // never happen. JALR jumps are absolute (base x0); random results go to x1..x29.
  word_t img [MEM_WORDS];
  int unsigned rng_state;

  function automatic int unsigned rnd(int unsigned n);
    rng_state ^= rng_state << 13;
    rng_state ^= rng_state >> 17;
    rng_state ^= rng_state << 5;
    return rng_state % n;
  endfunction

  function automatic void gen_program(int unsigned seed, int body_len, int loops);
    int pc = 0;
    int body_start, body_end;
    rng_state = seed | 1;
    foreach (img[i]) img[i] = (i >= DATA_BASE) ? word_t'(i * 32'h9E37_79B9) : a_nop();
    for (int i = 0; i < 64; i++) img[DATA_BASE + i] = {rnd(65536), rnd(65536)}[31:0];
    for (int r = 1; r <= 12; r++) begin
      img[pc++] = a_lui(r, int'(rnd(1 << 20)));
      img[pc++] = a_addi(r, r, int'(rnd(4096)) - 2048);
    end
    img[pc++] = a_addi(31, 0, DATA_BASE);
    img[pc++] = a_addi(30, 0, loops);
    body_start = pc;
    body_end   = body_start + body_len;   // first word after the body
    while (pc < body_end) begin
      int kind = int'(rnd(16));
      int rd   = 1 + int'(rnd(29));
      int rs1  = int'(rnd(32));
      int rs2  = int'(rnd(32));
      int room = body_end - pc - 1;       // instructions left after this one
      case (kind)
        0:  img[pc++] = a_add(rd, rs1, rs2);
        1:  img[pc++] = a_sub(rd, rs1, rs2);
        2:  img[pc++] = a_and(rd, rs1, rs2);
        3:  img[pc++] = a_or (rd, rs1, rs2);
        4:  img[pc++] = a_xor(rd, rs1, rs2);
        5:  img[pc++] = a_slt(rd, rs1, rs2);
        6:  img[pc++] = (rnd(2) == 0) ? a_sll(rd, rs1, rs2) : a_srl(rd, rs1, rs2);
        7:  case (rnd(6))
              0: img[pc++] = a_addi(rd, rs1, int'(rnd(4096)) - 2048);
              1: img[pc++] = a_andi(rd, rs1, int'(rnd(4096)) - 2048);
              2: img[pc++] = a_ori (rd, rs1, int'(rnd(4096)) - 2048);
              3: img[pc++] = a_xori(rd, rs1, int'(rnd(4096)) - 2048);
              4: img[pc++] = a_slti(rd, rs1, int'(rnd(4096)) - 2048);
              default: img[pc++] = (rnd(2) == 0) ? a_slli(rd, rs1, int'(rnd(32))) : a_srli(rd, rs1, int'(rnd(32)));
            endcase
        8:  img[pc++] = a_lui(rd, int'(rnd(1 << 20)));
        9, 10: img[pc++] = a_lw(rd, int'(rnd(64)), 31);
        11, 12: img[pc++] = a_sw(rs2, int'(rnd(64)), 31);
        13: if (room >= 1) begin
              int k = 1 + int'(rnd((room > 3) ? 3 : room));
              case (rnd(4))
                0: img[pc++] = a_beq(rs1, rs2, 4 * (k + 1));
                1: img[pc++] = a_bne(rs1, rs2, 4 * (k + 1));
                2: img[pc++] = a_blt(rs1, rs2, 4 * (k + 1));
                default: img[pc++] = a_bge(rs1, rs2, 4 * (k + 1));
              endcase
            end else img[pc++] = a_add(rd, rs1, rs2);
        14: if (room >= 1) begin
              int k = 1 + int'(rnd((room > 3) ? 3 : room));
              img[pc++] = a_jal((rnd(3) == 0) ? 0 : rd, 4 * (k + 1));
            end else img[pc++] = a_addi(rd, rs1, 1);
        default: if (room >= 1) begin
              int k = 1 + int'(rnd((room > 3) ? 3 : room));
              img[pc] = a_jalr(rd, 0, 4 * (pc + k + 1));
              pc++;
            end else img[pc++] = a_srli(rd, rs1, 3);
      endcase
    end
    img[pc++] = a_addi(30, 30, -1);
    img[pc]   = a_bne(30, 0, 4 * (body_start - pc));
    pc++;
    img[pc++] = a_halt();
    img[pc++] = a_sw(1, 0, 31);
    img[pc++] = a_sw(2, 1, 31);
  endfunction

  function automatic void iss_load_img();
    foreach (img[i]) iss_mem[i] = img[i];
  endfunction

endpackage
