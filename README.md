# riscv-uconn: a five-stage pipelined RV32I-subset machine

This is a small in-order RISC-V machine built for teaching computer architecture. It runs 18
RV32I instructions on a classic five-stage pipeline: fetch, decode, execute, memory and
writeback. It has 32 registers and one word-addressed memory of 16,384 words. A program stops
the machine by writing the value 1 to the zero register, for example with `addi x0, x0, 1`.
The RTL below implements that machine in synthesizable SystemVerilog. It keeps the stage-by-stage
behaviour of each instruction as the machine defines it and adds the pipeline control that the
definition leaves to the implementer.

## Instruction set

All encodings are the standard RV32I ones.

| Format | Instructions | What is written |
|---|---|---|
| R | ADD, SUB, AND, OR, XOR, SLT, SLL, SRL | `rd = rs1 op rs2` |
| I | ADDI, ANDI, ORI, XORI, SLTI, SLLI, SRLI | `rd = rs1 op sext(imm)` |
| I | LW | `rd = memory[rs1 + sext(imm)]` |
| I | JALR | `rd = inst_addr + 4`, `pc_n = rs1 + sext(imm)` |
| S | SW | `memory[rs1 + sext(imm)] = rs2` |
| B | BEQ, BNE, BLT, BGE | if the condition holds, `pc_n = inst_addr + sext(imm)` |
| U | LUI | `rd = imm[31:12] << 12` |
| J | JAL | `rd = inst_addr + 4`, `pc_n = inst_addr + sext(imm)` |

Some points differ from stock RV32I or are easy to miss:

- **Register shifts saturate.** SLL and SRL shift by the whole 32-bit value of rs2. Any amount
  of 32 or more therefore gives 0, where RV32I would use only the low 5 bits. SLLI and SRLI use
  the 5-bit immediate.
- **Comparisons are signed.** SLT, SLTI, BLT and BGE compare two's-complement values.
- **JALR keeps bit 0.** Its target is `rs1 + imm` exactly, with no clearing of bit 0. Fetch
  ignores the two low pc bits in any case.
- **Unsupported encodings are no-operations.** Examples are SRA, LH and ECALL. They retire and
  change nothing.

## Memory map and the two kinds of address

The hardest thing to get right in this machine is that it uses two kinds of address.

- **The pc is a byte address.** It starts at 0 and steps by 4. The instruction is
  `memory[pc/4]`. Branch and jump offsets are byte offsets, so "back four instructions" is -16.
- **Data addresses are word indices.** LW and SW use `rs1 + imm` directly as the memory index.
  There is no division by 4. Consecutive data words are at consecutive addresses: the first
  data word is at 256 and the third at 258.

The memory is one array of 16,384 words (65,536 bytes). By convention, words 0-255 hold up to
256 instructions (pc 0-1020) and words 256-16,383 hold data. The hardware does not enforce the
split. A store may overwrite an instruction, and a pc beyond 1020 fetches whatever word is at
pc/4. All addresses wrap at the memory size.

## Pipeline

Each instruction travels down the pipeline in one record, `rv_pkg::state_t`. The record holds:

- `inst`, `inst_addr`
- the decoded fields `opcode`, `funct3`, `funct7`, `rd`, `rs1`, `rs2` and `imm`
- `alu_in1`, `alu_in2`, `alu_out`
- `mem_addr`, `mem_buffer`
- `br_addr`, `link_addr`
- a `valid` bit and the decoded operation `op`

Each stage is a combinational module that reads one record and writes an updated copy. Four
`rv_state_reg` pipeline registers (IF/ID, ID/EX, EX/MEM and MEM/WB) move the record on one stage
per cycle.

| Stage | Module | Work |
|---|---|---|
| Fetch | `rv_fetch` | Reads `memory[pc/4]`, then sets `pc = pc + 4` or takes a redirect. |
| Decode | `rv_decode`, `rv_regfile` | Splits the fields and builds the immediate. Reads rs1/rs2 into `alu_in1`/`alu_in2` (SW's rs2 goes to `mem_buffer`). Computes `br_addr` and `link_addr`. **Resolves JAL and JALR.** |
| Execute | `rv_execute`, `rv_alu` | Computes `alu_out`, which is also `mem_addr` for LW/SW. **Resolves BEQ/BNE/BLT/BGE.** |
| Memory | `rv_mem_stage` | LW: `mem_buffer = memory[mem_addr]`. SW: `memory[mem_addr] = mem_buffer`. |
| Writeback | `rv_writeback` | Writes `alu_out`, `mem_buffer` (LW) or `link_addr` (JAL/JALR) to `rd`. Detects termination. |

The memory has combinational reads and clocked writes, so fetch and the memory stage each take
one cycle. The register file returns a value written in the same cycle (write-before-read), so
writeback and decode can share a cycle.

### Where control flow resolves, and what it costs

The pipeline does no prediction. It fetches sequentially and squashes wrong-path instructions.
`rv_hazard` makes the decisions.

- **JAL and JALR** resolve in decode. pc_n is loaded with the target, and the one instruction
  fetched behind the jump becomes a bubble. A jump costs **1 cycle**.
- **A taken branch** resolves in execute. pc_n is loaded with `br_addr`, and the two younger
  instructions in fetch and decode are squashed. A taken branch costs **2 cycles**; a branch
  that is not taken costs nothing.
- If both happen in the same cycle, the branch wins. The jump in decode is younger and on the
  wrong path.

### Data hazards: interlock, no forwarding

Decode stalls while it needs a source register that an older instruction in execute or memory
has yet to write. x0 is excluded, and `uses_rs1` and `uses_rs2` from decode say which sources
an instruction really reads. During a stall, pc and IF/ID hold and a bubble enters execute.

The producer's writeback reaches decode through the register file's pass-through. So a
dependent instruction right behind its producer waits **2 cycles**, and one at distance 2 waits
**1 cycle**. A load is no different from an ALU instruction, because its value is also only
written in writeback. A JALR waits like any other reader of rs1 and redirects only once its
operand is ready.

This interlock is this design's choice; the machine's definition does not say how data hazards
are handled. Adding forwarding paths into decode and execute would remove most of the stalls.

### Termination

A valid instruction in writeback that writes the value 1 to x0 terminates the program. The
write itself is discarded, so x0 still reads 0. In that cycle, a store in the memory stage
behind the terminating instruction is blocked. From the next cycle every register holds and
`halted` stays high until reset. Termination is therefore precise: nothing younger than the
terminating instruction changes registers or memory.

### Cycle counts

The fill cost is 4 cycles, so a straight-line program of N independent instructions, the last
of them the terminating one, reports `cycles = N + 4` and `committed = N`. Each jump adds 1
cycle, each taken branch adds 2, and each stall cycle adds 1. The counters stop with the
machine. Both include the terminating instruction and its cycle.

## Top-level interface (`riscv_uconn_top`)

| Port | Dir | Width | Meaning |
|---|---|---|---|
| `clk`, `rst_n` | in | 1 | Clock and active-low synchronous reset. Reset clears pc, the registers, the pipeline and the counters, but not memory. |
| `host_index`, `host_we`, `host_wdata` | in | 14, 1, 32 | Host write port into memory, one word per cycle. Use it while `rst_n` is low. |
| `host_rdata` | out | 32 | `memory[host_index]`, combinational. |
| `dbg_reg` / `dbg_reg_data` | in / out | 5 / 32 | Reads any register at any time. |
| `halted` | out | 1 | The program has terminated. |
| `cycles`, `committed` | out | 32 | Cycles since reset and instructions retired. |
| `events` | out | `rv_pkg::events_t` | One-cycle pulses: `stall`, `jump`, `branch_taken`, `load`, `store`, `commit`. |

To run a program:

1. Hold `rst_n` low.
2. Write the instruction words from word 0 and the data from word 256.
3. Release `rst_n`.
4. Wait for `halted`.
5. Read the results through `host_rdata` and `dbg_reg_data`.

The one parameter is `MEM_WORDS`, default 16,384. The host port is this design's way to load
memory. A loader or a `$readmemh` in a wrapper would work equally well.

## Module map

All modules are in `rtl/`:

| Module | Role |
|---|---|
| `rv_pkg` | Opcodes, function fields, the `op_e` and `alu_op_e` enums, `state_t`, `events_t`, `BUBBLE`. |
| `riscv_uconn_top` | Core plus memory. |
| `rv_core` | The pipeline, including termination, counters and event pulses. |
| `rv_fetch`, `rv_decode`, `rv_execute`, `rv_mem_stage`, `rv_writeback` | The five stages. |
| `rv_alu` | The ALU, plus the equal and signed less-than outputs used by branches. |
| `rv_regfile` | 32 x 32 registers, with x0 hardwired and write-before-read. |
| `rv_hazard` | Redirect priority, squashes and the interlock. |
| `rv_state_reg` | Pipeline register with hold and flush. |
| `rv_memory` | The 16,384-word memory, with fetch, data and host ports. |

Synthesis sees the memory as a 512 Kbit array with three combinational read ports. An ASIC or
FPGA build would map it to a RAM macro with registered reads, and that would need one extra
pipeline cycle in fetch and in the memory stage.

## Verification

Each module has a self-checking testbench `tb/tb_<module>.sv`. Each one prints
`TB_RESULT checks=N failures=M` and stops itself through a watchdog.

`tb/rv_tb_pkg.sv` holds three shared pieces:

- Encoding functions for all 18 instructions (`a_add`, `a_lw`, `a_beq`, ...).
- A reference instruction-set model (`iss_run`) that executes a program one instruction at a
  time with no pipeline.
- A random program generator (`gen_program`). Its programs have a counted loop, random ALU, LUI,
  LW and SW instructions, forward branches, JAL and JALR, a terminating instruction, and stores
  after it that must never happen.

The two system-level testbenches are:

- `tb_rv_core` runs hand-written programs and checks exact cycle counts: the fill cost, the
  2-cycle and 1-cycle dependence stalls, load-use, the 1-cycle jump cost, the 2-cycle
  taken-branch cost and the free not-taken branch. It also checks precise termination and that
  the machine freezes afterwards. It then runs 40 random programs and compares all registers,
  80 data words and the committed count with the reference model.
- `tb_riscv_uconn_top` runs the full-size machine with default parameters and loads every word
  through the host port. It runs a program whose main function calls a bubble sort and a sum
  over 16 signed words (JAL calls, JALR returns). The result is checked against a sort done in
  the testbench and against the reference model. It then runs 12 random programs. It counts
  stalls, jumps, taken branches, loads, stores and terminations, and fails if any of them never
  happened.

To simulate with Verilator, for example the full machine:

```
verilator --binary --timing --assert -Irtl -Itb \
  rtl/rv_pkg.sv tb/rv_tb_pkg.sv rtl/*.sv tb/tb_riscv_uconn_top.sv \
  --top-module tb_riscv_uconn_top -o sim
./obj_dir/sim
```

To test one module, replace the top testbench with that module's testbench. Every testbench
finishes in well under a second. Verilator has no X state, so all state that is read is either
reset or written by the testbench before use.

## Choices made where the machine's definition is silent

- **Data hazards:** interlock with register-file pass-through; no forwarding.
- **Control hazards:** squash and refetch, as described above.
- **Termination:** precise. A store behind the terminating instruction is blocked.
- **Counters:** `committed` and `cycles` both include the terminating instruction and its cycle.
- **Unsupported encodings:** decoded as no-operations.
- **Out-of-range addresses:** pc/4 and data addresses wrap at the memory size. The hardware does
  not enforce the split between instructions and data.
- **Reset:** registers clear to 0. Memory is not reset.
- **Loading and inspection:** a host memory port and a register debug port take the place of
  program loading and of register and memory dumps.
- **Memory ports:** reads are combinational, and on a same-word write collision the data port
  wins over the host port.
