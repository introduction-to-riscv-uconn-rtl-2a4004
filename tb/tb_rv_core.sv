// tb_rv_core: self-checking testbench of the five-stage core, with the memory modelled here.
// Directed programs check exact cycle counts (pipeline fill of 4 cycles, 2 stall cycles for
// a back-to-back register dependence, 1 lost cycle per jump resolved in decode, 2 per taken
// branch resolved in execute) and precise termination. Random programs with loops, loads,
// stores, branches, JAL and JALR are then compared with the reference model: every register,
// the data words and the committed-instruction count.
module tb_rv_core;
  import rv_pkg::*;
  import rv_tb_pkg::*;

  localparam int AW = 14;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic [AW-1:0] imem_index, dmem_index;
  word_t imem_rdata, dmem_rdata, dmem_wdata, dbg_reg_data;
  logic dmem_we, halted;
  logic [4:0] dbg_reg;
  logic [31:0] cycles, committed;
  events_t events;
  word_t mem [MEM_WORDS];

  assign imem_rdata = mem[imem_index];
  assign dmem_rdata = mem[dmem_index];
  always @(posedge clk) if (dmem_we) mem[dmem_index] <= dmem_wdata;

  rv_core dut (.*);

  int checks = 0, failures = 0;
  int n_stall = 0, n_jump = 0, n_taken = 0, n_load = 0, n_store = 0;
  always @(posedge clk) if (rst_n) begin
    n_stall += int'(events.stall); n_jump += int'(events.jump); n_taken += int'(events.branch_taken);
    n_load += int'(events.load); n_store += int'(events.store);
  end

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  task automatic run(int max_cycles);
    rst_n = 0;
    foreach (img[i]) mem[i] = img[i];
    repeat (2) @(posedge clk);
    #1 rst_n = 1;
    for (int c = 0; c < max_cycles && !halted; c++) @(posedge clk);
    #1;
  endtask

  function automatic word_t reg_val(int r);
    dbg_reg = 5'(r);
    return dbg_reg_data;
  endfunction

  task automatic reg_is(int r, word_t v, string t);
    dbg_reg = 5'(r); #1;
    check(dbg_reg_data == v, $sformatf("%s x%0d=%h expected %h", t, r, dbg_reg_data, v));
  endtask

  task automatic clear_img();
    foreach (img[i]) img[i] = (i < IMEM_WORDS) ? a_nop() : '0;
  endtask

  initial begin
    repeat (2_000_000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    dbg_reg = 0;
    // --- straight line: N instructions retire in N + 4 cycles
    clear_img();
    for (int i = 0; i < 7; i++) img[i] = a_addi(i + 1, 0, 10 * i + 3);
    img[7] = a_halt();
    run(100);
    check(halted, "straight: halted");
    check(cycles == 12 && committed == 8, $sformatf("straight: cycles %0d committed %0d", cycles, committed));
    for (int i = 0; i < 7; i++) reg_is(i + 1, word_t'(10 * i + 3), "straight");
    reg_is(0, 0, "x0 stays 0");

    // --- back-to-back dependence: 2 stall cycles; distance 2: 1 stall cycle
    clear_img();
    img[0] = a_addi(1, 0, 5);
    img[1] = a_add(2, 1, 1);
    img[2] = a_addi(3, 0, 1);
    img[3] = a_sub(4, 2, 0);
    img[4] = a_halt();
    run(100);
    check(cycles == 5 + 4 + 2 + 1, $sformatf("raw: cycles %0d", cycles));
    reg_is(2, 10, "raw"); reg_is(4, 10, "raw");

    // --- load then use
    clear_img();
    img[DATA_BASE + 3] = 32'h1234_5678;
    img[0] = a_addi(1, 0, DATA_BASE);
    img[1] = a_addi(9, 0, 0);
    img[2] = a_addi(9, 0, 0);
    img[3] = a_lw(2, 3, 1);
    img[4] = a_addi(3, 2, 1);
    img[5] = a_sw(3, 4, 1);
    img[6] = a_lw(5, 4, 1);
    img[7] = a_halt();
    run(100);
    reg_is(2, 32'h1234_5678, "load"); reg_is(5, 32'h1234_5679, "load-store-load");
    check(mem[DATA_BASE + 4] == 32'h1234_5679, "store word");
    check(cycles == 8 + 4 + 2 + 2 + 0, $sformatf("load-use: cycles %0d", cycles));

    // --- JAL resolves in decode: one lost cycle; JALR likewise
    clear_img();
    img[0] = a_jal(1, 8);
    img[1] = a_addi(5, 0, 1);
    img[2] = a_addi(6, 0, 2);
    img[3] = a_halt();
    run(100);
    check(cycles == 3 + 4 + 1, $sformatf("jal: cycles %0d", cycles));
    reg_is(1, 4, "jal link"); reg_is(5, 0, "jal skipped"); reg_is(6, 2, "jal target");

    clear_img();
    img[0] = a_addi(7, 0, 20);
    img[1] = a_nop(); img[2] = a_nop();
    img[3] = a_jalr(8, 7, 4);           // to byte 24 = word 6
    img[4] = a_addi(5, 0, 1);
    img[5] = a_addi(5, 0, 2);
    img[6] = a_addi(6, 0, 3);
    img[7] = a_halt();
    run(100);
    check(cycles == 6 + 4 + 1, $sformatf("jalr: cycles %0d", cycles));
    reg_is(8, 16, "jalr link"); reg_is(5, 0, "jalr skipped"); reg_is(6, 3, "jalr target");

    // --- taken branch resolves in execute: two lost cycles; not-taken costs nothing
    clear_img();
    img[0] = a_beq(0, 0, 12);
    img[1] = a_addi(5, 0, 1);
    img[2] = a_addi(5, 0, 2);
    img[3] = a_bne(0, 0, 8);
    img[4] = a_addi(6, 0, 3);
    img[5] = a_halt();
    run(100);
    check(cycles == 4 + 4 + 2, $sformatf("branch: cycles %0d", cycles));
    reg_is(5, 0, "branch squash"); reg_is(6, 3, "branch fallthrough");

    // --- termination is precise: nothing behind the halting instruction changes state
    clear_img();
    img[0] = a_addi(1, 0, DATA_BASE);
    img[1] = a_addi(2, 0, 99);
    img[2] = a_nop(); img[3] = a_nop();
    img[4] = a_halt();
    img[5] = a_sw(2, 0, 1);
    img[6] = a_addi(3, 0, 1);
    img[DATA_BASE] = 32'hCAFE;
    run(100);
    check(mem[DATA_BASE] == 32'hCAFE, "store after halt suppressed");
    reg_is(3, 0, "no write after halt");
    check(committed == 5, $sformatf("halt committed %0d", committed));
    begin
      logic [31:0] c0;
      c0 = cycles;
      repeat (5) @(posedge clk);
      #1 check(cycles == c0 && halted, "frozen after halt");
    end

    // --- random programs against the reference model
    for (int t = 0; t < 40; t++) begin
      gen_program(32'h1000 + t, 60 + t % 100, 2 + t % 4);
      iss_reset(); iss_load_img();
      check(iss_run(100000), "reference terminated");
      run(20000);
      check(halted, $sformatf("rand %0d halted", t));
      check(committed == iss_committed, $sformatf("rand %0d committed %0d vs %0d", t, committed, iss_committed));
      for (int r = 0; r < 32; r++) reg_is(r, iss_regs[r], $sformatf("rand %0d", t));
      for (int i = DATA_BASE; i < DATA_BASE + 70; i++)
        check(mem[i] == iss_mem[i], $sformatf("rand %0d mem[%0d]", t, i));
    end

    check(n_stall > 0 && n_jump > 0 && n_taken > 0 && n_load > 0 && n_store > 0, "all mechanisms seen");
    $display("events: stall=%0d jump=%0d taken=%0d load=%0d store=%0d", n_stall, n_jump, n_taken, n_load, n_store);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
