// tb_riscv_uconn_top: end-to-end testbench of the whole machine at its default size
// (16,384-word memory). Programs are loaded word by word through the host port while the
// core is held in reset, run until termination, and checked through the host port and the
// register debug port.
// 1. A sort program: main calls a bubble-sort function and a summing function over 16 data
//    words at word 256 (JAL calls, JALR returns), stores the sum and terminates. The result
//    is checked against a sort and sum done here, and against the reference model.
// 2. Random programs compared with the reference model (registers, data words, count).
// Each mechanism of the pipeline is counted: decode stalls, jumps resolved in decode, taken
// branches resolved in execute, loads, stores and terminations; one never seen is a failure.
module tb_riscv_uconn_top;
  import rv_pkg::*;
  import rv_tb_pkg::*;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic [13:0] host_index;
  logic        host_we;
  word_t       host_wdata, host_rdata, dbg_reg_data;
  logic [4:0]  dbg_reg;
  logic        halted;
  logic [31:0] cycles, committed;
  events_t     events;

  riscv_uconn_top dut (.*);

  int checks = 0, failures = 0;
  int n_stall = 0, n_jump = 0, n_taken = 0, n_load = 0, n_store = 0, n_halt = 0;
  always @(posedge clk) if (rst_n) begin
    n_stall += int'(events.stall); n_jump += int'(events.jump); n_taken += int'(events.branch_taken);
    n_load += int'(events.load); n_store += int'(events.store);
  end

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  // Load img[] through the host port, then run until termination.
  task automatic load_and_run(int max_cycles);
    rst_n = 0;
    host_we = 1;
    for (int i = 0; i < MEM_WORDS; i++) begin
      host_index = 14'(i);
      host_wdata = img[i];
      @(posedge clk);
      #1;
    end
    host_we = 0;
    #1 rst_n = 1;
    for (int c = 0; c < max_cycles && !halted; c++) @(posedge clk);
    #1;
    n_halt += int'(halted);
  endtask

  task automatic peek(int a, output word_t v);
    host_index = 14'(a);
    #1 v = host_rdata;
  endtask

  task automatic compare_with_model(string t);
    check(halted, {t, ": halted"});
    check(committed == iss_committed, $sformatf("%s: committed %0d vs %0d", t, committed, iss_committed));
    for (int r = 0; r < 32; r++) begin
      dbg_reg = 5'(r); #1;
      check(dbg_reg_data == iss_regs[r], $sformatf("%s: x%0d %h vs %h", t, r, dbg_reg_data, iss_regs[r]));
    end
    for (int i = DATA_BASE; i < DATA_BASE + 80; i++) begin
      host_index = 14'(i); #1;
      check(host_rdata == iss_mem[i], $sformatf("%s: mem[%0d]", t, i));
    end
  endtask

  function automatic void sort_program(int n);
    int b;
    foreach (img[i]) img[i] = (i < IMEM_WORDS) ? a_nop() : '0;
    img[0]  = a_addi(10, 0, DATA_BASE);
    img[1]  = a_addi(11, 0, n);
    img[2]  = a_jal(1, (8 - 2) * 4);
    img[3]  = a_jal(1, (23 - 3) * 4);
    img[4]  = a_sw(12, n, 10);
    img[5]  = a_halt();
    // sort(base x10, n x11)
    img[8]  = a_addi(5, 11, -1);
    img[9]  = a_bge(0, 5, (22 - 9) * 4);
    img[10] = a_addi(6, 0, 0);
    img[11] = a_bge(6, 5, (20 - 11) * 4);
    img[12] = a_add(7, 10, 6);
    img[13] = a_lw(28, 0, 7);
    img[14] = a_lw(29, 1, 7);
    img[15] = a_bge(29, 28, (18 - 15) * 4);
    img[16] = a_sw(29, 0, 7);
    img[17] = a_sw(28, 1, 7);
    img[18] = a_addi(6, 6, 1);
    img[19] = a_jal(0, (11 - 19) * 4);
    img[20] = a_addi(5, 5, -1);
    img[21] = a_jal(0, (9 - 21) * 4);
    img[22] = a_jalr(0, 1, 0);
    // sum(base x10, n x11) -> x12
    img[23] = a_addi(12, 0, 0);
    img[24] = a_addi(6, 0, 0);
    img[25] = a_bge(6, 11, (31 - 25) * 4);
    img[26] = a_add(7, 10, 6);
    img[27] = a_lw(28, 0, 7);
    img[28] = a_add(12, 12, 28);
    img[29] = a_addi(6, 6, 1);
    img[30] = a_jal(0, (25 - 30) * 4);
    img[31] = a_jalr(0, 1, 0);
    b = 7;
    for (int i = 0; i < n; i++) begin
      b = (b * 1103515245 + 12345) & 32'h7fff_ffff;
      img[DATA_BASE + i] = word_t'(b) - 32'h4000_0000;
    end
  endfunction

  initial begin
    repeat (2_000_000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int n = 16;
    word_t expect_sorted [$];
    word_t sum, v;
    dbg_reg = 0; host_index = 0; host_we = 0; host_wdata = 0;

    // --- sort and sum
    sort_program(n);
    sum = 0;
    for (int i = 0; i < n; i++) begin
      expect_sorted.push_back(img[DATA_BASE + i]);
      sum += img[DATA_BASE + i];
    end
    // insertion sort, signed
    for (int i = 1; i < n; i++)
      for (int j = i; j > 0 && $signed(expect_sorted[j]) < $signed(expect_sorted[j-1]); j--) begin
        v = expect_sorted[j]; expect_sorted[j] = expect_sorted[j-1]; expect_sorted[j-1] = v;
      end
    iss_reset(); iss_load_img();
    check(iss_run(100000), "sort: model terminated");
    load_and_run(50000);
    compare_with_model("sort");
    for (int i = 0; i < n; i++) begin
      peek(DATA_BASE + i, v);
      check(v == expect_sorted[i], $sformatf("sorted[%0d] = %h expected %h", i, v, expect_sorted[i]));
    end
    peek(DATA_BASE + n, v);
    check(v == sum, "sum stored");
    check(cycles > committed, "sort: cycles exceed committed instructions (stalls and flushes)");
    $display("sort: %0d instructions in %0d cycles", committed, cycles);

    // --- random programs
    for (int t = 0; t < 12; t++) begin
      gen_program(32'h5150 + 7 * t, 80 + 10 * t, 3);
      iss_reset(); iss_load_img();
      check(iss_run(100000), "random: model terminated");
      load_and_run(20000);
      compare_with_model($sformatf("random %0d", t));
    end

    check(n_stall > 0, "stall seen");
    check(n_jump > 0, "decode redirect seen");
    check(n_taken > 0, "execute redirect seen");
    check(n_load > 0, "load seen");
    check(n_store > 0, "store seen");
    check(n_halt == 13, "every program terminated");
    $display("events: stall=%0d jump=%0d taken=%0d load=%0d store=%0d halt=%0d",
             n_stall, n_jump, n_taken, n_load, n_store, n_halt);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
