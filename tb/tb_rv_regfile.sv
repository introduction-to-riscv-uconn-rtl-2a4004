// tb_rv_regfile: writes and reads random values against a shadow copy kept here; checks
// reset to 0, x0 hardwired to 0, same-cycle write pass-through on both read ports, and the
// debug port.
module tb_rv_regfile;
  import rv_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic [4:0] ra1, ra2, wa, dbg_a;
  word_t rd1, rd2, wd, dbg_d;
  logic we;
  word_t shadow [32];
  int checks = 0, failures = 0;

  rv_regfile dut (.*);

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    we = 0; wa = 0; wd = 0; ra1 = 0; ra2 = 0; dbg_a = 0;
    foreach (shadow[i]) shadow[i] = '0;
    repeat (2) @(posedge clk);
    #1 rst_n = 1;
    for (int r = 0; r < 32; r++) begin
      dbg_a = 5'(r); ra1 = 5'(r); #1;
      check(dbg_d == 0 && rd1 == 0, $sformatf("reset x%0d", r));
    end
    for (int k = 0; k < 2000; k++) begin
      we = ($urandom_range(0, 3) != 0);
      wa = 5'($urandom);
      wd = $urandom;
      ra1 = (k % 4 == 0) ? wa : 5'($urandom);
      ra2 = (k % 5 == 0) ? wa : 5'($urandom);
      dbg_a = 5'($urandom);
      #1;
      check(rd1 == ((ra1 == 0) ? 0 : (we && wa == ra1) ? wd : shadow[ra1]), $sformatf("rd1 x%0d", ra1));
      check(rd2 == ((ra2 == 0) ? 0 : (we && wa == ra2) ? wd : shadow[ra2]), $sformatf("rd2 x%0d", ra2));
      check(dbg_d == shadow[dbg_a], $sformatf("dbg x%0d", dbg_a));
      @(posedge clk);
      if (we && wa != 0) shadow[wa] = wd;
      #1;
    end
    we = 0;
    // reset clears
    rst_n = 0; @(posedge clk); #1 rst_n = 1;
    for (int r = 0; r < 32; r++) begin dbg_a = 5'(r); #1; check(dbg_d == 0, "second reset"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
