// tb_rv_memory: random writes through the data and host ports against a shadow copy; reads
// on all three ports; same-word collision (data port wins). Uses the default 16,384 words and
// first initialises every word through the host port.
module tb_rv_memory;
  import rv_pkg::*;
  localparam int W = 16384, AW = 14;
  logic clk = 0;
  always #5 clk = ~clk;
  logic [AW-1:0] i_index, d_index, h_index;
  word_t i_rdata, d_wdata, d_rdata, h_wdata, h_rdata;
  logic d_we, h_we;
  word_t shadow [W];
  int checks = 0, failures = 0;

  rv_memory dut (.*);

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    d_we = 0; h_we = 1; i_index = 0; d_index = 0; d_wdata = 0;
    for (int i = 0; i < W; i++) begin
      h_index = AW'(i); h_wdata = word_t'(i) ^ 32'hA5A5_0000; shadow[i] = h_wdata;
      @(posedge clk); #1;
    end
    h_we = 0;
    for (int i = 0; i < W; i += 97) begin
      i_index = AW'(i); #1;
      check(i_rdata == shadow[i], $sformatf("init word %0d", i));
    end
    for (int k = 0; k < 3000; k++) begin
      d_we = $urandom_range(0, 1) == 1;
      h_we = $urandom_range(0, 3) == 0;
      d_index = AW'($urandom_range(0, 300));
      h_index = (k % 7 == 0) ? d_index : AW'($urandom_range(0, 300));
      i_index = AW'($urandom_range(0, 300));
      d_wdata = $urandom; h_wdata = $urandom;
      #1;
      check(i_rdata == shadow[i_index], "fetch port read");
      check(d_rdata == shadow[d_index], "data port read");
      check(h_rdata == shadow[h_index], "host port read");
      @(posedge clk);
      if (h_we) shadow[h_index] = h_wdata;
      if (d_we) shadow[d_index] = d_wdata;
      #1;
    end
    d_we = 0; h_we = 0;
    for (int i = 0; i <= 300; i++) begin
      h_index = AW'(i); #1;
      check(h_rdata == shadow[i], $sformatf("final word %0d", i));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
