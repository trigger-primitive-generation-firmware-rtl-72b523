// dpram_tb: dual-port RAM, random writes and reads against an array model,
// including a read of an address written in the same cycle (the old value
// must come back) and the one-cycle read latency.
module dpram_tb;
  logic clk = 0;
  always #5 clk = ~clk;

  logic        we;
  logic [12:0] wr_addr, rd_addr;
  logic [63:0] wr_data, rd_data;

  dpram dut (.*);

  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; if (failures < 20) $display("FAIL: %s", what); end
  endtask

  logic [63:0] model [8192];
  bit          valid [8192];
  logic [63:0] exp_q;
  bit          exp_v;

  initial begin
    we = 0; wr_addr = 0; rd_addr = 0; wr_data = 0;
    foreach (valid[i]) valid[i] = 0;
    // fill part of the memory
    for (int i = 0; i < 300; i++) begin
      @(negedge clk);
      we = 1; wr_addr = 13'(i * 27); wr_data = {$urandom, $urandom};
      model[wr_addr] = wr_data; valid[wr_addr] = 1;
    end
    @(negedge clk); we = 0;
    for (int i = 0; i < 3000; i++) begin
      @(negedge clk);
      rd_addr = 13'($urandom_range(0, 299) * 27);
      we = $urandom_range(0, 1);
      wr_addr = (i % 5 == 0) ? rd_addr : 13'($urandom_range(0, 299) * 27);
      wr_data = {$urandom, $urandom};
      exp_q = model[rd_addr];
      exp_v = valid[rd_addr];
      @(posedge clk);
      if (we) begin model[wr_addr] = wr_data; valid[wr_addr] = 1; end
      #1 check(!exp_v || rd_data == exp_q, $sformatf("addr %0d: %h exp %h", rd_addr, rd_data, exp_q));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
