// sync_fifo_tb: FIFO against a queue model with random push/pop, including
// pushes while full and pops while empty (both ignored), and the count,
// full and empty flags. Default size (64 bits x 16).
module sync_fifo_tb;
  logic clk = 0, rst = 1;
  always #5 clk = ~clk;

  logic        push, pop, full, empty;
  logic [63:0] wr_data, rd_data;
  logic [4:0]  count;

  sync_fifo dut (.*);

  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; if (failures < 20) $display("FAIL: %s", what); end
  endtask

  logic [63:0] q [$];
  int n_full = 0, n_empty = 0;

  initial begin
    push = 0; pop = 0; wr_data = 0;
    repeat (3) @(posedge clk);
    rst = 0;
    for (int i = 0; i < 4000; i++) begin
      automatic int bias = (i / 500) % 2;     // alternate fill and drain phases
      @(negedge clk);
      check(count == 5'(q.size()), $sformatf("count %0d model %0d", count, q.size()));
      check(full == (q.size() == 16), "full flag");
      check(empty == (q.size() == 0), "empty flag");
      if (q.size() > 0) check(rd_data == q[0], "head");
      if (full) n_full++;
      if (empty) n_empty++;
      push = bias ? ($urandom_range(0, 3) == 0) : ($urandom_range(0, 3) != 0);
      pop  = bias ? ($urandom_range(0, 3) != 0) : ($urandom_range(0, 3) == 0);
      wr_data = {$urandom, $urandom};
      begin
        automatic bit was_full = (q.size() == 16);
        @(posedge clk);
        if (pop && q.size() > 0) void'(q.pop_front());
        if (push && !was_full) q.push_back(wr_data);
      end
    end
    check(n_full > 0 && n_empty > 0, "full and empty both reached");
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
