// crif_packer_tb: hit packets to Central Router words.
//
// 60 packets of 1..10 64-bit words with random input gaps and random CR
// flow control. Checks the exact CR word sequence: SOP k-character, low and
// high half of every word, EOP k-character, and that the output holds still
// while cr_ready is low.
module crif_packer_tb;
  import tpg_pkg::*;

  logic clk = 0, rst = 1;
  always #5 clk = ~clk;

  logic [63:0] s_tdata;
  logic s_tvalid, s_tlast, s_tready;
  logic [31:0] cr_data;
  logic cr_k, cr_valid, cr_ready;

  crif_packer dut (.*);

  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; if (failures < 20) $display("FAIL: %s", what); end
  endtask

  logic [64:0] src [$];
  logic [32:0] exp_q [$];
  int n_stall = 0;

  initial begin
    for (int p = 0; p < 60; p++) begin
      automatic int len = $urandom_range(1, 10);
      exp_q.push_back({1'b1, 24'h0, K_SOF});
      for (int i = 0; i < len; i++) begin
        automatic logic [63:0] d = {$urandom, $urandom};
        src.push_back({i == len - 1, d});
        exp_q.push_back({1'b0, d[31:0]});
        exp_q.push_back({1'b0, d[63:32]});
      end
      exp_q.push_back({1'b1, 24'h0, K_EOF});
    end
  end

  int sp = 0;
  logic [32:0] held;
  bit stalled = 0;
  always_ff @(posedge clk) begin
    cr_ready <= $urandom_range(0, 3) != 0;
    if (rst) s_tvalid <= 0;
    else begin
      if (s_tvalid && s_tready) sp = sp + 1;
      if (!s_tvalid || s_tready) begin
        s_tvalid <= (sp < src.size()) && ($urandom_range(0, 5) != 0);
        if (sp < src.size()) {s_tlast, s_tdata} <= src[sp];
      end
      if (stalled && cr_valid) check({cr_k, cr_data} == held, "output changed while stalled");
      stalled <= cr_valid && !cr_ready;
      held    <= {cr_k, cr_data};
      if (cr_valid && !cr_ready) n_stall++;
      if (cr_valid && cr_ready) begin
        check(exp_q.size() > 0 && {cr_k, cr_data} == exp_q[0],
              $sformatf("cr %h exp %h", {cr_k, cr_data}, exp_q[0]));
        void'(exp_q.pop_front());
      end
    end
  end

  initial begin
    repeat (3) @(posedge clk);
    rst = 0;
    wait (exp_q.size() == 0);
    repeat (5) @(posedge clk);
    check(sp == src.size(), "input not fully consumed");
    check(n_stall > 0, "flow control never applied");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
