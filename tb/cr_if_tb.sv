// cr_if_tb: the whole CR interface, hit packets in, CR words out.
//
// Sends 150 packets: good ones, empty ones (no hit words) and corrupted ones
// (bad magic, wrong length). The CR side is slow (ready one cycle in four
// for the first part of the run), so the FIFO wrapper fills up. Checks the
// exact CR word stream (SOP, 32-bit halves low first, EOP) built from the
// good packets only, the filter counters, and that the FIFO level rose and
// returned to zero.
module cr_if_tb;
  import tpg_pkg::*;

  localparam int unsigned FIFO_DEPTH = 64;

  logic clk = 0, rst = 1;
  always #5 clk = ~clk;

  logic [63:0] s_tdata;
  logic s_tvalid, s_tuser, s_tlast, s_tready;
  logic [31:0] cr_data;
  logic cr_k, cr_valid, cr_ready;
  logic [31:0] cnt_in, cnt_empty, cnt_corrupt, cnt_out;
  logic [$clog2(FIFO_DEPTH+1)-1:0] fifo_level;
  logic [1:0][31:0] probe_pkts;
  logic [1:0][15:0] probe_errs;
  logic [1:0][3:0]  probe_status;

  cr_if #(.FIFO_DEPTH(FIFO_DEPTH)) dut (.*);

  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; if (failures < 20) $display("FAIL: %s", what); end
  endtask

  logic [65:0] src [$];
  logic [32:0] exp_q [$];
  int n_good = 0, n_empty = 0, n_bad = 0;

  initial begin
    for (int p = 0; p < 150; p++) begin
      automatic int kind = $urandom_range(0, 7);   // 0..4 good, 5 empty, 6..7 corrupt
      automatic int nw = (kind == 5) ? 0 : $urandom_range(1, 12);
      automatic int len = 2 + nw;
      automatic hit_hdr_t h = '0;
      automatic logic [65:0] pk [$];
      h.magic = HDR_MAGIC; h.channel = 8'(p); h.n_words = 16'(nw);
      if (kind == 6) h.magic = 8'h5A;
      if (kind == 7) len = len + 1;
      for (int i = 0; i < len; i++) begin
        automatic logic [63:0] d = (i == 0) ? 64'(h) : {$urandom, $urandom};
        pk.push_back({i == 1, i == len - 1, d});
      end
      foreach (pk[i]) src.push_back(pk[i]);
      if (kind <= 4) begin
        n_good++;
        exp_q.push_back({1'b1, 24'h0, K_SOF});
        foreach (pk[i]) begin
          exp_q.push_back({1'b0, pk[i][31:0]});
          exp_q.push_back({1'b0, pk[i][63:32]});
        end
        exp_q.push_back({1'b1, 24'h0, K_EOF});
      end else if (kind == 5) n_empty++;
      else n_bad++;
    end
  end

  int sp = 0, cyc = 0, max_level = 0, n_backpressure = 0;
  always_ff @(posedge clk) begin
    cyc <= cyc + 1;
    cr_ready <= (cyc < 3000) ? ($urandom_range(0, 3) == 0) : ($urandom_range(0, 3) != 0);
    if (rst) s_tvalid <= 0;
    else begin
      if (s_tvalid && s_tready) sp = sp + 1;
      if (s_tvalid && !s_tready) n_backpressure++;
      if (!s_tvalid || s_tready) begin
        s_tvalid <= sp < src.size();
        if (sp < src.size()) {s_tuser, s_tlast, s_tdata} <= src[sp];
      end
      if (int'(fifo_level) > max_level) max_level = int'(fifo_level);
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
    wait (sp == src.size() && exp_q.size() == 0);
    repeat (20) @(posedge clk);
    check(cnt_in == 150, $sformatf("cnt_in %0d", cnt_in));
    check(cnt_out == n_good, $sformatf("cnt_out %0d exp %0d", cnt_out, n_good));
    check(cnt_empty == n_empty, $sformatf("cnt_empty %0d exp %0d", cnt_empty, n_empty));
    check(cnt_corrupt == n_bad, $sformatf("cnt_corrupt %0d exp %0d", cnt_corrupt, n_bad));
    check(probe_pkts[0] == 150, $sformatf("FIFO-side probe packets %0d", probe_pkts[0]));
    check(probe_pkts[1] == n_good, $sformatf("packer-side probe packets %0d", probe_pkts[1]));
    check(probe_errs == '0, "probe saw protocol errors");
    check(max_level == FIFO_DEPTH, $sformatf("FIFO never filled: max %0d", max_level));
    check(n_backpressure > 0, "no back-pressure on the input");
    check(fifo_level == 0, "FIFO not drained");
    check(!cr_valid, "CR output still valid");
    $display("good %0d empty %0d corrupt %0d, max FIFO level %0d",
             n_good, n_empty, n_bad, max_level);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (60000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
