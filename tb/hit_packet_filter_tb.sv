// hit_packet_filter_tb: empty and corrupted hit packets are removed.
//
// Sends a mix of 200 packets: good ones with 1..20 payload words, empty ones
// (header + timestamp, n_words = 0), and corrupted ones (bad magic, length
// not matching n_words, tuser missing or on the wrong beat, too long for the
// frame memory). Checks that exactly the good packets come out, unchanged,
// with tuser on beat 1 and tlast on the last beat, and the four counters.
module hit_packet_filter_tb;
  import tpg_pkg::*;

  logic clk = 0, rst = 1;
  always #5 clk = ~clk;

  logic [63:0] s_tdata, m_tdata;
  logic s_tvalid, s_tuser, s_tlast, s_tready, m_tvalid, m_tuser, m_tlast, m_tready;
  logic [31:0] cnt_in, cnt_empty, cnt_corrupt, cnt_out;

  hit_packet_filter dut (.*);

  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; if (failures < 20) $display("FAIL: %s", what); end
  endtask

  logic [65:0] src [$], exp_q [$];
  int n_good = 0, n_empty = 0, n_bad = 0;

  initial begin
    for (int p = 0; p < 200; p++) begin
      automatic int kind = $urandom_range(0, 9);   // 0..5 good, 6 empty, 7..9 corrupt
      automatic int nw = (kind == 6) ? 0 : $urandom_range(1, 20);
      automatic int len = 2 + nw;
      automatic hit_hdr_t h = '0;
      automatic logic [65:0] pk [$];
      h.magic = HDR_MAGIC; h.channel = 8'(p); h.n_words = 16'(nw);
      if (kind == 7) h.magic = 8'h00;
      if (kind == 8) len = len + ((p % 2) ? 1 : -1);
      if (kind == 9 && p % 2 == 0) begin h.n_words = 16'(70); len = 72; end
      for (int i = 0; i < len; i++) begin
        automatic logic [63:0] d = (i == 0) ? 64'(h) : {32'(p), 32'(i)};
        automatic bit u = (i == 1);
        if (kind == 9 && p % 2 == 1 && i == 1) u = 0;
        pk.push_back({u, i == len - 1, d});
      end
      foreach (pk[i]) src.push_back(pk[i]);
      if (kind <= 5) begin n_good++; foreach (pk[i]) exp_q.push_back(pk[i]); end
      else if (kind == 6) n_empty++;
      else n_bad++;
    end
  end

  int sp = 0;
  always_ff @(posedge clk) begin
    m_tready <= $urandom_range(0, 3) != 0;
    if (rst) s_tvalid <= 0;
    else begin
      if (s_tvalid && s_tready) sp = sp + 1;
      if (!s_tvalid || s_tready) begin
        s_tvalid <= (sp < src.size()) && ($urandom_range(0, 4) != 0);
        if (sp < src.size()) {s_tuser, s_tlast, s_tdata} <= src[sp];
      end
      if (m_tvalid && m_tready) begin
        check(exp_q.size() > 0 && {m_tuser, m_tlast, m_tdata} == exp_q[0],
              $sformatf("out %h exp %h", {m_tuser, m_tlast, m_tdata}, exp_q[0]));
        void'(exp_q.pop_front());
      end
    end
  end

  initial begin
    repeat (3) @(posedge clk);
    rst = 0;
    wait (sp == src.size() && exp_q.size() == 0);
    repeat (10) @(posedge clk);
    check(cnt_in == 200, $sformatf("cnt_in %0d", cnt_in));
    check(cnt_out == n_good, $sformatf("cnt_out %0d exp %0d", cnt_out, n_good));
    check(cnt_empty == n_empty, $sformatf("cnt_empty %0d exp %0d", cnt_empty, n_empty));
    check(cnt_corrupt == n_bad, $sformatf("cnt_corrupt %0d exp %0d", cnt_corrupt, n_bad));
    check(n_empty > 0 && n_bad > 0, "stimulus");
    $display("good %0d, empty %0d, corrupt %0d", n_good, n_empty, n_bad);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (40000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
