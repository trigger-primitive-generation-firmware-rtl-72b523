// hit_finder_tb: hit finding against the reference model.
//
// 60 packets of 64 signed samples: random pulses of random width and
// height, pulses that end exactly on the last sample or run over it, single
// samples above threshold (no hit), samples equal to the threshold, and a
// negative baseline. The threshold changes between packets. Every hit word
// and every trailer (hit count, tlast) is compared, with random output
// backpressure and input gaps.
module hit_finder_tb;
  import tpg_pkg::*;
  import tpg_model_pkg::*;

  logic clk = 0, rst = 1;
  always #5 clk = ~clk;

  logic [15:0] threshold, s_tdata;
  logic        s_tvalid, s_tlast, s_tready, m_tvalid, m_tlast, m_tready;
  logic [63:0] m_tdata;

  hit_finder dut (.*);

  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; if (failures < 20) $display("FAIL: %s", what); end
  endtask

  logic [16:0] src [$];      // {last, data}
  logic [15:0] thr_of [$];   // threshold per packet
  logic [64:0] exp_out [$];  // {last, data}
  int n_hits = 0, n_cont = 0, n_empty = 0;

  initial begin
    for (int p = 0; p < 60; p++) begin
      automatic logic signed [15:0] s [64];
      automatic hit_t hits[$];
      automatic logic signed [15:0] thr = 16'(10 + (p % 5) * 7);
      for (int i = 0; i < 64; i++) s[i] = 16'(int'($urandom_range(0, 10)) - 8);
      for (int k = 0; k < 3; k++) begin
        automatic int st = $urandom_range(0, 63), w = $urandom_range(1, 9), h = $urandom_range(5, 200);
        if (p % 7 == 0 && k == 0) begin st = 60; w = 4; end     // ends on the last sample
        if (p % 7 == 1 && k == 0) begin st = 61; w = 8; end     // runs over
        if (p % 7 == 2 && k == 0) begin st = 20; w = 1; end     // single sample
        for (int i = st; i < st + w && i < 64; i++) s[i] = 16'(h - 3 * (i - st));
      end
      if (p % 7 == 3) begin s[30] = thr; s[31] = thr + 1; s[32] = thr + 2; s[33] = thr; end
      find_hits(s, thr, hits);
      thr_of.push_back(thr);
      foreach (hits[i]) begin
        exp_out.push_back({1'b0, 64'(hits[i])});
        n_hits++;
        if (hits[i].cont) n_cont++;
      end
      if (hits.size() == 0) n_empty++;
      exp_out.push_back({1'b1, 64'(hits.size())});
      for (int i = 0; i < 64; i++) src.push_back({i == 63, s[i]});
    end
  end

  int sp = 0, pk = 0;
  always_ff @(posedge clk) begin
    m_tready <= $urandom_range(0, 3) != 0;
    if (rst) begin
      s_tvalid <= 0;
    end else begin
      if (s_tvalid && s_tready) begin
        sp = sp + 1;
      end
      if (!s_tvalid || s_tready) begin
        s_tvalid <= (sp < src.size()) && ($urandom_range(0, 4) != 0);
        if (sp < src.size()) {s_tlast, s_tdata} <= src[sp];
      end
      if (m_tvalid && m_tready) begin
        check(exp_out.size() > 0 && {m_tlast, m_tdata} == exp_out[0],
              $sformatf("packet %0d: out %h exp %h", pk, {m_tlast, m_tdata}, exp_out[0]));
        if (m_tlast) pk++;
        void'(exp_out.pop_front());
      end
    end
  end
  // threshold follows the packet being fed
  assign threshold = thr_of.size() > 0 ? thr_of[(sp / 64) < thr_of.size() ? sp / 64 : 0] : 16'd0;

  initial begin
    repeat (3) @(posedge clk);
    rst = 0;
    wait (exp_out.size() == 0 && sp == src.size());
    repeat (5) @(posedge clk);
    $display("hits %0d, continued %0d, packets without hits %0d", n_hits, n_cont, n_empty);
    check(n_cont > 0 && n_empty > 0 && n_hits > 50, "stimulus did not cover continue / empty cases");
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
