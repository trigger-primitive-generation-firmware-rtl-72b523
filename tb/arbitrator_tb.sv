// arbitrator_tb: four packet streams merged into one.
//
// Each input sends 30 packets of random length (2..12 beats) with random
// gaps; the output has random backpressure. Checks that every output packet
// is one whole input packet, in order per input, with no interleaving, that
// m_src names its input, that a packet is only started once it is
// completely buffered, and that all four inputs get served.
module arbitrator_tb;
  logic clk = 0, rst = 1;
  always #5 clk = ~clk;

  logic [3:0][63:0] s_tdata;
  logic [3:0] s_tvalid, s_tuser, s_tlast, s_tready;
  logic [63:0] m_tdata;
  logic m_tvalid, m_tuser, m_tlast, m_tready;
  logic [1:0] m_src;

  arbitrator dut (.*);

  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; if (failures < 20) $display("FAIL: %s", what); end
  endtask

  localparam int NP = 30;
  logic [65:0] src [4][$];
  logic [65:0] exp_q [4][$];
  int sp [4], pkts_in [4], served [4];

  initial begin
    for (int k = 0; k < 4; k++) begin
      sp[k] = 0; pkts_in[k] = 0; served[k] = 0;
      for (int p = 0; p < NP; p++) begin
        automatic int len = $urandom_range(2, 12);
        for (int i = 0; i < len; i++) begin
          automatic logic [65:0] w = {i == 1, i == len - 1, 8'(k), 24'(p), 32'(i)};
          src[k].push_back(w);
          exp_q[k].push_back(w);
        end
      end
    end
  end

  bit in_pkt = 0;
  int cur = 0, done_pkts = 0;
  always_ff @(posedge clk) begin
    m_tready <= $urandom_range(0, 3) != 0;
    for (int k = 0; k < 4; k++) begin
      if (rst) s_tvalid[k] <= 0;
      else begin
        if (s_tvalid[k] && s_tready[k]) begin
          sp[k] = sp[k] + 1;
          if (s_tlast[k]) pkts_in[k]++;
        end
        if (!s_tvalid[k] || s_tready[k]) begin
          s_tvalid[k] <= (sp[k] < src[k].size()) && ($urandom_range(0, 3) == 0);
          if (sp[k] < src[k].size()) {s_tuser[k], s_tlast[k], s_tdata[k]} <= src[k][sp[k]];
        end
      end
    end
    if (!rst && m_tvalid && m_tready) begin
      automatic int k = m_tdata[63:56];
      if (!in_pkt) begin
        cur = k;
        check(pkts_in[k] > served[k], "packet started before it was complete");
      end
      check(k == cur, "packets interleaved");
      check(m_src == 2'(k), "m_src");
      check(exp_q[k].size() > 0 && {m_tuser, m_tlast, m_tdata} == exp_q[k][0],
            $sformatf("input %0d: %h exp %h", k, {m_tuser, m_tlast, m_tdata}, exp_q[k][0]));
      void'(exp_q[k].pop_front());
      in_pkt = !m_tlast;
      if (m_tlast) begin served[k]++; done_pkts++; end
    end
  end

  initial begin
    repeat (3) @(posedge clk);
    rst = 0;
    wait (done_pkts == 4 * NP);
    repeat (5) @(posedge clk);
    for (int k = 0; k < 4; k++) check(served[k] == NP && exp_q[k].size() == 0, $sformatf("input %0d not fully served", k));
    check(!m_tvalid, "output active after the last packet");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (30000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
