// cr_mux_tb: merging of five CR packet streams into one output.
//
// Each of the five inputs sends 60 packets (SOP, 2..16 data words, EOP) with
// random gaps and random per-word valid; the output has random flow
// control. Checks that every output packet is whole and uninterrupted, that
// its SOP carries LINK_BASE + input in bits 15:8, that it matches the next
// expected packet of that input word for word, that every packet arrives,
// and that the inputs are served fairly (the output switches input after
// almost every packet while several inputs are waiting).
module cr_mux_tb;
  import tpg_pkg::*;

  localparam int N = 5, BASE = 5, NP = 60;

  logic clk = 0, rst = 1;
  always #5 clk = ~clk;

  logic [N-1:0][31:0] s_data;
  logic [N-1:0]       s_k, s_valid, s_ready;
  logic [31:0] m_data;
  logic m_k, m_valid, m_ready;

  cr_mux #(.N_IN(N), .LINK_BASE(BASE)) dut (.*);

  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; if (failures < 20) $display("FAIL: %s", what); end
  endtask

  logic [32:0] src [N][$];     // words to send per input
  logic [32:0] exp_q [N][$];   // expected words per input, SOP tagged
  int sp [N];
  initial begin
    for (int i = 0; i < N; i++) begin
      sp[i] = 0;
      for (int p = 0; p < NP; p++) begin
        automatic int nd = $urandom_range(2, 16);
        src[i].push_back({1'b1, 24'h0, K_SOF});
        exp_q[i].push_back({1'b1, 16'h0, 8'(BASE + i), K_SOF});
        for (int d = 0; d < nd; d++) begin
          automatic logic [32:0] w = {1'b0, $urandom};
          src[i].push_back(w);
          exp_q[i].push_back(w);
        end
        src[i].push_back({1'b1, 24'h0, K_EOF});
        exp_q[i].push_back({1'b1, 24'h0, K_EOF});
      end
    end
  end

  int cur = -1, prev = -1, n_pkts = 0, n_same = 0, n_stall = 0;
  always_ff @(posedge clk) begin
    m_ready <= $urandom_range(0, 3) != 0;
    if (rst) s_valid <= '0;
    else begin
      for (int i = 0; i < N; i++) begin
        if (s_valid[i] && s_ready[i]) sp[i] = sp[i] + 1;
        if (!s_valid[i] || s_ready[i]) begin
          s_valid[i] <= (sp[i] < src[i].size()) && ($urandom_range(0, 5) != 0);
          if (sp[i] < src[i].size()) {s_k[i], s_data[i]} <= src[i][sp[i]];
        end
      end
      if (m_valid && !m_ready) n_stall++;
      if (m_valid && m_ready) begin
        if (cur < 0) begin
          automatic int l = int'(m_data[15:8]) - BASE;
          check(m_k && m_data[7:0] == K_SOF, $sformatf("packet starts with %h", {m_k, m_data}));
          check(l >= 0 && l < N, $sformatf("bad link tag %0d", l + BASE));
          if (l >= 0 && l < N) cur = l;
        end
        if (cur >= 0) begin
          check(exp_q[cur].size() > 0 && {m_k, m_data} == exp_q[cur][0],
                $sformatf("input %0d: out %h exp %h", cur, {m_k, m_data}, exp_q[cur][0]));
          void'(exp_q[cur].pop_front());
          if (m_k && m_data[7:0] == K_EOF) begin
            n_pkts++;
            if (cur == prev) n_same++;
            prev = cur;
            cur = -1;
          end
        end
      end
    end
  end

  initial begin
    automatic int left;
    repeat (3) @(posedge clk);
    rst = 0;
    do begin
      @(posedge clk);
      left = 0;
      for (int i = 0; i < N; i++) left += exp_q[i].size();
    end while (left > 0);
    repeat (5) @(posedge clk);
    check(n_pkts == N * NP, $sformatf("packets %0d", n_pkts));
    check(n_same < n_pkts / 4, $sformatf("same input served back to back %0d times", n_same));
    check(n_stall > 0, "flow control never applied");
    check(!m_valid, "output still valid");
    $display("packets %0d, back-to-back from one input %0d", n_pkts, n_same);
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
