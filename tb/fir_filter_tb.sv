// fir_filter_tb: 32-tap FIR with state save/restore against the model.
//
// Sends 6 rounds of 64-sample packets for 8 interleaved channels (so every
// packet after the first round must start from its channel's restored delay
// line), with random input gaps and output backpressure. Checks every output
// sample, tdest, tlast and the one-cycle latency.
module fir_filter_tb;
  import tpg_pkg::*;
  import tpg_model_pkg::*;

  logic clk = 0, rst = 1;
  always #5 clk = ~clk;

  logic [15:0] s_tdata, m_tdata;
  logic [7:0]  s_tdest, m_tdest;
  logic s_tvalid, s_tlast, s_tready, m_tvalid, m_tlast, m_tready;

  fir_filter dut (.*);

  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; if (failures < 20) $display("FAIL: %s", what); end
  endtask

  logic [24:0] src [$];        // {last, dest, data}
  logic [24:0] exp_out [$];    // {last, dest, data}
  logic [31:0] exp_ped [$];
  int steps = 0;

  initial begin
    chain_model m = new();
    for (int r = 0; r < 6; r++)
      for (int ci = 0; ci < 8; ci++) begin
        automatic int c = ci * 4 + 1;   // lane 1 channels
        automatic logic [15:0] x [64];
        automatic logic signed [15:0] sub [64], filt [64];
        automatic logic [15:0] p0, a0;
        for (int i = 0; i < 64; i++)
          x[i] = 16'(200 + 10 * ci + r * 3 + $urandom_range(0, 8) + ((i % 23 == 5) ? 900 : 0));
        m.run(c, x, sub, filt, p0, a0);
        if (p0 != m.ped[c]) steps++;
        exp_ped.push_back({p0, a0});
        for (int i = 0; i < 64; i++) begin
          src.push_back({i == 63, 8'(c), sub[i]});
          exp_out.push_back({i == 63, 8'(c), filt[i]});
        end
      end
  end

  int first_in = -1, first_out = -1, cyc = 0, sp = 0;
  always_ff @(posedge clk) begin
    cyc <= cyc + 1;
    m_tready <= $urandom_range(0, 3) != 0;
    if (rst) begin
      s_tvalid <= 0;
    end else begin
      if (s_tvalid && s_tready) begin
        sp = sp + 1;
        if (first_in < 0) first_in = cyc;
      end
      if (!s_tvalid || s_tready) begin
        s_tvalid <= (sp < src.size()) && ($urandom_range(0, 4) != 0);
        if (sp < src.size()) {s_tlast, s_tdest, s_tdata} <= src[sp];
      end
      if (m_tvalid && m_tready) begin
        if (first_out < 0) first_out = cyc;
        check(exp_out.size() > 0 && {m_tlast, m_tdest, m_tdata} == exp_out[0],
              $sformatf("out %h exp %h", {m_tlast, m_tdest, m_tdata}, exp_out[0]));
        void'(exp_out.pop_front());
      end
    end
  end

  initial begin
    repeat (3) @(posedge clk);
    rst = 0;
    wait (exp_out.size() == 0 && sp == src.size());
    repeat (5) @(posedge clk);
    check(first_out == first_in + 1, "latency is not one cycle");
    $display("first input cycle %0d, first output cycle %0d", first_in, first_out);
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
