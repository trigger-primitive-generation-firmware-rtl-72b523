// pedsub_tb: pedestal subtraction against the reference model.
//
// Sends 6 rounds of 64-sample packets for 8 channels, interleaved as in the
// real data flow, with random gaps on the input and random backpressure on
// the output. Checks every output sample (value, tdest, tlast), the
// pedestal/accumulator reported at each packet start, and the one-cycle
// latency of the first sample of the run.
module pedsub_tb;
  import tpg_pkg::*;
  import tpg_model_pkg::*;

  logic clk = 0, rst = 1;
  always #5 clk = ~clk;

  logic [15:0] s_tdata, m_tdata, ped_value, ped_accum;
  logic [7:0]  s_tdest, m_tdest;
  logic s_tvalid, s_tlast, s_tready, m_tvalid, m_tlast, m_tready, ped_valid;

  pedsub dut (.*);

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
          x[i] = 16'(200 + 10 * ci + r * 3 + $urandom_range(0, 8) + ((i % 23 == 5) ? 90 : 0));
        m.run(c, x, sub, filt, p0, a0);
        if (p0 != m.ped[c]) steps++;
        exp_ped.push_back({p0, a0});
        for (int i = 0; i < 64; i++) begin
          src.push_back({i == 63, 8'(c), x[i]});
          exp_out.push_back({i == 63, 8'(c), sub[i]});
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
      if (ped_valid) begin
        check(exp_ped.size() > 0 && {ped_value, ped_accum} == exp_ped[0],
              $sformatf("ped %h exp %h", {ped_value, ped_accum}, exp_ped[0]));
        void'(exp_ped.pop_front());
      end
    end
  end

  initial begin
    repeat (3) @(posedge clk);
    rst = 0;
    wait (exp_out.size() == 0 && sp == src.size());
    repeat (5) @(posedge clk);
    check(exp_ped.size() == 0, "missing pedestal reports");
    check(steps > 0, "pedestal never stepped");
    check(first_out == first_in + 1, "latency is not one cycle");
    $display("pedestal steps %0d, first input cycle %0d, first output cycle %0d", steps, first_in, first_out);
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
