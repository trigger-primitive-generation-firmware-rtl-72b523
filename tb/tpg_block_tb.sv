// tpg_block_tb: one TPG lane, packet in -> hit packet out, against the
// reference model (pedestal subtraction + FIR + hit finding + packet
// format, written independently in tpg_model_pkg).
//
// Sends 8 rounds of packets for 16 channels of lane 2 (channels 4g+2),
// each a 5-beat header frame and 64 samples with pulses, some crossing the
// packet boundary. One channel is masked. Random input gaps and output
// backpressure. Checks every output word, tuser and tlast, and that the
// block holds the sender (tready low) while a packet is being processed.
module tpg_block_tb;
  import tpg_pkg::*;
  import tpg_model_pkg::*;

  logic clk = 0, rst = 1;
  always #5 clk = ~clk;

  logic [15:0] threshold = 16'd25;
  logic [N_GROUPS-1:0] chan_mask;
  logic [15:0] s_tdata;
  logic        s_tvalid, s_tuser, s_tlast, s_tready;
  logic [63:0] m_tdata;
  logic        m_tvalid, m_tuser, m_tlast, m_tready;
  logic [5:0][31:0] probe_pkts;
  logic [5:0][15:0] probe_errs;
  logic [5:0][3:0]  probe_status;

  tpg_block dut (.*);

  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; if (failures < 20) $display("FAIL: %s", what); end
  endtask

  localparam int MASKED_G = 3;
  logic [17:0] src [$];      // {user, last, data}
  logic [65:0] exp_out [$];  // {user, last, data}
  int n_pkts = 0, n_cont = 0, n_ped = 0, n_mask = 0;

  initial begin
    chain_model m = new();
    chan_mask = '0;
    chan_mask[MASKED_G] = 1'b1;
    for (int r = 0; r < 8; r++)
      for (int g = 0; g < 16; g++) begin
        automatic int c = 4 * g + 2;
        automatic logic [63:0] ts = 64'hABCD_0000_0000 + 64'(r * 1600);
        automatic logic [15:0] x [64];
        automatic logic signed [15:0] sub [64], filt [64];
        automatic logic [15:0] p0, a0;
        automatic hit_t hits[$];
        automatic logic [63:0] pkt[$];
        automatic logic [7:0] fl = (r == 5 && g == 1) ? 8'h01 : 8'h00;
        for (int i = 0; i < 64; i++) begin
          automatic int t = 64 * r + i;
          automatic int ph = (t + 11 * g) % 83;
          x[i] = 16'(500 + 5 * g + $urandom_range(0, 4) + ((ph < 6) ? 80 * (ph < 3 ? ph + 1 : 6 - ph) : 0));
        end
        m.run(c, x, sub, filt, p0, a0);
        find_hits(filt, 16'sd25, hits);
        if (g == MASKED_G) begin
          if (hits.size() > 0) n_mask++;
          hits.delete();
        end
        hit_packet(c, ts, fl, hits, 1'b1, p0, a0, pkt);
        foreach (hits[i]) if (hits[i].cont) n_cont++;
        if (hits.size() > 0) n_ped++;
        foreach (pkt[i]) exp_out.push_back({i == 1, i == pkt.size() - 1, pkt[i]});
        n_pkts++;
        src.push_back({2'b00, fl, 8'(c)});
        for (int b = 0; b < 4; b++) src.push_back({b == 3, 1'b0, ts[16*b +: 16]});
        for (int i = 0; i < 64; i++) src.push_back({i == 63, i == 63, x[i]});
      end
  end

  int sp = 0, n_hold = 0, n_bp = 0;
  always_ff @(posedge clk) begin
    m_tready <= $urandom_range(0, 3) != 0;
    if (rst) begin
      s_tvalid <= 0;
    end else begin
      if (s_tvalid && s_tready) sp = sp + 1;
      if (s_tvalid && !s_tready) n_hold++;
      if (m_tvalid && !m_tready) n_bp++;
      if (!s_tvalid || s_tready) begin
        s_tvalid <= (sp < src.size()) && ($urandom_range(0, 5) != 0);
        if (sp < src.size()) {s_tuser, s_tlast, s_tdata} <= src[sp];
      end
      if (m_tvalid && m_tready) begin
        check(exp_out.size() > 0 && {m_tuser, m_tlast, m_tdata} == exp_out[0],
              $sformatf("out %h exp %h", {m_tuser, m_tlast, m_tdata}, exp_out[0]));
        void'(exp_out.pop_front());
      end
    end
  end

  initial begin
    repeat (3) @(posedge clk);
    rst = 0;
    wait (exp_out.size() == 0 && sp == src.size());
    repeat (5) @(posedge clk);
    $display("packets %0d, continued hits %0d, pedestal words %0d, masked hits %0d, hold cycles %0d, backpressure %0d",
             n_pkts, n_cont, n_ped, n_mask, n_hold, n_bp);
    for (int j = 0; j < 6; j++) begin
      check(probe_pkts[j] == n_pkts, $sformatf("probe %0d packets %0d exp %0d", j, probe_pkts[j], n_pkts));
      check(probe_errs[j] == 0, $sformatf("probe %0d errors %0d", j, probe_errs[j]));
    end
    check(n_cont > 0 && n_ped > 0 && n_mask > 0 && n_hold > 0 && n_bp > 0, "a mechanism was not exercised");
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
