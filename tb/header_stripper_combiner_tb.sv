// header_stripper_combiner_tb: packet sequencing of a TPG block.
//
// The processing chain is replaced by a stub that takes the samples with
// random readiness, reports a known pedestal at each packet start and then
// returns 0..4 made-up hit words and a trailer. Checks: the samples reach
// the chain unchanged with tdest = channel and tlast on the 64th; the output
// packet is header (magic, flags, channel, n_words), timestamp with tuser,
// pedestal word only when there are hits, then the hits with tlast; masked
// channels lose their hits; the input is held (tready low) from the end of
// the samples until the output packet is gone.
module header_stripper_combiner_tb;
  import tpg_pkg::*;
  import tpg_model_pkg::*;

  logic clk = 0, rst = 1;
  always #5 clk = ~clk;

  logic [N_GROUPS-1:0] chan_mask;
  logic [15:0] s_tdata, c_tdata, ped_value, ped_accum;
  logic        s_tvalid, s_tuser, s_tlast, s_tready;
  logic [7:0]  c_tdest;
  logic        c_tvalid, c_tlast, c_tready, ped_valid;
  logic [63:0] h_tdata, m_tdata;
  logic        h_tvalid, h_tlast, h_tready, m_tvalid, m_tuser, m_tlast, m_tready;

  header_stripper_combiner dut (.*);

  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; if (failures < 20) $display("FAIL: %s", what); end
  endtask

  localparam int NP = 40;
  logic [17:0] src [$];
  logic [65:0] exp_out [$];
  logic [24:0] exp_chain [$];     // {last, dest, data}
  int n_hold = 0, n_ped = 0, n_empty = 0, n_masked = 0;

  function automatic int nh_of(int p); return p % 5; endfunction

  initial begin
    chan_mask = '0;
    chan_mask[7] = 1'b1;
    for (int p = 0; p < NP; p++) begin
      automatic int c = 4 * ((p * 3) % 16) + 1;
      automatic logic [63:0] ts = 64'h1111_2222_3333_0000 + 64'(p);
      automatic hit_t hits[$];
      automatic logic [63:0] pkt[$];
      for (int i = 0; i < nh_of(p); i++) hits.push_back(hit_t'({32'(p), 32'(i)}));
      if (c / 4 == 7) begin if (hits.size() > 0) n_masked++; hits.delete(); end
      if (hits.size() > 0) n_ped++; else n_empty++;
      hit_packet(c, ts, 8'h0, hits, 1'b1, 16'(16'h100 + p), 16'(p % 7), pkt);
      foreach (pkt[i]) exp_out.push_back({i == 1, i == pkt.size() - 1, pkt[i]});
      src.push_back({2'b00, 8'h00, 8'(c)});
      for (int b = 0; b < 4; b++) src.push_back({b == 3, 1'b0, ts[16*b +: 16]});
      for (int i = 0; i < 64; i++) begin
        src.push_back({i == 63, i == 63, 16'(p * 64 + i)});
        exp_chain.push_back({i == 63, 8'(c), 16'(p * 64 + i)});
      end
    end
  end

  // chain stub
  int pk = 0, hq = 0;
  bit first = 1, hits_pending = 0;
  always_ff @(posedge clk) begin
    c_tready  <= $urandom_range(0, 3) != 0;
    ped_valid <= 0;
    if (rst) begin
      h_tvalid <= 0;
    end else begin
      if (c_tvalid && c_tready) begin
        check(exp_chain.size() > 0 && {c_tlast, c_tdest, c_tdata} == exp_chain[0],
              $sformatf("chain %h exp %h", {c_tlast, c_tdest, c_tdata}, exp_chain[0]));
        void'(exp_chain.pop_front());
        if (first) begin
          ped_valid <= 1;
          ped_value <= 16'(16'h100 + pk);
          ped_accum <= 16'(pk % 7);
        end
        first = c_tlast;
        if (c_tlast) begin hits_pending = 1; hq = 0; end
      end
      if (h_tvalid && h_tready) begin
        if (h_tlast) begin hits_pending = 0; pk++; end
        else hq++;
      end
      if (!h_tvalid || h_tready) begin
        h_tvalid <= hits_pending && ($urandom_range(0, 2) != 0);
        h_tlast  <= hq == nh_of(pk);
        h_tdata  <= (hq == nh_of(pk)) ? 64'(nh_of(pk)) : {32'(pk), 32'(hq)};
      end
    end
  end

  int sp = 0;
  bit data_done = 0;
  always_ff @(posedge clk) begin
    m_tready <= $urandom_range(0, 3) != 0;
    if (rst) begin
      s_tvalid <= 0;
    end else begin
      if (s_tvalid && s_tready) begin
        sp = sp + 1;
      end
      if (s_tvalid && !s_tready) n_hold++;
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
    $display("hold cycles %0d, pedestal words %0d, empty packets %0d, masked %0d", n_hold, n_ped, n_empty, n_masked);
    check(n_hold > 0 && n_ped > 0 && n_empty > 0 && n_masked > 0, "a mechanism was not exercised");
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
