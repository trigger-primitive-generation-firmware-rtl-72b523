// hf_link_processor_tb: end-to-end test of one link processor.
//
// One fibre's worth of synthetic detector data - per-channel baselines with
// small noise and regular pulses, some straddling packet boundaries, and a
// baseline shift the pedestal must follow - framed as WIB frames at the
// 2 MHz tick rate (one frame every 125 clocks), with one truncated frame and
// one masked channel. The Central-Router output is decoded back into hit
// packets and compared word by word with the reference model in
// tpg_model_pkg. CR flow control is toggled at random. At the end the
// monitoring registers are read over the register bus and checked.
// Mechanisms counted (each must occur): CR backpressure, data-router hold by
// a TPG block, hit-continue flags, pedestal validation words, empty packets
// dropped, damaged frames rejected, pedestal steps, masked channel.
module hf_link_processor_tb;
  import tpg_pkg::*;
  import tpg_model_pkg::*;

  localparam int NL    = 1;
  localparam int NBLK  = 4;
  localparam int TICKS = NBLK * PKT_TICKS;
  localparam logic [15:0] THR = 16'd25;
  localparam int MASK_CH = 5;

  logic clk = 1'b0, rst = 1'b1;
  always #2 clk = ~clk;

  logic [NL-1:0][31:0] rx_data, cr_data;
  logic [NL-1:0]       rx_k, rx_valid, cr_k, cr_valid, cr_ready;
  ipb_wbus_t [NL-1:0]  ipb_in;
  ipb_rbus_t [NL-1:0]  ipb_out;

  hf_link_processor dut (
    .clk, .rst, .rx_data(rx_data[0]), .rx_k(rx_k[0]), .rx_valid(rx_valid[0]),
    .cr_data(cr_data[0]), .cr_k(cr_k[0]), .cr_valid(cr_valid[0]), .cr_ready(cr_ready[0]),
    .ipb_in(ipb_in[0]), .ipb_out(ipb_out[0])
  );

  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL: %s", what);
    end
  endtask

  // ------------------------------------------------------------ stimulus
  link_word_t words [NL][$];
  int         widx  [NL] = '{default: 0};
  logic [63:0] exp_pkt [string][$];
  int n_expected = 0, n_empty_exp [NL], n_received = 0, n_rx_link [NL] = '{default: 0};
  int n_cont = 0, n_ped = 0, n_ped_steps = 0, n_masked = 0;
  bit go = 0;

  function automatic logic [11:0] sample(int l, int c, int t);
    int base = 300 + ((c * 37 + l * 11) % 400);
    int noise = int'($urandom_range(0, 6)) - 3;
    int ph = (t + 13 * c + 7 * l) % 97;
    int pulse = (ph < 8) ? (ph < 4 ? 60 * (ph + 1) : 60 * (8 - ph)) : 0;
    if (t > 150 && c % 16 == 3) base += 20;      // baseline shift: pedestal must follow
    return 12'(base + noise + pulse);
  endfunction

  initial begin
    logic [11:0] s [256];
    logic [15:0] x [256][64];
    chain_model m [NL];
    for (int l = 0; l < NL; l++) begin
      m[l] = new();
      n_empty_exp[l] = 0;
      for (int t = 0; t < TICKS; t++) begin
        automatic logic [63:0] ts = 64'h1000 + 64'(25 * t);
        for (int c = 0; c < 256; c++) begin
          s[c] = sample(l, c, t);
          x[c][t % 64] = 16'(s[c]);
        end
        if (l == 0 && t == 70) begin
          // truncated frame: SOF, a few words, EOF; must be rejected
          automatic link_word_t tmp[$];
          build_frame(ts, s, tmp);
          for (int i = 0; i < 40; i++) words[l].push_back(tmp[i]);
          words[l].push_back({1'b1, 24'h0, K_EOF});
        end
        build_frame(ts, s, words[l]);
        for (int i = 0; i < 125 - FRAME_WORDS; i++) words[l].push_back({1'b1, 24'h0, K_IDLE});
        if (t % 64 == 63) begin
          automatic logic [63:0] bts = 64'h1000 + 64'(25 * (t - 63));
          for (int c = 0; c < 256; c++) begin
            automatic logic signed [15:0] sub [64], filt [64];
            automatic logic [15:0] p0, a0;
            automatic hit_t hits[$];
            automatic logic [63:0] pkt[$];
            m[l].run(c, x[c], sub, filt, p0, a0);
            find_hits(filt, signed'(THR), hits);
            if (l == 0 && c == MASK_CH) begin
              if (hits.size() > 0) n_masked++;
              hits.delete();
            end
            if (hits.size() == 0) begin
              n_empty_exp[l]++;
            end else begin
              hit_packet(c, bts, 8'h0, hits, 1'b1, p0, a0, pkt);
              exp_pkt[$sformatf("%0d_%0d_%0h", l, c, bts)] = pkt;
              n_expected++;
              foreach (hits[i]) if (hits[i].cont) n_cont++;
              n_ped++;
            end
            if (p0 != m[l].ped[c]) n_ped_steps++;
          end
        end
      end
    end
    go = 1;
  end

  // link drivers
  always_ff @(posedge clk) begin
    for (int l = 0; l < NL; l++) begin
      if (go && !rst && widx[l] < words[l].size()) begin
        {rx_k[l], rx_data[l]} <= words[l][widx[l]];
        rx_valid[l] <= 1'b1;
        widx[l]     <= widx[l] + 1;
      end else begin
        rx_valid[l] <= 1'b0;
        rx_k[l]     <= 1'b0;
        rx_data[l]  <= '0;
      end
    end
  end

  // CR flow control: random backpressure
  int n_stall = 0, n_hold = 0, n_bad_seen = 0;
  always_ff @(posedge clk) begin
    for (int l = 0; l < NL; l++) begin
      cr_ready[l] <= ($urandom_range(0, 7) != 0);
      if (cr_valid[l] && !cr_ready[l]) n_stall++;
    end
    if (|(dut.u_tvalid & ~dut.u_tready)) n_hold++;
  end

  // ------------------------------------------------------------ receiver
  logic [63:0] rx_pkt [NL][$];
  logic [31:0] lo_word [NL];
  bit          half [NL], in_pkt [NL];
  always_ff @(posedge clk) begin
    for (int l = 0; l < NL; l++) begin
      if (cr_valid[l] && cr_ready[l]) begin
        if (cr_k[l] && cr_data[l][7:0] == K_SOF) begin
          rx_pkt[l].delete();
          half[l]   <= 0;
          in_pkt[l] <= 1;
        end else if (cr_k[l] && cr_data[l][7:0] == K_EOF) begin
          automatic hit_hdr_t h = hit_hdr_t'(rx_pkt[l][0]);
          automatic string key = $sformatf("%0d_%0d_%0h", l, h.channel, rx_pkt[l][1]);
          in_pkt[l] <= 0;
          n_received++;
          n_rx_link[l]++;
          if (!exp_pkt.exists(key)) check(0, $sformatf("unexpected packet %s", key));
          else begin
            check(exp_pkt[key].size() == rx_pkt[l].size(),
                  $sformatf("packet %s: %0d words, expected %0d", key, rx_pkt[l].size(), exp_pkt[key].size()));
            foreach (exp_pkt[key][i])
              if (i < rx_pkt[l].size())
                check(exp_pkt[key][i] == rx_pkt[l][i],
                      $sformatf("packet %s word %0d: %h expected %h", key, i, rx_pkt[l][i], exp_pkt[key][i]));
            exp_pkt.delete(key);
          end
        end else begin
          if (!half[l]) lo_word[l] <= cr_data[l];
          else rx_pkt[l].push_back({cr_data[l], lo_word[l]});
          half[l] <= !half[l];
        end
      end
    end
  end

  // ------------------------------------------------------------ register bus
  task automatic ipb(input int l, input logic [31:0] addr, input bit wr, input logic [31:0] wd,
                     output logic [31:0] rd);
    @(posedge clk);
    ipb_in[l] <= '{addr: addr, wdata: wd, strobe: 1'b1, write: wr};
    do @(posedge clk); while (!(ipb_out[l].ack || ipb_out[l].err));
    rd = ipb_out[l].rdata;
    ipb_in[l] <= '0;
    @(posedge clk);
  endtask

  initial begin
    logic [31:0] rd;
    ipb_in = '0;
    repeat (5) @(posedge clk);
    rst = 1'b0;
    repeat (2) @(posedge clk);
    for (int l = 0; l < NL; l++) begin
      ipb(l, 32'h0, 1'b1, 32'(THR), rd);
      ipb(l, 32'h0, 1'b0, 0, rd);
      check(rd[15:0] == THR, "threshold read-back");
    end
    // mask channel 5 of link 0: TPG lane 1, group 1
    ipb(0, 32'h8 + 2 * (MASK_CH % 4), 1'b1, 32'(1) << (MASK_CH / 4), rd);
    wait (go);
    wait (n_received == n_expected && widx[0] == words[0].size());
    repeat (2000) @(posedge clk);
    check(exp_pkt.num() == 0, $sformatf("%0d expected packets never arrived", exp_pkt.num()));
    for (int l = 0; l < NL; l++) begin
      ipb(l, 32'h40, 1'b0, 0, rd);  check(rd == TICKS, $sformatf("link %0d ticks %0d", l, rd));
      ipb(l, 32'h41, 1'b0, 0, rd);  check(rd == 0, $sformatf("link %0d dropped frames %0d", l, rd));
      ipb(l, 32'h42, 1'b0, 0, rd);  check(rd == (l == 0 ? 1 : 0), $sformatf("link %0d bad frames %0d", l, rd));
      if (l == 0 && rd == 1) n_bad_seen++;
      ipb(l, 32'h43, 1'b0, 0, rd);  check(rd == NBLK * 256, $sformatf("link %0d packets into CR-if %0d", l, rd));
      ipb(l, 32'h44, 1'b0, 0, rd);  check(rd == n_empty_exp[l], $sformatf("link %0d empty %0d exp %0d", l, rd, n_empty_exp[l]));
      ipb(l, 32'h45, 1'b0, 0, rd);  check(rd == 0, $sformatf("link %0d corrupt %0d", l, rd));
      ipb(l, 32'h7A, 1'b0, 0, rd);  check(rd == 0, $sformatf("link %0d AXI protocol errors %0d", l, rd));
      // six probes per TPG block: every channel packet passes each of them once
      for (int k = 0; k < 4; k++)
        for (int j = 0; j < 6; j++) begin
          ipb(l, 32'h48 + 6 * k + j, 1'b0, 0, rd);
          check(rd == NBLK * 64, $sformatf("link %0d TPG %0d probe %0d packets %0d", l, k, j, rd));
          ipb(l, 32'h60 + 6 * k + j, 1'b0, 0, rd);
          check(rd[15:0] == 0, $sformatf("link %0d TPG %0d probe %0d errors %0d", l, k, j, rd[15:0]));
        end
      ipb(l, 32'h78, 1'b0, 0, rd);  check(rd == NBLK * 256, $sformatf("link %0d arbitrator packets %0d", l, rd));
      ipb(l, 32'h7E, 1'b0, 0, rd);  check(rd == NBLK * 256, $sformatf("link %0d CR-if FIFO probe packets %0d", l, rd));
      ipb(l, 32'h7F, 1'b0, 0, rd);  check(rd == n_rx_link[l], $sformatf("link %0d CR-if packer probe packets %0d", l, rd));
      ipb(l, 32'h7C, 1'b0, 0, rd);  check(rd == n_rx_link[l], $sformatf("link %0d CR packets %0d exp %0d", l, rd, n_rx_link[l]));
      ipb(l, 32'h7D, 1'b0, 0, rd);  check(rd == 0, $sformatf("link %0d CR protocol errors %0d", l, rd));
    end
    $display("mechanisms: backpressure=%0d router_hold=%0d hit_continue=%0d ped_words=%0d empty_dropped=%0d bad_frames=%0d ped_steps=%0d masked=%0d packets=%0d",
             n_stall, n_hold, n_cont, n_ped, n_empty_exp[0], n_bad_seen, n_ped_steps, n_masked, n_received);
    check(n_stall > 0, "backpressure never happened");
    check(n_hold > 0, "router hold never happened");
    check(n_cont > 0, "no hit-continue");
    check(n_ped > 0, "no pedestal word");
    check(n_empty_exp[0] > 0, "no empty packet");
    check(n_bad_seen > 0, "no bad frame");
    check(n_ped_steps > 0, "no pedestal step");
    check(n_masked > 0, "mask never removed a hit");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog, %0d of %0d packets received", n_received, n_expected);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
