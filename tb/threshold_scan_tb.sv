// threshold_scan_tb: threshold scan on one link processor.
//
// The same two 64-tick blocks of synthetic detector data (per-channel
// baselines with small noise and regular pulses of several heights) are
// sent through a link processor once for each of five hit thresholds. Before
// every run the processor is reset and the threshold is written over the
// register bus. Every hit packet is compared word by word with the
// reference model in tpg_model_pkg at that threshold, the empty-packet
// counter is checked against the model once the CR interface has taken in
// every channel packet, and the number of hit packets must
// not rise as the threshold rises (and must fall over the whole scan). CR
// flow control is toggled at random. A watchdog ends a hung run.
module threshold_scan_tb;
  import tpg_pkg::*;
  import tpg_model_pkg::*;

  localparam int NBLK  = 2;
  localparam int TICKS = NBLK * PKT_TICKS;
  localparam int NTHR  = 5;
  localparam logic [15:0] THRS [NTHR] = '{16'd8, 16'd20, 16'd35, 16'd55, 16'd80};

  logic clk = 1'b0, rst = 1'b1;
  always #2 clk = ~clk;

  logic [31:0] rx_data = '0, cr_data;
  logic        rx_k = 1'b0, rx_valid = 1'b0, cr_k, cr_valid, cr_ready = 1'b0;
  ipb_wbus_t   ipb_in = '0;
  ipb_rbus_t   ipb_out;

  hf_link_processor dut (
    .clk, .rst, .rx_data, .rx_k, .rx_valid, .cr_data, .cr_k, .cr_valid, .cr_ready, .ipb_in, .ipb_out
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
  link_word_t  words[$];
  int          widx = 0;
  logic [15:0] x [NBLK][256][64];
  logic [63:0] exp_pkt [string][$];
  int          n_expected = 0, n_empty_exp = 0, n_received = 0;
  bit          go = 0;

  function automatic logic [11:0] sample(int c, int t);
    int base = 300 + ((c * 37) % 400);
    int noise = int'($urandom_range(0, 6)) - 3;
    int ph = (t + 13 * c) % 97;
    int amp = 20 + 40 * (c % 8);                  // pulse heights from 20 to 300
    int pulse = (ph < 8) ? (ph < 4 ? amp * (ph + 1) / 4 : amp * (8 - ph) / 4) : 0;
    return 12'(base + noise + pulse);
  endfunction

  initial begin
    logic [11:0] s [256];
    for (int t = 0; t < TICKS; t++) begin
      for (int c = 0; c < 256; c++) begin
        s[c] = sample(c, t);
        x[t / 64][c][t % 64] = 16'(s[c]);
      end
      build_frame(64'h1000 + 64'(25 * t), s, words);
      for (int i = 0; i < 125 - FRAME_WORDS; i++) words.push_back({1'b1, 24'h0, K_IDLE});
    end
  end

  // expected packets of one run: the model starts from reset like the DUT
  task automatic expect_run(input logic [15:0] thr);
    chain_model m = new();
    n_expected  = 0;
    n_empty_exp = 0;
    exp_pkt.delete();
    for (int b = 0; b < NBLK; b++) begin
      automatic logic [63:0] bts = 64'h1000 + 64'(25 * 64 * b);
      for (int c = 0; c < 256; c++) begin
        automatic logic signed [15:0] sub [64], filt [64];
        automatic logic [15:0] p0, a0;
        automatic hit_t hits[$];
        automatic logic [63:0] pkt[$];
        m.run(c, x[b][c], sub, filt, p0, a0);
        find_hits(filt, signed'(thr), hits);
        if (hits.size() == 0) n_empty_exp++;
        else begin
          hit_packet(c, bts, 8'h0, hits, 1'b1, p0, a0, pkt);
          exp_pkt[$sformatf("%0d_%0h", c, bts)] = pkt;
          n_expected++;
        end
      end
    end
  endtask

  always_ff @(posedge clk) begin
    if (go && !rst && widx < words.size()) begin
      {rx_k, rx_data} <= words[widx];
      rx_valid        <= 1'b1;
      widx            <= widx + 1;
    end else begin
      rx_valid <= 1'b0;
      rx_k     <= 1'b0;
      rx_data  <= '0;
    end
    cr_ready <= ($urandom_range(0, 7) != 0);
  end

  // ------------------------------------------------------------ receiver
  logic [63:0] rx_pkt[$];
  logic [31:0] lo_word;
  bit          half;
  always_ff @(posedge clk) begin
    if (cr_valid && cr_ready) begin
      if (cr_k && cr_data[7:0] == K_SOF) begin
        rx_pkt.delete();
        half <= 0;
      end else if (cr_k && cr_data[7:0] == K_EOF) begin
        automatic hit_hdr_t h = hit_hdr_t'(rx_pkt[0]);
        automatic string key = $sformatf("%0d_%0h", h.channel, rx_pkt[1]);
        n_received++;
        if (!exp_pkt.exists(key)) check(0, $sformatf("unexpected packet %s", key));
        else begin
          check(exp_pkt[key].size() == rx_pkt.size(),
                $sformatf("packet %s: %0d words, expected %0d", key, rx_pkt.size(), exp_pkt[key].size()));
          foreach (exp_pkt[key][i])
            if (i < rx_pkt.size())
              check(exp_pkt[key][i] == rx_pkt[i],
                    $sformatf("packet %s word %0d: %h expected %h", key, i, rx_pkt[i], exp_pkt[key][i]));
          exp_pkt.delete(key);
        end
      end else begin
        if (!half) lo_word <= cr_data;
        else rx_pkt.push_back({cr_data, lo_word});
        half <= !half;
      end
    end
  end

  // ------------------------------------------------------------ register bus
  task automatic ipb(input logic [31:0] addr, input bit wr, input logic [31:0] wd,
                     output logic [31:0] rd);
    @(posedge clk);
    ipb_in <= '{addr: addr, wdata: wd, strobe: 1'b1, write: wr};
    do @(posedge clk); while (!(ipb_out.ack || ipb_out.err));
    rd = ipb_out.rdata;
    ipb_in <= '0;
    @(posedge clk);
  endtask

  int n_hits_at [NTHR];
  initial begin
    logic [31:0] rd;
    for (int r = 0; r < NTHR; r++) begin
      rst <= 1'b1;
      go  <= 1'b0;
      repeat (5) @(posedge clk);
      widx = 0;
      n_received = 0;
      expect_run(THRS[r]);
      rst <= 1'b0;
      repeat (2) @(posedge clk);
      ipb(32'h0, 1'b1, 32'(THRS[r]), rd);
      ipb(32'h0, 1'b0, 0, rd);
      check(rd[15:0] == THRS[r], "threshold read-back");
      go <= 1'b1;
      wait (widx == words.size());
      do ipb(32'h43, 1'b0, 0, rd); while (rd != NBLK * 256);   // all channel packets processed
      wait (n_received == n_expected);
      repeat (2000) @(posedge clk);
      check(exp_pkt.num() == 0, $sformatf("threshold %0d: %0d expected packets never arrived", THRS[r], exp_pkt.num()));
      ipb(32'h44, 1'b0, 0, rd);
      check(rd == n_empty_exp, $sformatf("threshold %0d: empty %0d exp %0d", THRS[r], rd, n_empty_exp));
      ipb(32'h7C, 1'b0, 0, rd);
      check(rd == n_received, $sformatf("threshold %0d: CR packets %0d exp %0d", THRS[r], rd, n_received));
      n_hits_at[r] = n_received;
      $display("threshold %0d: %0d hit packets of %0d channel packets", THRS[r], n_received, NBLK * 256);
      if (r > 0) check(n_hits_at[r] <= n_hits_at[r-1], "hit packets rose with the threshold");
    end
    check(n_hits_at[NTHR-1] < n_hits_at[0], "the scan never changed the hit packet count");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog, %0d of %0d packets received", n_received, n_expected);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
