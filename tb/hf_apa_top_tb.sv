// hf_apa_top_tb: end-to-end test of the full ten-link hit finder.
//
// Each link gets its own synthetic detector data - a per-channel baseline
// with small noise and regular pulses, some of which straddle packet
// boundaries - framed as WIB frames at the 2 MHz tick rate (one frame every
// 125 clocks). Link 0 also receives one truncated frame, and one of its
// channels is masked. The two hit outputs (five links each, every packet
// tagged with its link in the SOP word) are decoded back into hit packets
// and compared word by word with the reference model (pedestal
// subtraction, FIR and hit finding written independently in
// tpg_model_pkg). The CR flow control is toggled at random. The thresholds
// are set and read back from the host side through the IPbus-Wupper
// bridge, with a behavioural IPbus master between the bridge RAMs and the
// register buses (request word: link in bits 63:56, write in bit 55,
// address in bits 47:32, data in bits 31:0; reply word: ack in bit 63, data
// in bits 31:0; the packet length in word 0). At the end the monitoring
// registers are read over the register bus and checked.
// Mechanisms counted (each must occur): bridge transactions, output
// multiplexer switching
// between links, CR backpressure, data-router hold by
// a TPG block, hit-continue flags, pedestal validation words, empty packets
// dropped, damaged frames rejected, pedestal steps, masked channel.
module hf_apa_top_tb;
  import tpg_pkg::*;
  import tpg_model_pkg::*;

  localparam int NL    = 10;
  localparam int NBLK  = 3;
  localparam int TICKS = NBLK * PKT_TICKS;
  localparam logic [15:0] THR = 16'd25;
  localparam int MASK_CH = 5;

  logic clk = 1'b0, rst = 1'b1;
  always #2 clk = ~clk;

  localparam int NO    = 2;     // hit output links, 5 fibres each
  logic [NL-1:0][31:0] rx_data;
  logic [NL-1:0]       rx_k, rx_valid;
  logic [NO-1:0][31:0] cr_data;
  logic [NO-1:0]       cr_k, cr_valid, cr_ready;
  ipb_wbus_t [NL-1:0]  ipb_in;
  ipb_rbus_t [NL-1:0]  ipb_out;

  logic        br_reg_write = 1'b0, br_rsp_we = 1'b0, br_pkt_done = 1'b0;
  logic [2:0]  br_reg_sel = 3'(BR_PKT_DONE);
  logic [63:0] br_reg_wdata = '0, br_reg_rdata, br_req_data, br_rsp_data = '0;
  logic [8:0]  br_req_addr = '0, br_rsp_addr = '0;

  hf_apa_top dut (
    .clk, .rst, .rx_data, .rx_k, .rx_valid, .cr_data, .cr_k, .cr_valid, .cr_ready, .ipb_in, .ipb_out,
    .br_reg_write, .br_reg_sel, .br_reg_wdata, .br_reg_rdata, .br_req_addr, .br_req_data,
    .br_rsp_we, .br_rsp_addr, .br_rsp_data, .br_pkt_done
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
  bit go = 0, cfg_done = 0;   // stimulus ready, registers configured

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
      if (go && cfg_done && widx[l] < words[l].size()) begin
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
    for (int o = 0; o < NO; o++) begin
      cr_ready[o] <= ($urandom_range(0, 7) != 0);
      if (cr_valid[o] && !cr_ready[o]) n_stall++;
    end
    if (|(dut.g_link[0].u_link.u_tvalid & ~dut.g_link[0].u_link.u_tready)) n_hold++;
  end

  // ------------------------------------------------------------ receiver
  // Each output carries whole packets of its five links; the SOP word names
  // the link in bits 15:8.
  logic [63:0] rx_pkt [NO][$];
  logic [31:0] lo_word [NO];
  bit          half [NO], in_pkt [NO];
  int          cur [NO], prev_link [NO] = '{default: -1};
  int          n_switch = 0;
  always_ff @(posedge clk) begin
    for (int o = 0; o < NO; o++) begin
      if (cr_valid[o] && cr_ready[o]) begin
        if (cr_k[o] && cr_data[o][7:0] == K_SOF) begin
          automatic int l = int'(cr_data[o][15:8]);
          check(!in_pkt[o], $sformatf("output %0d: SOP inside a packet", o));
          check(l / 5 == o, $sformatf("output %0d: packet of link %0d", o, l));
          if (prev_link[o] >= 0 && prev_link[o] != l) n_switch++;
          prev_link[o] = l;
          cur[o] = l;
          rx_pkt[o].delete();
          half[o]   <= 0;
          in_pkt[o] <= 1;
        end else if (cr_k[o] && cr_data[o][7:0] == K_EOF) begin
          automatic int l = cur[o];
          automatic hit_hdr_t h = hit_hdr_t'(rx_pkt[o][0]);
          automatic string key = $sformatf("%0d_%0d_%0h", l, h.channel, rx_pkt[o][1]);
          in_pkt[o] <= 0;
          n_received++;
          n_rx_link[l]++;
          if (!exp_pkt.exists(key)) check(0, $sformatf("unexpected packet %s", key));
          else begin
            check(exp_pkt[key].size() == rx_pkt[o].size(),
                  $sformatf("packet %s: %0d words, expected %0d", key, rx_pkt[o].size(), exp_pkt[key].size()));
            foreach (exp_pkt[key][i])
              if (i < rx_pkt[o].size())
                check(exp_pkt[key][i] == rx_pkt[o][i],
                      $sformatf("packet %s word %0d: %h expected %h", key, i, rx_pkt[o][i], exp_pkt[key][i]));
            exp_pkt.delete(key);
          end
        end else begin
          if (!half[o]) lo_word[o] <= cr_data[o];
          else rx_pkt[o].push_back({cr_data[o], lo_word[o]});
          half[o] <= !half[o];
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

  // host access to the bridge registers of the readout-card register map
  task automatic br_write(input br_reg_e sel, input logic [63:0] d);
    @(posedge clk);
    br_reg_write <= 1'b1; br_reg_sel <= 3'(sel); br_reg_wdata <= d;
    @(posedge clk);
    br_reg_write <= 1'b0;
  endtask

  task automatic br_read(input br_reg_e sel, output logic [63:0] d);
    @(posedge clk);
    br_reg_sel <= 3'(sel);
    repeat (2) @(posedge clk);
    d = br_reg_rdata;
  endtask

  // behavioural IPbus master: runs the request packet when started
  event master_go;
  int   n_bridge = 0;
  initial forever begin
    logic [63:0] w;
    logic [31:0] rd;
    int n;
    @(master_go);
    @(posedge clk); br_req_addr <= 9'd0;
    @(posedge clk); #1 n = int'(br_req_data[8:0]);
    for (int i = 1; i <= n; i++) begin
      @(posedge clk); br_req_addr <= 9'(i);
      @(posedge clk); #1 w = br_req_data;
      ipb(int'(w[63:56]), {16'h0, w[47:32]}, w[55], w[31:0], rd);
      @(posedge clk);
      br_rsp_we <= 1'b1; br_rsp_addr <= 9'(i - 1); br_rsp_data <= {1'b1, 31'h0, rd};
      @(posedge clk);
      br_rsp_we <= 1'b0;
      n_bridge++;
    end
    br_pkt_done <= 1'b1;
  end

  initial begin
    logic [31:0] rd;
    logic [63:0] d;
    ipb_in = '0;
    repeat (5) @(posedge clk);
    rst = 1'b0;
    repeat (2) @(posedge clk);
    // thresholds: write and read back every link through the bridge
    br_write(BR_WRITE_ADDRESS, 64'd0);
    br_write(BR_WRITE_DATA, 64'(2 * NL));
    for (int l = 0; l < NL; l++) begin
      br_write(BR_WRITE_ADDRESS, 64'(1 + 2 * l));
      br_write(BR_WRITE_DATA, {8'(l), 1'b1, 7'h0, 16'h0, 32'(THR)});
      br_write(BR_WRITE_ADDRESS, 64'(2 + 2 * l));
      br_write(BR_WRITE_DATA, {8'(l), 1'b0, 7'h0, 16'h0, 32'h0});
    end
    -> master_go;
    do br_read(BR_PKT_DONE, d); while (d[0] !== 1'b1);
    for (int i = 0; i < 2 * NL; i++) begin
      br_write(BR_READ_ADDRESS, 64'(i));
      br_read(BR_READ_DATA, d);
      check(d[63] == 1'b1, "bridge reply acknowledged");
      if (i % 2) check(d[15:0] == THR, "threshold read-back through the bridge");
    end
    br_pkt_done <= 1'b0;
    // mask channel 5 of link 0: TPG lane 1, group 1
    ipb(0, 32'h8 + 2 * (MASK_CH % 4), 1'b1, 32'(1) << (MASK_CH / 4), rd);
    cfg_done = 1'b1;
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
    $display("mechanisms: bridge_transactions=%0d", n_bridge);
    $display("mechanisms: output_switches=%0d backpressure=%0d router_hold=%0d hit_continue=%0d ped_words=%0d empty_dropped=%0d bad_frames=%0d ped_steps=%0d masked=%0d packets=%0d",
             n_switch, n_stall, n_hold, n_cont, n_ped, n_empty_exp[0], n_bad_seen, n_ped_steps, n_masked, n_received);
    check(n_stall > 0, "backpressure never happened");
    check(n_switch > 0, "an output never switched between links");
    check(n_bridge == 2 * NL, "bridge transactions");
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
