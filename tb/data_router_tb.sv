// data_router_tb: WIB frames in, per-channel packets out, with overflow.
//
// 400 frames of random samples arrive at the 2 MHz tick rate (one frame per
// 125 cycles). For a while the TPG side stops taking data, so the buffer
// fills and frames are dropped. Every packet that comes out is checked
// against the frames it was built from: the timestamp in its header gives
// the first tick, the 64 samples must be that channel's values for 64
// consecutive ticks, and the gap flag must be set exactly on the first block
// after dropped frames. Also checks that with the TPG side always ready no
// frame is lost (the router keeps up with the link rate).
module data_router_tb;
  import tpg_pkg::*;
  import tpg_model_pkg::*;

  logic clk = 0, rst = 1;
  always #5 clk = ~clk;

  logic [31:0] rx_data;
  logic        rx_k, rx_valid;
  logic [3:0][15:0] m_tdata;
  logic [3:0]  m_tvalid, m_tuser, m_tlast, m_tready;
  logic [15:0] drop_count, err_count, wr_tick;

  data_router dut (.*);

  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; if (failures < 20) $display("FAIL: %s", what); end
  endtask

  localparam int NF = 420;
  logic [11:0] smp [NF][256];
  link_word_t  words [$];

  initial begin
    for (int f = 0; f < NF; f++) begin
      automatic logic [11:0] s [256];
      for (int c = 0; c < 256; c++) begin s[c] = 12'($urandom); smp[f][c] = s[c]; end
      build_frame(64'(f) * 25 + 64'h900, s, words);
      for (int i = 0; i < 125 - FRAME_WORDS; i++) words.push_back({1'b1, 24'h0, K_IDLE});
    end
  end

  int wp = 0, cyc = 0;
  bit hold = 0;
  always_ff @(posedge clk) begin
    cyc <= cyc + 1;
    if (rst) rx_valid <= 0;
    else begin
      rx_valid <= wp < words.size();
      if (wp < words.size()) begin {rx_k, rx_data} <= words[wp]; wp <= wp + 1; end
    end
  end

  // per-lane receivers
  int beat [4], t0 [4], ch [4], n_pkts = 0, n_gap = 0;
  logic [63:0] ts [4];
  bit gap [4];
  int last_t0 = -64;       // first tick of the previous block (lane 0, channel 0)
  always_ff @(posedge clk) begin
    for (int k = 0; k < 4; k++) begin
      m_tready[k] <= !hold && ($urandom_range(0, 9) != 0);
      if (!rst && m_tvalid[k] && m_tready[k]) begin
        if (beat[k] == 0) begin
          ch[k]  = m_tdata[k][7:0];
          gap[k] = m_tdata[k][8];
          check(ch[k] % 4 == k, "lane carries the wrong channel");
        end else if (beat[k] < 5) begin
          ts[k][16*(beat[k]-1) +: 16] = m_tdata[k];
          if (beat[k] == 4) begin
            t0[k] = int'((ts[k] - 64'h900) / 25);
            check(m_tuser[k], "tuser missing at end of header frame");
            if (k == 0 && ch[k] == 0) begin
              check(gap[k] == (t0[k] != last_t0 + 64),
                    $sformatf("gap flag %0d at tick %0d (previous block %0d)", gap[k], t0[k], last_t0));
              if (gap[k]) n_gap++;
              last_t0 = t0[k];
            end
          end
        end else begin
          automatic int i = beat[k] - 5;
          check(t0[k] + i < NF && m_tdata[k] == 16'(smp[t0[k] + i][ch[k]]),
                $sformatf("ch %0d tick %0d: %h", ch[k], t0[k] + i, m_tdata[k]));
          check(m_tlast[k] == (i == 63), "tlast position");
        end
        if (m_tlast[k]) begin beat[k] = 0; if (k == 0) n_pkts++; end
        else beat[k]++;
      end
    end
  end

  initial begin
    foreach (beat[k]) beat[k] = 0;
    repeat (3) @(posedge clk);
    rst = 0;
    wait (wr_tick == 192);
    check(drop_count == 0, "frames dropped while the TPG side was ready");
    hold = 1;
    repeat (10000) @(posedge clk);
    hold = 0;
    wait (wp == words.size());
    repeat (20000) @(posedge clk);
    $display("packets on lane 0: %0d, dropped frames %0d, blocks flagged %0d, ticks written %0d",
             n_pkts, drop_count, n_gap, wr_tick);
    check(drop_count > 0 && n_gap > 0, "overflow was not exercised");
    check(int'(wr_tick) + int'(drop_count) == NF, "every frame must be either written or dropped");
    check(n_pkts == 64 * (wr_tick / 64), "every complete block must be sent");
    check(err_count == 0, "no damaged frames were sent");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (120000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
