// data_reception_tb: WIB frame decoding, RAM writing and frame dropping.
//
// Sends 140 good WIB frames of random 12-bit samples, plus a truncated
// frame, a frame with one extra word and a stray unknown k-character. The
// read pointer is held at 0 until frame 135, so the two-block buffer fills
// after 128 ticks and the following frames must be dropped. Checks every RAM
// write (address {tick mod 128, group}, 4 x 16-bit samples of channels
// 4g..4g+3), the write pointer, the block timestamps, the damaged and
// dropped frame counters and the gap flag of the block written after drops.
module data_reception_tb;
  import tpg_pkg::*;
  import tpg_model_pkg::*;

  logic clk = 0, rst = 1;
  always #5 clk = ~clk;

  logic [31:0] rx_data;
  logic        rx_k, rx_valid, we;
  logic [12:0] wr_addr;
  logic [63:0] wr_data;
  logic [15:0] wr_tick, rd_block, drop_count, err_count;
  logic [1:0][63:0] blk_ts;
  logic [1:0]  blk_gap;

  data_reception dut (.*);

  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; if (failures < 20) $display("FAIL: %s", what); end
  endtask

  localparam int NF = 140;
  logic [11:0] smp [NF][256];
  link_word_t  words [$];
  int frame_of_word [$];

  initial begin
    for (int f = 0; f < NF; f++) begin
      automatic logic [11:0] s [256];
      automatic link_word_t q[$];
      for (int c = 0; c < 256; c++) begin s[c] = 12'($urandom); smp[f][c] = s[c]; end
      build_frame(64'(f) * 25 + 64'h500, s, q);
      if (f == 10) begin   // truncated copy first
        for (int i = 0; i < 60; i++) begin words.push_back(q[i]); frame_of_word.push_back(f); end
        words.push_back({1'b1, 24'h0, K_EOF}); frame_of_word.push_back(f);
      end
      if (f == 20) begin   // copy with one extra data word before EOF
        for (int i = 0; i < q.size() - 1; i++) begin words.push_back(q[i]); frame_of_word.push_back(f); end
        words.push_back({1'b0, 32'h12345678}); frame_of_word.push_back(f);
        words.push_back({1'b1, 24'h0, K_EOF}); frame_of_word.push_back(f);
      end
      if (f == 30) begin   // copy broken by an unknown k-character
        for (int i = 0; i < 50; i++) begin words.push_back(q[i]); frame_of_word.push_back(f); end
        words.push_back({1'b1, 24'h0, 8'hF7}); frame_of_word.push_back(f);
      end
      foreach (q[i]) begin words.push_back(q[i]); frame_of_word.push_back(f); end
      for (int i = 0; i < 4; i++) begin words.push_back({1'b1, 24'h0, K_IDLE}); frame_of_word.push_back(f); end
    end
  end

  int wp = 0, cur_frame = 0, writes = 0, writes_full = 0;
  always_ff @(posedge clk) begin
    if (rst) begin
      rx_valid <= 0;
    end else begin
      rx_valid <= wp < words.size();
      if (wp < words.size()) begin
        {rx_k, rx_data} <= words[wp];
        cur_frame <= frame_of_word[wp];
        wp <= wp + 1;
      end
      if (we) begin
        automatic int g = wr_addr[5:0];
        automatic logic [63:0] e;
        for (int k = 0; k < 4; k++) e[16*k +: 16] = {4'h0, smp[cur_frame][4*g + k]};
        check(wr_data == e, $sformatf("frame %0d group %0d: %h exp %h", cur_frame, g, wr_data, e));
        check(wr_addr[12:6] == wr_tick[6:0], "write address tick");
        writes++;
      end
    end
  end

  initial begin
    rd_block = 0;
    repeat (3) @(posedge clk);
    rst = 0;
    wait (wr_tick == 64);
    check(blk_ts[0] == 64'h500, "timestamp of block 0");
    wait (cur_frame == 135);
    check(wr_tick == 128, $sformatf("buffer should be full at 128 ticks, %0d", wr_tick));
    check(drop_count == 135 - 128, $sformatf("dropped %0d", drop_count));
    rd_block = 1;
    wait (wp == words.size());
    repeat (20) @(posedge clk);
    check(err_count == 3, $sformatf("damaged frames %0d, expected 3", err_count));
    check(wr_tick == 128 + (NF - 135), $sformatf("final write pointer %0d", wr_tick));
    check(blk_gap == 2'b01, $sformatf("gap flags %b", blk_gap));
    check(blk_ts[0] == 64'(135) * 25 + 64'h500, "timestamp of block 2");
    check(blk_ts[1] == 64'(64) * 25 + 64'h500, "timestamp of block 1");
    $display("writes %0d, dropped %0d, damaged %0d", writes, drop_count, err_count);
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
