// unpacker_tb: block read-out into per-channel packets on four lanes.
//
// A model RAM (one-cycle read latency) holds three blocks of 64 ticks of
// made-up samples (value = function of tick and channel); the write pointer
// advances block by block. Block 0 is read with every lane always ready and
// must take exactly 64 x 69 cycles (one beat per cycle); blocks 1 and 2 are
// read with random per-lane readiness. Every beat of every lane is checked:
// header {flags, channel}, timestamp beats, tuser/tlast, samples, plus the
// read pointer and the gap flag in the header.
module unpacker_tb;
  import tpg_pkg::*;

  logic clk = 0, rst = 1;
  always #5 clk = ~clk;

  logic [15:0] wr_tick, rd_block;
  logic [1:0][63:0] blk_ts;
  logic [1:0]  blk_gap;
  logic [12:0] rd_addr;
  logic [63:0] rd_data;
  logic [3:0][15:0] m_tdata;
  logic [3:0]  m_tvalid, m_tuser, m_tlast, m_tready;

  unpacker dut (.*);

  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; if (failures < 20) $display("FAIL: %s", what); end
  endtask

  function automatic logic [15:0] val(int blk, int tick, int ch);
    return 16'((blk * 64 + tick) * 7 + ch * 13);
  endfunction

  logic [63:0] mem [8192];
  always_ff @(posedge clk) rd_data <= mem[rd_addr];

  task automatic fill(int blk);
    for (int t = 0; t < 64; t++)
      for (int g = 0; g < 64; g++)
        for (int k = 0; k < 4; k++)
          mem[{1'(blk), 6'(t), 6'(g)}][16*k +: 16] = val(blk, t, 4 * g + k);
    blk_ts[blk % 2]  = 64'h7700 + 64'(blk * 1600);
    blk_gap[blk % 2] = (blk == 2);
  endtask

  // expected beat stream per lane
  logic [17:0] exp_q [4][$];
  task automatic expect_block(int blk);
    for (int g = 0; g < 64; g++)
      for (int k = 0; k < 4; k++) begin
        automatic logic [63:0] ts = 64'h7700 + 64'(blk * 1600);
        exp_q[k].push_back({2'b00, 7'h0, blk == 2, 8'(4 * g + k)});
        for (int b = 0; b < 4; b++) exp_q[k].push_back({b == 3, 1'b0, ts[16*b +: 16]});
        for (int t = 0; t < 64; t++) exp_q[k].push_back({t == 63, t == 63, val(blk, t, 4 * g + k)});
      end
  endtask

  bit rand_ready = 0;
  int beats = 0;
  always_ff @(posedge clk) begin
    for (int k = 0; k < 4; k++) begin
      m_tready[k] <= rand_ready ? ($urandom_range(0, 2) != 0) : 1'b1;
      if (!rst && m_tvalid[k] && m_tready[k]) begin
        check(exp_q[k].size() > 0 && {m_tuser[k], m_tlast[k], m_tdata[k]} == exp_q[k][0],
              $sformatf("lane %0d: %h exp %h", k, {m_tuser[k], m_tlast[k], m_tdata[k]}, exp_q[k][0]));
        void'(exp_q[k].pop_front());
        if (k == 0) beats++;
      end
    end
  end

  initial begin
    int t0;
    wr_tick = 0;
    blk_ts = '0; blk_gap = '0;
    fill(0); fill(1);
    expect_block(0);
    repeat (3) @(posedge clk);
    rst = 0;
    @(posedge clk);
    t0 = $time;
    wr_tick = 64;
    wait (rd_block == 1);
    check(($time - t0) / 10 >= 64 * 69 - 1 && ($time - t0) / 10 <= 64 * 69 + 1,
          $sformatf("block took %0d cycles, expected %0d", ($time - t0) / 10, 64 * 69));
    $display("block 0: %0d cycles", ($time - t0) / 10);
    check(exp_q[0].size() == 0 && exp_q[3].size() == 0, "block 0 incomplete");
    repeat (10) @(posedge clk);
    check(rd_block == 1, "unpacker ran ahead of the write pointer");
    rand_ready = 1;
    expect_block(1);
    wr_tick = 128;
    wait (rd_block == 2);
    fill(2);
    expect_block(2);
    wr_tick = 192;
    wait (rd_block == 3);
    repeat (5) @(posedge clk);
    for (int k = 0; k < 4; k++) check(exp_q[k].size() == 0, "beats missing");
    check(beats == 3 * 64 * 69, $sformatf("lane 0 beats %0d", beats));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
