// unpacker: reads the data storage RAM and sends per-channel packets to the
// four TPG blocks.
//
// Once the write pointer shows a complete block of PKT_TICKS ticks, the
// unpacker walks the block group by group (group g = channels 4g..4g+3). For
// each group it sends, in parallel on the four 16-bit AXI4-Stream lanes, one
// packet per channel: a header frame of HDR_BEATS beats
//   beat 0 {flags[7:0], channel[7:0]}, beats 1..4 timestamp bits 15:0 .. 63:48
// with tuser on the last header beat, then the 64 samples of that channel
// (tick 0 first) with tuser and tlast on the last one. Lane k carries
// channel 4g+k, i.e. bits 16k+15:16k of the stored words. Flag bit 0 marks a
// block that follows dropped frames.
//
// The four lanes advance together, beat by beat; a lane that has already
// taken the current beat drops tvalid until the others have too, so no
// AXI4-Stream rule is broken. RAM reads are issued with the address of the
// beat that will be current on the next clock, so the synchronous RAM output
// always holds the current beat's word and a beat can complete every cycle:
// 69 cycles per group, 4416 per block, against the 8000 cycles that 64 ticks
// last at 2 MHz with a 250 MHz clock. rd_block counts finished blocks and is
// returned to the writer.
//
// Follows the description: N = 4 channels at a time, 64-sample packets with a
// header (timestamp, channel, flags), AXI4-Stream with tuser per frame and
// tlast per packet. This design's own choice: the header beat layout and the
// lock-step lane scheduling.
module unpacker
  import tpg_pkg::*;
#(
  parameter int unsigned BUF_BLOCKS = 2,
  parameter int unsigned AW = $clog2(BUF_BLOCKS * PKT_TICKS * N_GROUPS)
) (
  input  logic          clk,
  input  logic          rst,
  input  logic [15:0]   wr_tick,
  output logic [15:0]   rd_block,
  input  logic [BUF_BLOCKS-1:0][63:0] blk_ts,
  input  logic [BUF_BLOCKS-1:0]       blk_gap,
  output logic [AW-1:0] rd_addr,
  input  logic [63:0]   rd_data,
  output logic [N_LANES-1:0][15:0] m_tdata,
  output logic [N_LANES-1:0]       m_tvalid,
  output logic [N_LANES-1:0]       m_tuser,
  output logic [N_LANES-1:0]       m_tlast,
  input  logic [N_LANES-1:0]       m_tready
);
  localparam int unsigned BEATS  = HDR_BEATS + PKT_TICKS;   // 69
  localparam int unsigned SLOT_W = $clog2(BUF_BLOCKS * PKT_TICKS);
  localparam int unsigned BSEL_W = (BUF_BLOCKS > 1) ? $clog2(BUF_BLOCKS) : 1;

  logic [6:0]         beat, beat_n;
  logic [5:0]         grp, grp_n;
  logic [15:0]        blk_n;
  logic [N_LANES-1:0] done;
  logic               avail, active, complete;
  logic [BSEL_W-1:0]  bsel;
  logic [63:0]        ts;
  logic [5:0]         tick_n;

  assign avail    = (wr_tick >> $clog2(PKT_TICKS)) != rd_block;
  assign active   = avail;
  assign complete = active && &(done | (m_tvalid & m_tready));
  assign bsel     = BSEL_W'(rd_block % BUF_BLOCKS);
  assign ts       = blk_ts[bsel];

  // next beat position
  always_comb begin
    beat_n = beat;
    grp_n  = grp;
    blk_n  = rd_block;
    if (complete) begin
      if (beat == 7'(BEATS - 1)) begin
        beat_n = '0;
        grp_n  = grp + 1'b1;
        if (grp == 6'(N_GROUPS - 1)) blk_n = rd_block + 1'b1;
      end else begin
        beat_n = beat + 1'b1;
      end
    end
  end

  assign tick_n  = 6'(beat_n - 7'(HDR_BEATS));
  assign rd_addr = {blk_n[SLOT_W-$clog2(PKT_TICKS)-1:0], tick_n, grp_n};

  always_ff @(posedge clk) begin
    if (rst) begin
      beat     <= '0;
      grp      <= '0;
      rd_block <= '0;
      done     <= '0;
    end else begin
      beat     <= beat_n;
      grp      <= grp_n;
      rd_block <= blk_n;
      if (complete) done <= '0;
      else          done <= done | (m_tvalid & m_tready);
    end
  end

  always_comb begin
    for (int k = 0; k < N_LANES; k++) begin
      m_tvalid[k] = active && !done[k];
      m_tuser[k]  = (beat == 7'(HDR_BEATS - 1)) || (beat == 7'(BEATS - 1));
      m_tlast[k]  = (beat == 7'(BEATS - 1));
      if (beat == 7'd0)
        m_tdata[k] = {7'h0, blk_gap[bsel], 8'(grp * N_LANES + k)};
      else if (beat < 7'(HDR_BEATS))
        m_tdata[k] = ts[16*(beat-1) +: 16];
      else
        m_tdata[k] = rd_data[16*k +: 16];
    end
  end

  initial assert (BUF_BLOCKS == (1 << BSEL_W)) else $fatal(1, "unpacker: BUF_BLOCKS must be a power of two");
endmodule
