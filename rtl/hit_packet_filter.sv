// hit_packet_filter: removes empty and corrupted hit packets (CR interface).
//
// Each incoming packet is first written into a hit frame memory of MAX_WORDS
// 64-bit words and checked as it arrives. It is forwarded only if
//   - beat 0 carries the header magic,
//   - tuser is set on beat 1 and on no other beat (one header frame),
//   - it has exactly 2 + n_words beats (n_words from the header), and
//   - it fits in the frame memory;
// an otherwise good packet with n_words = 0 (no hits) is dropped as empty.
// A good packet is then read out of the memory with tlast on its last word.
// Counters: packets in, dropped empty, dropped corrupt, forwarded.
//
// Interface: 64-bit AXI4-Stream in and out. Store-and-forward: a packet of
// n beats takes n cycles to collect and n cycles to send.
// Follows the description: filter out hit-empty packets, detect and remove
// corrupted ones; the hit frame memory and its manager appear in the block
// diagram. This design's own choice: the exact checks.
module hit_packet_filter
  import tpg_pkg::*;
#(
  parameter int unsigned MAX_WORDS = 64
) (
  input  logic        clk,
  input  logic        rst,
  input  logic [63:0] s_tdata,
  input  logic        s_tvalid,
  input  logic        s_tuser,
  input  logic        s_tlast,
  output logic        s_tready,
  output logic [63:0] m_tdata,
  output logic        m_tvalid,
  output logic        m_tuser,
  output logic        m_tlast,
  input  logic        m_tready,
  output logic [31:0] cnt_in,
  output logic [31:0] cnt_empty,
  output logic [31:0] cnt_corrupt,
  output logic [31:0] cnt_out
);
  localparam int unsigned AW = $clog2(MAX_WORDS);

  logic [63:0]  frame_mem [MAX_WORDS];
  logic         sending;
  logic [AW:0]  wcnt;      // beats collected
  logic [AW:0]  rcnt;      // beats sent
  logic [AW:0]  len;       // beats of the packet being sent
  logic         bad;
  logic [15:0]  n_words;
  hit_hdr_t     h;

  logic         take, bad_now, overflow;
  logic [16:0]  expect_beats;

  assign s_tready = !sending;
  assign take     = s_tvalid && s_tready;
  assign h        = hit_hdr_t'(s_tdata);
  assign overflow = wcnt == (AW+1)'(MAX_WORDS);
  assign expect_beats = 17'(n_words) + 17'd2;

  always_comb begin
    bad_now = overflow;
    if (wcnt == 0 && h.magic != HDR_MAGIC) bad_now = 1'b1;
    if ((wcnt == 1) != s_tuser)            bad_now = 1'b1;
    if (s_tlast && (wcnt == 0 || 17'(wcnt) + 17'd1 != expect_beats))
      bad_now = 1'b1;
  end

  assign m_tvalid = sending;
  assign m_tdata  = frame_mem[rcnt[AW-1:0]];
  assign m_tuser  = (rcnt == 1);
  assign m_tlast  = (rcnt + 1'b1 == len);

  always_ff @(posedge clk) begin
    if (rst) begin
      sending     <= 1'b0;
      wcnt        <= '0;
      rcnt        <= '0;
      len         <= '0;
      bad         <= 1'b0;
      n_words     <= '0;
      cnt_in      <= '0;
      cnt_empty   <= '0;
      cnt_corrupt <= '0;
      cnt_out     <= '0;
    end else if (sending) begin
      if (m_tready) begin
        rcnt <= rcnt + 1'b1;
        if (m_tlast) begin
          sending <= 1'b0;
          cnt_out <= cnt_out + 1'b1;
        end
      end
    end else if (take) begin
      if (wcnt == 0) n_words <= h.n_words;
      if (!overflow) wcnt <= wcnt + 1'b1;
      if (s_tlast) begin
        cnt_in <= cnt_in + 1'b1;
        wcnt   <= '0;
        bad    <= 1'b0;
        if (bad || bad_now)     cnt_corrupt <= cnt_corrupt + 1'b1;
        else if (n_words == 0)  cnt_empty   <= cnt_empty + 1'b1;
        else begin
          sending <= 1'b1;
          rcnt    <= '0;
          len     <= wcnt + 1'b1;
        end
      end else if (bad_now) begin
        bad <= 1'b1;
      end
    end
  end

  always_ff @(posedge clk)
    if (take && !overflow) frame_mem[wcnt[AW-1:0]] <= s_tdata;
endmodule
