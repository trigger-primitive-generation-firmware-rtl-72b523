// header_stripper_combiner: packet sequencing of one TPG block.
//
// Takes one packet at a time from the data router (16-bit AXI4-Stream: a
// 5-beat header frame, then 64 samples). It keeps the header (channel, flags,
// timestamp), passes the samples to the pedsub -> fir -> hit_finder chain
// with tdest = channel, and then holds tready low - the data router must
// wait - until the hit finder's trailer has arrived and the complete hit
// packet has left on the 64-bit output:
//   beat 0  hit_hdr_t (magic, flags, channel, n_words)
//   beat 1  timestamp, tuser set (end of the header frame)
//   [ped_word_t]  pedestal and accumulator at the start of the packet, only
//                 when SEND_PED is set and the packet holds at least one hit
//   hit_t words, tlast on the last beat of the packet.
// A packet without hits is sent as its two header beats (later removed by
// the CR interface). Hits are collected in a MAX_HITS-deep buffer first so
// that n_words is known before the header goes out; hits beyond that are
// dropped. Accepting the next packet again is the "send next packet" signal.
//
// Per-channel masking: a channel whose bit is set in chan_mask still runs
// through the chain (its filter and pedestal state stay current) but reports
// no hits.
//
// Follows the description: strip header, send the 64 samples to the chain,
// combine header and hits, hold and release the data router, the validation
// pedestal word. This design's own choice: the word layouts, the buffer
// depth and where masking is applied.
module header_stripper_combiner
  import tpg_pkg::*;
#(
  parameter bit          SEND_PED = 1'b1,
  parameter int unsigned MAX_HITS = 32
) (
  input  logic        clk,
  input  logic        rst,
  input  logic [N_GROUPS-1:0] chan_mask,
  // packets from the data router
  input  logic [15:0] s_tdata,
  input  logic        s_tvalid,
  input  logic        s_tuser,
  input  logic        s_tlast,
  output logic        s_tready,
  // samples to the processing chain
  output logic [15:0] c_tdata,
  output logic [7:0]  c_tdest,
  output logic        c_tvalid,
  output logic        c_tlast,
  input  logic        c_tready,
  // pedestal at the start of the packet, from pedsub
  input  logic        ped_valid,
  input  logic [15:0] ped_value,
  input  logic [15:0] ped_accum,
  // hits from the hit finder
  input  logic [63:0] h_tdata,
  input  logic        h_tvalid,
  input  logic        h_tlast,
  output logic        h_tready,
  // hit packets out
  output logic [63:0] m_tdata,
  output logic        m_tvalid,
  output logic        m_tuser,
  output logic        m_tlast,
  input  logic        m_tready
);
  typedef enum logic [2:0] {S_HDR, S_DATA, S_WAIT, S_OHDR, S_OTS, S_OPED, S_OHITS} state_e;
  state_e state;

  logic [2:0]  hbeat;
  logic [7:0]  channel, flags_in;
  logic [63:0] ts;
  logic [15:0] ped_v, ped_a;
  logic        hits_done;
  logic        masked;
  logic [$clog2(MAX_HITS+1)-1:0] n_hits, n_sent;
  logic [63:0] hitbuf [MAX_HITS];
  logic        with_ped;
  logic [15:0] n_words;
  hit_hdr_t    hdr;
  ped_word_t   pw;

  assign with_ped = SEND_PED && (n_hits != 0);
  assign n_words  = 16'(n_hits) + 16'(with_ped);
  assign masked   = chan_mask[channel[$clog2(N_LANES) +: $clog2(N_GROUPS)]];

  always_comb begin
    hdr.magic   = HDR_MAGIC;
    hdr.flags   = '0;
    hdr.flags[FLAG_PED]   = with_ped;
    hdr.flags[FLAG_INERR] = flags_in[0];
    hdr.rsvd0   = '0;
    hdr.channel = channel;
    hdr.rsvd1   = '0;
    hdr.n_words = n_words;
    pw.tag      = PED_TAG;
    pw.pedestal = ped_v;
    pw.accum    = ped_a;
    pw.rsvd     = '0;
  end

  // input side
  assign s_tready = (state == S_HDR) || (state == S_DATA && c_tready);
  assign c_tvalid = (state == S_DATA) && s_tvalid;
  assign c_tdata  = s_tdata;
  assign c_tdest  = channel;
  assign c_tlast  = s_tlast;
  assign h_tready = (state == S_DATA || state == S_WAIT) && !hits_done;

  // output side
  always_comb begin
    m_tvalid = 1'b0;
    m_tuser  = 1'b0;
    m_tlast  = 1'b0;
    m_tdata  = '0;
    unique case (state)
      S_OHDR:  begin m_tvalid = 1'b1; m_tdata = hdr; end
      S_OTS:   begin m_tvalid = 1'b1; m_tdata = ts; m_tuser = 1'b1; m_tlast = (n_words == 0); end
      S_OPED:  begin m_tvalid = 1'b1; m_tdata = pw; m_tlast = (n_hits == 0); end
      S_OHITS: begin
        m_tvalid = 1'b1;
        m_tdata  = hitbuf[n_sent[$clog2(MAX_HITS)-1:0]];
        m_tlast  = (n_sent + 1'b1 == n_hits);
      end
      default: ;
    endcase
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      state     <= S_HDR;
      hbeat     <= '0;
      channel   <= '0;
      flags_in  <= '0;
      ts        <= '0;
      ped_v     <= '0;
      ped_a     <= '0;
      hits_done <= 1'b0;
      n_hits    <= '0;
      n_sent    <= '0;
    end else begin
      if (ped_valid) begin
        ped_v <= ped_value;
        ped_a <= ped_accum;
      end
      if (h_tvalid && h_tready) begin
        if (h_tlast) hits_done <= 1'b1;
        else if (!masked && n_hits != ($clog2(MAX_HITS+1))'(MAX_HITS)) begin
          hitbuf[n_hits[$clog2(MAX_HITS)-1:0]] <= h_tdata;
          n_hits <= n_hits + 1'b1;
        end
      end
      unique case (state)
        S_HDR: if (s_tvalid) begin
          if (hbeat == 3'd0) begin
            channel  <= s_tdata[7:0];
            flags_in <= s_tdata[15:8];
          end else begin
            ts[16*(32'(hbeat)-1) +: 16] <= s_tdata;
          end
          hbeat <= hbeat + 1'b1;
          if (s_tuser || s_tlast) begin
            hbeat <= '0;
            // a header frame ending in tlast carries no samples
            if (!s_tlast) state <= S_DATA;
          end
        end
        S_DATA: if (s_tvalid && c_tready && s_tlast) state <= S_WAIT;
        S_WAIT: if (hits_done || (h_tvalid && h_tready && h_tlast)) state <= S_OHDR;
        S_OHDR: if (m_tready) state <= S_OTS;
        S_OTS:  if (m_tready) begin
          if (n_words == 0)  state <= S_HDR;
          else if (with_ped) state <= S_OPED;
          else               state <= S_OHITS;
        end
        S_OPED: if (m_tready) state <= (n_hits == 0) ? S_HDR : S_OHITS;
        S_OHITS: if (m_tready) begin
          n_sent <= n_sent + 1'b1;
          if (n_sent + 1'b1 == n_hits) state <= S_HDR;
        end
        default: state <= S_HDR;
      endcase
      // packet finished: clear the per-packet state
      if (m_tvalid && m_tready && m_tlast) begin
        n_hits    <= '0;
        n_sent    <= '0;
        hits_done <= 1'b0;
      end
    end
  end
endmodule
