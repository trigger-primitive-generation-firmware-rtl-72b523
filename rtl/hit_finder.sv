// hit_finder: threshold hit finding on the pedestal-subtracted, filtered
// samples of one 64-sample packet.
//
// A hit opens when two consecutive samples are above the threshold (strictly
// greater, signed compare); it starts at the first of the two and lasts until
// a sample is not above the threshold. For each hit the block reports the
// start tick, the last tick above threshold (stop), the tick and value of
// the peak (first maximum), and the sum of all samples above threshold. A
// hit still open at the last sample of the packet is closed there and gets
// the continue flag. The hit finder keeps no state from one packet to the
// next.
//
// Output: a 64-bit AXI4-Stream of hit_t words, followed by one trailer beat
// with tlast set whose low byte is the number of hits in the packet (a
// packet without hits gives just the trailer). Input ready drops only while
// the output register is full, or for one cycle when a hit and the trailer
// fall on the same input beat. threshold is a live configuration input
// (written over the register bus).
//
// Follows the description: the start rule, the reported quantities, the
// continue flag, no state save/restore, configurable threshold. This design's
// own choice: the word layout, peak tie rule and the trailer.
module hit_finder
  import tpg_pkg::*;
(
  input  logic        clk,
  input  logic        rst,
  input  logic [15:0] threshold,
  input  logic [15:0] s_tdata,
  input  logic        s_tvalid,
  input  logic        s_tlast,
  output logic        s_tready,
  output logic [63:0] m_tdata,
  output logic        m_tvalid,
  output logic        m_tlast,
  input  logic        m_tready
);
  logic [5:0]         tick;
  logic signed [15:0] prev;
  logic               prev_above;
  logic               in_hit;
  logic [5:0]         h_start, h_peak_t;
  logic signed [15:0] h_peak;
  logic [23:0]        h_sum;
  logic [7:0]         n_hits;
  logic               pend_trailer;

  logic signed [15:0] x;
  logic               above, take, out_free;

  assign x        = signed'(s_tdata);
  assign above    = x > signed'(threshold);
  assign out_free = !m_tvalid || m_tready;
  assign s_tready = out_free && !pend_trailer;
  assign take     = s_tvalid && s_tready;

  function automatic logic [63:0] hit_word(input logic [5:0] st, input logic [5:0] sp,
                                           input logic [5:0] pt, input logic c,
                                           input logic [15:0] pk, input logic [23:0] sm);
    hit_t w;
    w.start = st; w.stop = sp; w.peak_time = pt; w.cont = c; w.rsvd = '0;
    w.peak_adc = pk; w.sum_adc = sm;
    return w;
  endfunction

  always_ff @(posedge clk) begin
    if (rst) begin
      tick         <= '0;
      prev         <= '0;
      prev_above   <= 1'b0;
      in_hit       <= 1'b0;
      h_start      <= '0;
      h_peak_t     <= '0;
      h_peak       <= '0;
      h_sum        <= '0;
      n_hits       <= '0;
      pend_trailer <= 1'b0;
      m_tvalid     <= 1'b0;
      m_tdata      <= '0;
      m_tlast      <= 1'b0;
    end else begin
      if (m_tvalid && m_tready) m_tvalid <= 1'b0;
      if (pend_trailer && out_free) begin
        m_tvalid     <= 1'b1;
        m_tdata      <= {56'h0, n_hits};
        m_tlast      <= 1'b1;
        pend_trailer <= 1'b0;
        n_hits       <= '0;
      end else if (take) begin
        // defaults for this beat
        logic               emit, open_now, cont;
        logic [5:0]         st, pt;
        logic signed [15:0] pk;
        logic [23:0]        sm;
        logic [5:0]         sp;
        emit = 1'b0; cont = 1'b0;
        open_now = in_hit;
        st = h_start; pt = h_peak_t; pk = h_peak; sm = h_sum; sp = tick;
        if (!in_hit) begin
          if (above && prev_above) begin
            open_now = 1'b1;
            st = tick - 1'b1;
            sm = 24'(prev) + 24'(x);
            if (x > prev) begin pk = x;    pt = tick;        end
            else          begin pk = prev; pt = tick - 1'b1; end
          end
        end else if (above) begin
          sm = h_sum + 24'(x);
          if (x > h_peak) begin pk = x; pt = tick; end
        end else begin
          emit = 1'b1;
          open_now = 1'b0;
          sp = tick - 1'b1;
        end
        if (s_tlast && open_now) begin
          emit = 1'b1;
          cont = 1'b1;
          sp   = tick;
          open_now = 1'b0;
        end
        in_hit   <= open_now;
        h_start  <= st;
        h_peak_t <= pt;
        h_peak   <= pk;
        h_sum    <= sm;
        prev     <= x;
        prev_above <= s_tlast ? 1'b0 : above;
        tick     <= s_tlast ? '0 : tick + 1'b1;
        if (emit) begin
          m_tvalid <= 1'b1;
          m_tdata  <= hit_word(st, sp, pt, cont, pk, sm);
          m_tlast  <= 1'b0;
          n_hits   <= n_hits + 1'b1;
          if (s_tlast) pend_trailer <= 1'b1;
        end else if (s_tlast) begin
          m_tvalid <= 1'b1;
          m_tdata  <= {56'h0, n_hits};
          m_tlast  <= 1'b1;
          n_hits   <= '0;
        end
      end
    end
  end
endmodule
