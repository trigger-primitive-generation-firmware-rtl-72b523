// fir_filter: 32-tap low-pass FIR with per-channel state save/restore.
//
// y(n) = (sum_{k=0..31} c[k] * x(n-k)) >>> FIR_SHIFT, saturated to 16 bits,
// with the hard-wired coefficient set of tpg_pkg::fir_coef. Because the
// packets of the 64 channels of a TPG block arrive interleaved, the delay
// line x(n-1)..x(n-31) is written to a per-channel store at the end of every
// packet and loaded back, in the same cycle as the first sample, when that
// channel's next packet starts. A channel seen for the first time starts
// from an all-zero history. The store is a 64 x 496-bit array read
// combinationally (LUT RAM).
//
// Interface: 16-bit signed AXI4-Stream in and out, tdest = channel, one
// register stage (latency 1 cycle, one sample per cycle; the multiply-add
// tree is not pipelined here). Follows the description: 32 taps, direct
// form, hard-wired coefficients, save/restore of the last input values. This
// design's own choice: the coefficient values and scaling (not given), and
// storing the 31 values the next packet needs rather than 32.
module fir_filter
  import tpg_pkg::*;
#(
  parameter int unsigned N_STATE = N_GROUPS,
  parameter int unsigned TAPS    = FIR_TAPS
) (
  input  logic        clk,
  input  logic        rst,
  input  logic [15:0] s_tdata,
  input  logic [7:0]  s_tdest,
  input  logic        s_tvalid,
  input  logic        s_tlast,
  output logic        s_tready,
  output logic [15:0] m_tdata,
  output logic [7:0]  m_tdest,
  output logic        m_tvalid,
  output logic        m_tlast,
  input  logic        m_tready
);
  localparam int unsigned IW = $clog2(N_STATE);
  localparam int unsigned HW = (TAPS - 1) * 16;

  logic [HW-1:0]      st_hist [N_STATE];
  logic [N_STATE-1:0] st_init;
  logic [HW-1:0]      hist;           // x(n-1) in bits 15:0 ... x(n-31) at the top
  logic               first;

  logic [IW-1:0]      idx;
  logic               take;
  logic [HW-1:0]      h, h_next;
  logic signed [39:0] acc;
  logic signed [39:0] y;
  logic [15:0]        y_sat;

  assign idx      = s_tdest[$clog2(N_LANES) +: IW];
  assign s_tready = !m_tvalid || m_tready;
  assign take     = s_tvalid && s_tready;

  always_comb begin
    if (first) h = st_init[idx] ? st_hist[idx] : '0;
    else       h = hist;
    acc = 40'(signed'(s_tdata)) * 40'(fir_coef(0));
    for (int k = 1; k < TAPS; k++)
      acc += 40'(signed'(h[16*(k-1) +: 16])) * 40'(fir_coef(k));
    y = acc >>> FIR_SHIFT;
    if (y > 40'sd32767)       y_sat = 16'h7FFF;
    else if (y < -40'sd32768) y_sat = 16'h8000;
    else                      y_sat = y[15:0];
    h_next = {h[HW-17:0], s_tdata};
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      first    <= 1'b1;
      st_init  <= '0;
      hist     <= '0;
      m_tvalid <= 1'b0;
      m_tdata  <= '0;
      m_tdest  <= '0;
      m_tlast  <= 1'b0;
    end else begin
      if (m_tvalid && m_tready) m_tvalid <= 1'b0;
      if (take) begin
        m_tvalid <= 1'b1;
        m_tdata  <= y_sat;
        m_tdest  <= s_tdest;
        m_tlast  <= s_tlast;
        hist     <= h_next;
        first    <= s_tlast;
        if (s_tlast) st_init[idx] <= 1'b1;
      end
    end
  end

  always_ff @(posedge clk)
    if (!rst && take && s_tlast) st_hist[idx] <= h_next;
endmodule
