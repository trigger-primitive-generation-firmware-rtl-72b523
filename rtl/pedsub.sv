// pedsub: running pedestal subtraction with per-channel state save/restore.
//
// For every sample x of a packet, the output is x - pedestal (signed 16-bit)
// and the pedestal estimate is then nudged: an accumulator counts +1 when
// x > pedestal and -1 when x < pedestal; when it reaches +10 (-10) the
// pedestal goes up (down) by one and the accumulator returns to 0. Packets of
// the 64 channels a TPG block serves arrive round-robin, so at the end of each
// packet the pedestal and accumulator are saved in a small per-channel store
// (LUT RAM sized) and restored at the first sample of that channel's next
// packet. A channel seen for the first time starts with its first sample as
// the pedestal estimate and accumulator 0.
//
// ped_valid pulses with the first sample of every packet and shows the
// pedestal and accumulator the packet starts with (used by the header
// stripper/combiner for its validation word).
//
// Interface: 16-bit AXI4-Stream in and out, tdest = channel number (its
// upper bits index the state store), one register stage (latency 1 cycle,
// one sample per cycle). Follows the description: the algorithm, the limit
// of 10 and the save/restore. This design's own choice: the first estimate,
// the order "subtract, then update" and the strict comparisons.
module pedsub
  import tpg_pkg::*;
#(
  parameter int unsigned N_STATE = N_GROUPS   // channels served by one TPG block
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
  input  logic        m_tready,
  output logic        ped_valid,
  output logic [15:0] ped_value,
  output logic [15:0] ped_accum
);
  localparam int unsigned IW = $clog2(N_STATE);

  logic [15:0]        st_ped [N_STATE];
  logic signed [15:0] st_acc [N_STATE];
  logic [N_STATE-1:0] st_init;

  logic               first;      // next accepted sample starts a packet
  logic [15:0]        cur_ped;
  logic signed [15:0] cur_acc;

  logic [IW-1:0]      idx;
  logic               take;
  logic [15:0]        p;
  logic signed [15:0] a, a_upd;
  logic [15:0]        p_upd;
  logic signed [15:0] acc_next;

  assign idx      = s_tdest[$clog2(N_LANES) +: IW];
  assign s_tready = !m_tvalid || m_tready;
  assign take     = s_tvalid && s_tready;

  always_comb begin
    if (first) begin
      p = st_init[idx] ? st_ped[idx] : s_tdata;
      a = st_init[idx] ? st_acc[idx] : 16'sd0;
    end else begin
      p = cur_ped;
      a = cur_acc;
    end
    acc_next = a;
    if (s_tdata > p) acc_next = a + 16'sd1;
    if (s_tdata < p) acc_next = a - 16'sd1;
    p_upd = p;
    a_upd = acc_next;
    if (acc_next == 16'(PED_ACC_LIMIT)) begin
      p_upd = p + 16'd1;
      a_upd = '0;
    end else if (acc_next == -16'(PED_ACC_LIMIT)) begin
      p_upd = p - 16'd1;
      a_upd = '0;
    end
  end

  always_ff @(posedge clk) begin
    ped_valid <= 1'b0;
    if (rst) begin
      first    <= 1'b1;
      st_init  <= '0;
      m_tvalid <= 1'b0;
      m_tdata  <= '0;
      m_tdest  <= '0;
      m_tlast  <= 1'b0;
      cur_ped  <= '0;
      cur_acc  <= '0;
      ped_value <= '0;
      ped_accum <= '0;
    end else begin
      if (m_tvalid && m_tready) m_tvalid <= 1'b0;
      if (take) begin
        m_tvalid <= 1'b1;
        m_tdata  <= s_tdata - p;
        m_tdest  <= s_tdest;
        m_tlast  <= s_tlast;
        cur_ped  <= p_upd;
        cur_acc  <= a_upd;
        first    <= s_tlast;
        if (first) begin
          ped_valid <= 1'b1;
          ped_value <= p;
          ped_accum <= a;
        end
        if (s_tlast) st_init[idx] <= 1'b1;
      end
    end
  end

  always_ff @(posedge clk)
    if (!rst && take && s_tlast) begin
      st_ped[idx] <= p_upd;
      st_acc[idx] <= a_upd;
    end
endmodule
