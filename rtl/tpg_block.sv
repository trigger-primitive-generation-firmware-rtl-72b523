// tpg_block: one trigger-primitive-generation lane.
//
// Header stripper/combiner around a single processing chain
// pedsub -> fir_filter -> hit_finder, all on AXI4-Stream with backpressure.
// Input: per-channel packets from the data router (16-bit stream, header
// frame + 64 samples). Output: hit packets (64-bit stream, see
// header_stripper_combiner). One packet is in the chain at a time; a packet
// takes about 69 input beats, a few cycles of chain latency and 2 + hits
// output beats, i.e. well under the 125 cycles that one channel's share of a
// 64-tick block allows (4 lanes, 64 channels each, 8000 cycles per block).
//
// Six AXI probes watch the block's buses, in the order of a probe read-out:
//   0 router -> combiner (16 bit)    1 combiner -> pedsub    2 pedsub -> fir
//   3 fir -> hit finder              4 hit finder -> combiner (64 bit)
//   5 combiner -> CR interface (64 bit)
// Each gives a packet count, a protocol-error count and the live
// {tready, tvalid, tuser, tlast} bits. The sample buses inside the chain have
// no tuser of their own; their data frame ends with the packet, so the
// probes there see tlast as tuser. The hit finder's output has no frames and
// its probe sees tuser low. Probe placement follows the block diagram of the
// TPG block; the tuser mapping is this design's own choice.
module tpg_block
  import tpg_pkg::*;
#(
  parameter bit SEND_PED = 1'b1
) (
  input  logic        clk,
  input  logic        rst,
  input  logic [15:0] threshold,
  input  logic [N_GROUPS-1:0] chan_mask,
  input  logic [15:0] s_tdata,
  input  logic        s_tvalid,
  input  logic        s_tuser,
  input  logic        s_tlast,
  output logic        s_tready,
  output logic [63:0] m_tdata,
  output logic        m_tvalid,
  output logic        m_tuser,
  output logic        m_tlast,
  input  logic        m_tready,
  output logic [5:0][31:0] probe_pkts,
  output logic [5:0][15:0] probe_errs,
  output logic [5:0][3:0]  probe_status
);
  logic [15:0] c_tdata, p_tdata, f_tdata;
  logic [7:0]  c_tdest, p_tdest, f_tdest;
  logic        c_tvalid, c_tlast, c_tready;
  logic        p_tvalid, p_tlast, p_tready;
  logic        f_tvalid, f_tlast, f_tready;
  logic        ped_valid;
  logic [15:0] ped_value, ped_accum;
  logic [63:0] h_tdata;
  logic        h_tvalid, h_tlast, h_tready;

  header_stripper_combiner #(.SEND_PED(SEND_PED)) u_hsc (
    .clk, .rst, .chan_mask,
    .s_tdata, .s_tvalid, .s_tuser, .s_tlast, .s_tready,
    .c_tdata, .c_tdest, .c_tvalid, .c_tlast, .c_tready,
    .ped_valid, .ped_value, .ped_accum,
    .h_tdata, .h_tvalid, .h_tlast, .h_tready,
    .m_tdata, .m_tvalid, .m_tuser, .m_tlast, .m_tready
  );

  pedsub u_ped (
    .clk, .rst,
    .s_tdata(c_tdata), .s_tdest(c_tdest), .s_tvalid(c_tvalid), .s_tlast(c_tlast), .s_tready(c_tready),
    .m_tdata(p_tdata), .m_tdest(p_tdest), .m_tvalid(p_tvalid), .m_tlast(p_tlast), .m_tready(p_tready),
    .ped_valid, .ped_value, .ped_accum
  );

  fir_filter u_fir (
    .clk, .rst,
    .s_tdata(p_tdata), .s_tdest(p_tdest), .s_tvalid(p_tvalid), .s_tlast(p_tlast), .s_tready(p_tready),
    .m_tdata(f_tdata), .m_tdest(f_tdest), .m_tvalid(f_tvalid), .m_tlast(f_tlast), .m_tready(f_tready)
  );

  hit_finder u_hf (
    .clk, .rst, .threshold,
    .s_tdata(f_tdata), .s_tvalid(f_tvalid), .s_tlast(f_tlast), .s_tready(f_tready),
    .m_tdata(h_tdata), .m_tvalid(h_tvalid), .m_tlast(h_tlast), .m_tready(h_tready)
  );

  axi_probe #(.W(16)) u_p0 (
    .clk, .rst, .tdata(s_tdata), .tvalid(s_tvalid), .tuser(s_tuser), .tlast(s_tlast), .tready(s_tready),
    .pkt_count(probe_pkts[0]), .err_count(probe_errs[0]), .status(probe_status[0])
  );
  axi_probe #(.W(16)) u_p1 (
    .clk, .rst, .tdata(c_tdata), .tvalid(c_tvalid), .tuser(c_tlast), .tlast(c_tlast), .tready(c_tready),
    .pkt_count(probe_pkts[1]), .err_count(probe_errs[1]), .status(probe_status[1])
  );
  axi_probe #(.W(16)) u_p2 (
    .clk, .rst, .tdata(p_tdata), .tvalid(p_tvalid), .tuser(p_tlast), .tlast(p_tlast), .tready(p_tready),
    .pkt_count(probe_pkts[2]), .err_count(probe_errs[2]), .status(probe_status[2])
  );
  axi_probe #(.W(16)) u_p3 (
    .clk, .rst, .tdata(f_tdata), .tvalid(f_tvalid), .tuser(f_tlast), .tlast(f_tlast), .tready(f_tready),
    .pkt_count(probe_pkts[3]), .err_count(probe_errs[3]), .status(probe_status[3])
  );
  axi_probe #(.W(64)) u_p4 (
    .clk, .rst, .tdata(h_tdata), .tvalid(h_tvalid), .tuser(1'b0), .tlast(h_tlast), .tready(h_tready),
    .pkt_count(probe_pkts[4]), .err_count(probe_errs[4]), .status(probe_status[4])
  );
  axi_probe #(.W(64)) u_p5 (
    .clk, .rst, .tdata(m_tdata), .tvalid(m_tvalid), .tuser(m_tuser), .tlast(m_tlast), .tready(m_tready),
    .pkt_count(probe_pkts[5]), .err_count(probe_errs[5]), .status(probe_status[5])
  );
endmodule
