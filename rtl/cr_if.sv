// cr_if: interface between the hit finder and the readout card's Central
// Router.
//
// Three stages: a FIFO wrapper deep enough that the arbitrator is not held
// up while the CR is busy, the hit packet filter (drops empty and corrupted
// hit packets, store-and-forward through its hit frame memory), and the
// CRIF packer (CR packet format). Status: FIFO fill level and the filter's
// counters. Two AXI probes count packets and protocol errors on the FIFO
// output (filter input) and on the filter output (packer input), as in the
// block diagram of the CR interface. Follows the description's three blocks
// and probes; the FIFO depth is this design's choice, and the diagram's
// switcher, hit frame manager and hit frame memory are all inside
// hit_packet_filter here.
module cr_if
  import tpg_pkg::*;
#(
  parameter int unsigned FIFO_DEPTH = 512
) (
  input  logic        clk,
  input  logic        rst,
  input  logic [63:0] s_tdata,
  input  logic        s_tvalid,
  input  logic        s_tuser,
  input  logic        s_tlast,
  output logic        s_tready,
  output logic [31:0] cr_data,
  output logic        cr_k,
  output logic        cr_valid,
  input  logic        cr_ready,
  output logic [31:0] cnt_in,
  output logic [31:0] cnt_empty,
  output logic [31:0] cnt_corrupt,
  output logic [31:0] cnt_out,
  output logic [$clog2(FIFO_DEPTH+1)-1:0] fifo_level,
  output logic [1:0][31:0] probe_pkts,
  output logic [1:0][15:0] probe_errs,
  output logic [1:0][3:0]  probe_status
);
  logic [65:0] q;
  logic        f_full, f_empty, f_pop;
  logic [63:0] p_tdata;
  logic        p_tvalid, p_tuser, p_tlast, p_tready;

  sync_fifo #(.W(66), .DEPTH(FIFO_DEPTH)) u_fifo (
    .clk, .rst,
    .push(s_tvalid && !f_full), .wr_data({s_tuser, s_tlast, s_tdata}),
    .pop(f_pop), .rd_data(q), .full(f_full), .empty(f_empty), .count(fifo_level)
  );
  assign s_tready = !f_full;

  logic f_tready;
  assign f_pop = !f_empty && f_tready;

  hit_packet_filter u_filter (
    .clk, .rst,
    .s_tdata(q[63:0]), .s_tvalid(!f_empty), .s_tuser(q[65]), .s_tlast(q[64]), .s_tready(f_tready),
    .m_tdata(p_tdata), .m_tvalid(p_tvalid), .m_tuser(p_tuser), .m_tlast(p_tlast), .m_tready(p_tready),
    .cnt_in, .cnt_empty, .cnt_corrupt, .cnt_out
  );

  crif_packer u_packer (
    .clk, .rst,
    .s_tdata(p_tdata), .s_tvalid(p_tvalid), .s_tlast(p_tlast), .s_tready(p_tready),
    .cr_data, .cr_k, .cr_valid, .cr_ready
  );

  axi_probe #(.W(64)) u_p_fifo (
    .clk, .rst, .tdata(q[63:0]), .tvalid(!f_empty), .tuser(q[65]), .tlast(q[64]), .tready(f_tready),
    .pkt_count(probe_pkts[0]), .err_count(probe_errs[0]), .status(probe_status[0])
  );
  axi_probe #(.W(64)) u_p_pack (
    .clk, .rst, .tdata(p_tdata), .tvalid(p_tvalid), .tuser(p_tuser), .tlast(p_tlast), .tready(p_tready),
    .pkt_count(probe_pkts[1]), .err_count(probe_errs[1]), .status(probe_status[1])
  );
endmodule
