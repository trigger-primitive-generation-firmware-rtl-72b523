// hf_link_processor: the hit-finder processor of one detector fibre.
//
// WIB link words in, Central-Router hit packets out:
//   data_router  -> 4 x tpg_block -> arbitrator -> cr_if
// The data router regroups the 256 channels of each tick into per-channel
// 64-tick packets, four channels at a time; each tpg_block handles every
// fourth channel (64 channels) with pedestal subtraction, FIR filtering and
// hit finding; the arbitrator merges the four hit-packet streams and the CR
// interface drops empty or damaged packets and frames the rest for the CR.
// AXI probes sit on the six buses of each TPG block and on the arbitrator
// output, and a CR probe on the Central-Router output;
// link_regs makes the threshold and channel masks writable and the counters
// readable over the register bus.
//
// Status words readable at 0x40+i (N_RO = 64):
//   0 ticks written, 1 dropped frames, 2 damaged frames,
//   3..6 CR-interface packets in / empty / corrupt / out, 7 CR FIFO level,
//   8 + 6k + j   packets seen by probe j of TPG block k (j = 0..5, see
//                tpg_block: router>>hsc, hsc>>pedsub, pedsub>>fir, fir>>hf,
//                hf>>hsc, hsc>>CR interface),
//   32 + 6k + j  {12'h0, probe bits {tready, tvalid, tuser, tlast}, errors},
//   56 packets out of the arbitrator, 57 its probe word as above,
//   58 AXI4-Stream protocol errors summed over all probes,
//   59 {CR packet open, arbitrator selection},
//   60 CR packets sent, 61 CR protocol errors,
//   62/63 packets seen by the CR interface's probes on its FIFO output and
//   on its packer input.
// The numbering follows the probe read-out of the original firmware (six
// probes per TPG block, four blocks); the addresses are this design's own.
//
// One clock (250 MHz in the target device) for everything; the link words
// are assumed to be already in this clock domain.
module hf_link_processor
  import tpg_pkg::*;
#(
  parameter bit          SEND_PED   = 1'b1,
  parameter int unsigned BUF_BLOCKS = 2
) (
  input  logic        clk,
  input  logic        rst,
  input  logic [31:0] rx_data,
  input  logic        rx_k,
  input  logic        rx_valid,
  output logic [31:0] cr_data,
  output logic        cr_k,
  output logic        cr_valid,
  input  logic        cr_ready,
  input  ipb_wbus_t   ipb_in,
  output ipb_rbus_t   ipb_out
);
  localparam int unsigned N_RO = 64;

  logic [N_LANES-1:0][15:0] u_tdata;
  logic [N_LANES-1:0]       u_tvalid, u_tuser, u_tlast, u_tready;
  logic [N_LANES-1:0][63:0] t_tdata;
  logic [N_LANES-1:0]       t_tvalid, t_tuser, t_tlast, t_tready;
  logic [63:0] a_tdata;
  logic        a_tvalid, a_tuser, a_tlast, a_tready;
  logic [1:0]  a_src;

  logic [15:0] threshold;
  logic [N_LANES-1:0][N_GROUPS-1:0] chan_mask;
  logic [15:0] drop_count, err_count, wr_tick;
  logic [31:0] cnt_in, cnt_empty, cnt_corrupt, cnt_out;
  logic [$clog2(512+1)-1:0] fifo_level;
  logic [N_RO-1:0][31:0] ro;

  logic [N_LANES-1:0][5:0][31:0] pr_cnt;
  logic [N_LANES-1:0][5:0][15:0] pr_err;
  logic [N_LANES-1:0][5:0][3:0]  pr_st;
  logic [31:0] parb_cnt;
  logic [15:0] parb_err;
  logic [3:0]  parb_st;
  logic [1:0][31:0] pc_cnt;
  logic [1:0][15:0] pc_err;
  logic [1:0][3:0]  pc_st;
  logic [31:0] pcr_cnt;
  logic [15:0] pcr_err;
  logic        pcr_open;

  data_router #(.BUF_BLOCKS(BUF_BLOCKS)) u_router (
    .clk, .rst, .rx_data, .rx_k, .rx_valid,
    .m_tdata(u_tdata), .m_tvalid(u_tvalid), .m_tuser(u_tuser), .m_tlast(u_tlast), .m_tready(u_tready),
    .drop_count, .err_count, .wr_tick
  );

  for (genvar k = 0; k < N_LANES; k++) begin : g_tpg
    tpg_block #(.SEND_PED(SEND_PED)) u_tpg (
      .clk, .rst, .threshold, .chan_mask(chan_mask[k]),
      .s_tdata(u_tdata[k]), .s_tvalid(u_tvalid[k]), .s_tuser(u_tuser[k]), .s_tlast(u_tlast[k]),
      .s_tready(u_tready[k]),
      .m_tdata(t_tdata[k]), .m_tvalid(t_tvalid[k]), .m_tuser(t_tuser[k]), .m_tlast(t_tlast[k]),
      .m_tready(t_tready[k]),
      .probe_pkts(pr_cnt[k]), .probe_errs(pr_err[k]), .probe_status(pr_st[k])
    );
  end

  arbitrator u_arb (
    .clk, .rst,
    .s_tdata(t_tdata), .s_tvalid(t_tvalid), .s_tuser(t_tuser), .s_tlast(t_tlast), .s_tready(t_tready),
    .m_tdata(a_tdata), .m_tvalid(a_tvalid), .m_tuser(a_tuser), .m_tlast(a_tlast), .m_tready(a_tready),
    .m_src(a_src)
  );

  axi_probe #(.W(64)) u_parb (
    .clk, .rst, .tdata(a_tdata), .tvalid(a_tvalid), .tuser(a_tuser), .tlast(a_tlast),
    .tready(a_tready), .pkt_count(parb_cnt), .err_count(parb_err), .status(parb_st)
  );

  cr_if u_crif (
    .clk, .rst,
    .s_tdata(a_tdata), .s_tvalid(a_tvalid), .s_tuser(a_tuser), .s_tlast(a_tlast), .s_tready(a_tready),
    .cr_data, .cr_k, .cr_valid, .cr_ready,
    .cnt_in, .cnt_empty, .cnt_corrupt, .cnt_out, .fifo_level,
    .probe_pkts(pc_cnt), .probe_errs(pc_err), .probe_status(pc_st)
  );

  cr_probe u_pcr (
    .clk, .rst, .cr_data, .cr_k, .cr_valid, .cr_ready,
    .pkt_count(pcr_cnt), .err_count(pcr_err), .in_pkt(pcr_open)
  );

  always_comb begin
    logic [31:0] errs;
    ro     = '0;
    ro[0]  = 32'(wr_tick);
    ro[1]  = 32'(drop_count);
    ro[2]  = 32'(err_count);
    ro[3]  = cnt_in;
    ro[4]  = cnt_empty;
    ro[5]  = cnt_corrupt;
    ro[6]  = cnt_out;
    ro[7]  = 32'(fifo_level);
    errs   = 32'(parb_err) + 32'(pc_err[0]) + 32'(pc_err[1]);
    for (int k = 0; k < N_LANES; k++)
      for (int j = 0; j < 6; j++) begin
        ro[8 + 6 * k + j]  = pr_cnt[k][j];
        ro[32 + 6 * k + j] = {12'h0, pr_st[k][j], pr_err[k][j]};
        errs += 32'(pr_err[k][j]);
      end
    ro[56] = parb_cnt;
    ro[57] = {12'h0, parb_st, parb_err};
    ro[58] = errs;
    ro[59] = {29'h0, pcr_open, a_src};
    ro[60] = pcr_cnt;
    ro[61] = 32'(pcr_err);
    ro[62] = pc_cnt[0];
    ro[63] = pc_cnt[1];
  end

  link_regs #(.N_RO(N_RO)) u_regs (
    .clk, .rst, .ipb_in, .ipb_out, .ro, .threshold, .chan_mask
  );
endmodule
