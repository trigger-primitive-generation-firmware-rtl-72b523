// hf_apa_top: hit finding for one anode plane assembly (APA).
//
// An APA is read out over N_LINKS = 10 fibres of 256 wires each; every fibre
// gets its own hf_link_processor, all running in parallel on one clock, so
// the whole plane is processed in one device. Each processor has its own
// link input and its own register bus. Their Central-Router outputs are
// merged LINKS_PER_OUT = 5 at a time by cr_mux into N_OUT = 2 hit output
// links; output j carries links 5j..5j+4, and every packet's SOP word names
// its link in bits 15:8.
//
// The register buses are brought out as they are, and next to them the
// IPbus-Wupper bridge through which the host reaches them on the readout
// card: its five register-map registers (br_reg_*) on one side, its request
// and reply RAM ports (br_req_*, br_rsp_*, br_pkt_done) on the other, for
// the IPbus master that sits between the bridge and the ten register buses.
//
// Follows the description: ten HF processors, one per fibre, at 250 MHz, in
// two groups of five whose outputs are multiplexed into the two paths of
// the readout card (which then sends them over two hit links). The Central
// Router, DMA engine and host link beyond the two outputs are part of the
// readout card, outside this design.
module hf_apa_top
  import tpg_pkg::*;
#(
  parameter int unsigned N_LINKS       = 10,
  parameter int unsigned LINKS_PER_OUT = 5,
  parameter bit          SEND_PED      = 1'b1,
  localparam int unsigned N_OUT        = N_LINKS / LINKS_PER_OUT
) (
  input  logic                     clk,
  input  logic                     rst,
  input  logic [N_LINKS-1:0][31:0] rx_data,
  input  logic [N_LINKS-1:0]       rx_k,
  input  logic [N_LINKS-1:0]       rx_valid,
  output logic [N_OUT-1:0][31:0]   cr_data,
  output logic [N_OUT-1:0]         cr_k,
  output logic [N_OUT-1:0]         cr_valid,
  input  logic [N_OUT-1:0]         cr_ready,
  input  ipb_wbus_t [N_LINKS-1:0]  ipb_in,
  output ipb_rbus_t [N_LINKS-1:0]  ipb_out,
  input  logic                     br_reg_write,
  input  logic [2:0]               br_reg_sel,
  input  logic [63:0]              br_reg_wdata,
  output logic [63:0]              br_reg_rdata,
  input  logic [8:0]               br_req_addr,
  output logic [63:0]              br_req_data,
  input  logic                     br_rsp_we,
  input  logic [8:0]               br_rsp_addr,
  input  logic [63:0]              br_rsp_data,
  input  logic                     br_pkt_done
);
  logic [N_LINKS-1:0][31:0] l_data;
  logic [N_LINKS-1:0]       l_k, l_valid, l_ready;

  for (genvar l = 0; l < N_LINKS; l++) begin : g_link
    hf_link_processor #(.SEND_PED(SEND_PED)) u_link (
      .clk, .rst,
      .rx_data(rx_data[l]), .rx_k(rx_k[l]), .rx_valid(rx_valid[l]),
      .cr_data(l_data[l]), .cr_k(l_k[l]), .cr_valid(l_valid[l]), .cr_ready(l_ready[l]),
      .ipb_in(ipb_in[l]), .ipb_out(ipb_out[l])
    );
  end

  for (genvar j = 0; j < N_OUT; j++) begin : g_out
    cr_mux #(.N_IN(LINKS_PER_OUT), .LINK_BASE(j * LINKS_PER_OUT)) u_mux (
      .clk, .rst,
      .s_data(l_data[j * LINKS_PER_OUT +: LINKS_PER_OUT]),
      .s_k(l_k[j * LINKS_PER_OUT +: LINKS_PER_OUT]),
      .s_valid(l_valid[j * LINKS_PER_OUT +: LINKS_PER_OUT]),
      .s_ready(l_ready[j * LINKS_PER_OUT +: LINKS_PER_OUT]),
      .m_data(cr_data[j]), .m_k(cr_k[j]), .m_valid(cr_valid[j]), .m_ready(cr_ready[j])
    );
  end

  ipbus_wupper_bridge #(.AW(9)) u_bridge (
    .clk, .rst,
    .reg_write(br_reg_write), .reg_sel(br_reg_e'(br_reg_sel)), .reg_wdata(br_reg_wdata), .reg_rdata(br_reg_rdata),
    .req_addr(br_req_addr), .req_data(br_req_data),
    .rsp_we(br_rsp_we), .rsp_addr(br_rsp_addr), .rsp_data(br_rsp_data), .pkt_done(br_pkt_done)
  );
endmodule
