// ipbus_wupper_bridge: lets the readout card's register map carry IPbus
// packets to the hit finder's register buses.
//
// The host cannot speak IPbus to the card directly; it can only write and
// read registers of the card's register map. The bridge offers five such
// registers (br_reg_e) in front of two RAMs:
//   - the host writes BR_WRITE_ADDRESS, then BR_WRITE_DATA: each write of
//     BR_WRITE_DATA stores its 64 bits in the request RAM at that address;
//   - an IPbus master reads the request packet from the request RAM
//     (req_addr / req_data), carries out the transactions on the IPbus
//     slaves, writes the reply packet into the reply RAM (rsp_*) and raises
//     pkt_done;
//   - the host polls BR_PKT_DONE, then writes BR_READ_ADDRESS and reads the
//     reply with BR_READ_DATA.
// reg_rdata is combinational from the register select. Both RAMs read
// synchronously: req_data follows req_addr by one clock, and BR_READ_DATA
// is valid from the second clock after BR_READ_ADDRESS was written.
//
// Follows the description: the bridge and its five registers (write
// address, write data with a write trigger, read address, read data, packet
// done) with 64-bit data. This design's own choices: the RAM depth, the
// read timing and the register select encoding. The IPbus master and its
// packet format are not part of this design; its RAM ports are brought out.
module ipbus_wupper_bridge
  import tpg_pkg::*;
#(
  parameter int unsigned AW = 9
) (
  input  logic          clk,
  input  logic          rst,
  // readout-card register map
  input  logic          reg_write,
  input  br_reg_e       reg_sel,
  input  logic [63:0]   reg_wdata,
  output logic [63:0]   reg_rdata,
  // IPbus master side
  input  logic [AW-1:0] req_addr,
  output logic [63:0]   req_data,
  input  logic          rsp_we,
  input  logic [AW-1:0] rsp_addr,
  input  logic [63:0]   rsp_data,
  input  logic          pkt_done
);
  logic [31:0] wr_addr, rd_addr;
  logic [63:0] rd_q;

  always_ff @(posedge clk) begin
    if (rst) begin
      wr_addr <= '0;
      rd_addr <= '0;
    end else if (reg_write) begin
      if (reg_sel == BR_WRITE_ADDRESS) wr_addr <= reg_wdata[31:0];
      if (reg_sel == BR_READ_ADDRESS)  rd_addr <= reg_wdata[31:0];
    end
  end

  always_comb begin
    unique case (reg_sel)
      BR_WRITE_ADDRESS: reg_rdata = {32'h0, wr_addr};
      BR_READ_ADDRESS:  reg_rdata = {32'h0, rd_addr};
      BR_READ_DATA:     reg_rdata = rd_q;
      BR_PKT_DONE:      reg_rdata = {63'h0, pkt_done};
      default:          reg_rdata = '0;
    endcase
  end

  dpram #(.DW(64), .AW(AW)) u_req (
    .clk, .we(reg_write && reg_sel == BR_WRITE_DATA), .wr_addr(wr_addr[AW-1:0]), .wr_data(reg_wdata),
    .rd_addr(req_addr), .rd_data(req_data)
  );

  dpram #(.DW(64), .AW(AW)) u_rsp (
    .clk, .we(rsp_we), .wr_addr(rsp_addr), .wr_data(rsp_data),
    .rd_addr(rd_addr[AW-1:0]), .rd_data(rd_q)
  );
endmodule
