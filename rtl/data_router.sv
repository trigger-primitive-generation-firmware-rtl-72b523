// data_router: Data Reception + Data Storage + Unpacker of one link.
//
// Turns WIB frames (all 256 channels of one time tick) into processing
// packets (one channel, 64 ticks) on four 16-bit AXI4-Stream lanes, one per
// TPG block. The reception block writes 64-bit words into the dual-port RAM
// and passes the write pointer; the unpacker reads whole 64-tick blocks back
// and returns its read pointer, so that frames are dropped (and counted)
// rather than overwritten when the buffer is full.
module data_router
  import tpg_pkg::*;
#(
  parameter int unsigned BUF_BLOCKS = 2
) (
  input  logic        clk,
  input  logic        rst,
  input  logic [31:0] rx_data,
  input  logic        rx_k,
  input  logic        rx_valid,
  output logic [N_LANES-1:0][15:0] m_tdata,
  output logic [N_LANES-1:0]       m_tvalid,
  output logic [N_LANES-1:0]       m_tuser,
  output logic [N_LANES-1:0]       m_tlast,
  input  logic [N_LANES-1:0]       m_tready,
  output logic [15:0] drop_count,
  output logic [15:0] err_count,
  output logic [15:0] wr_tick
);
  localparam int unsigned AW = $clog2(BUF_BLOCKS * PKT_TICKS * N_GROUPS);

  logic          we;
  logic [AW-1:0] wr_addr, rd_addr;
  logic [63:0]   wr_data, rd_data;
  logic [15:0]   rd_block;
  logic [BUF_BLOCKS-1:0][63:0] blk_ts;
  logic [BUF_BLOCKS-1:0]       blk_gap;

  data_reception #(.BUF_BLOCKS(BUF_BLOCKS), .AW(AW)) u_rx (
    .clk, .rst, .rx_data, .rx_k, .rx_valid, .we, .wr_addr, .wr_data,
    .wr_tick, .rd_block, .blk_ts, .blk_gap, .drop_count, .err_count
  );

  dpram #(.DW(64), .AW(AW)) u_store (
    .clk, .we, .wr_addr, .wr_data, .rd_addr, .rd_data
  );

  unpacker #(.BUF_BLOCKS(BUF_BLOCKS), .AW(AW)) u_unpack (
    .clk, .rst, .wr_tick, .rd_block, .blk_ts, .blk_gap, .rd_addr, .rd_data,
    .m_tdata, .m_tvalid, .m_tuser, .m_tlast, .m_tready
  );
endmodule
