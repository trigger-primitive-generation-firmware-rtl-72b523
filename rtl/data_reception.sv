// data_reception: the Data Reception block of the data router.
//
// Decoder plus dual-port RAM writer: it takes the 32-bit WIB link words of
// one fibre, checks each frame, converts it into 64-bit words of 4 x 16-bit
// samples and writes them into the circular buffer, publishing the write
// pointer in ticks. See wib_decoder and dpram_writer for the details.
module data_reception
  import tpg_pkg::*;
#(
  parameter int unsigned BUF_BLOCKS = 2,
  parameter int unsigned AW = $clog2(BUF_BLOCKS * PKT_TICKS * N_GROUPS)
) (
  input  logic          clk,
  input  logic          rst,
  input  logic [31:0]   rx_data,
  input  logic          rx_k,
  input  logic          rx_valid,
  output logic          we,
  output logic [AW-1:0] wr_addr,
  output logic [63:0]   wr_data,
  output logic [15:0]   wr_tick,
  input  logic [15:0]   rd_block,
  output logic [BUF_BLOCKS-1:0][63:0] blk_ts,
  output logic [BUF_BLOCKS-1:0]       blk_gap,
  output logic [15:0]   drop_count,
  output logic [15:0]   err_count
);
  logic        imm_valid, frame_ok, frame_err;
  logic [63:0] imm_data, frame_ts;
  logic [5:0]  imm_group;
  logic [CD_BLOCKS-1:0] ready_vec;

  wib_decoder u_dec (
    .clk, .rst, .rx_data, .rx_k, .rx_valid,
    .imm_valid, .imm_data, .imm_group, .ready_vec, .frame_ts, .frame_ok, .frame_err
  );

  dpram_writer #(.BUF_BLOCKS(BUF_BLOCKS), .AW(AW)) u_wr (
    .clk, .rst, .imm_valid, .imm_data, .imm_group, .ready_vec, .frame_ts, .frame_ok, .frame_err,
    .we, .wr_addr, .wr_data, .wr_tick, .rd_block, .blk_ts, .blk_gap, .drop_count, .err_count
  );
endmodule
