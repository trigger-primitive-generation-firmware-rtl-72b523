// dpram_writer: the Dual-port RAM Writer of the data reception block.
//
// Writes the decoder's Imm words into the circular buffer in the Data
// Storage RAM and publishes the write pointer (ticks committed so far) to the
// unpacker. The buffer holds BUF_BLOCKS blocks of PKT_TICKS ticks; the RAM
// address is {tick mod (BUF_BLOCKS*64), group}. A tick is committed only on
// the decoder's frame_ok pulse with all ready_vec bits set, so a damaged
// frame is simply overwritten by the next one.
//
// Overflow: the unpacker returns rd_block, the number of blocks it has
// finished. When the block the next tick belongs to is still unread
// (wr_block - rd_block == BUF_BLOCKS) the whole frame is dropped and counted
// in drop_count, and the next block that is written is marked with blk_gap
// so its packets carry a damage flag. The timestamp of the first tick of
// every block is kept in blk_ts. The drop behaviour under sustained
// backpressure is the one the description reports; the read-pointer return
// path and the flagging are this design's choice.
module dpram_writer
  import tpg_pkg::*;
#(
  parameter int unsigned BUF_BLOCKS = 2,
  parameter int unsigned AW = $clog2(BUF_BLOCKS * PKT_TICKS * N_GROUPS)
) (
  input  logic        clk,
  input  logic        rst,
  // from the decoder
  input  logic        imm_valid,
  input  logic [63:0] imm_data,
  input  logic [5:0]  imm_group,
  input  logic [CD_BLOCKS-1:0] ready_vec,
  input  logic [63:0] frame_ts,
  input  logic        frame_ok,
  input  logic        frame_err,
  // to the data storage RAM
  output logic          we,
  output logic [AW-1:0] wr_addr,
  output logic [63:0]   wr_data,
  // pointers and block side information
  output logic [15:0]   wr_tick,
  input  logic [15:0]   rd_block,
  output logic [BUF_BLOCKS-1:0][63:0] blk_ts,
  output logic [BUF_BLOCKS-1:0]       blk_gap,
  output logic [15:0]   drop_count,
  output logic [15:0]   err_count
);
  localparam int unsigned SLOT_W = $clog2(BUF_BLOCKS * PKT_TICKS);
  localparam int unsigned BSEL_W = (BUF_BLOCKS > 1) ? $clog2(BUF_BLOCKS) : 1;

  logic [15:0]       wr_block;
  logic              full;
  logic              gap_pending;
  logic [BSEL_W-1:0] bsel;

  assign wr_block = wr_tick >> $clog2(PKT_TICKS);
  assign full     = (wr_block - rd_block) >= 16'(BUF_BLOCKS);
  assign bsel     = BSEL_W'(wr_block % BUF_BLOCKS);

  assign we      = imm_valid && !full;
  assign wr_addr = {wr_tick[SLOT_W-1:0], imm_group};
  assign wr_data = imm_data;

  always_ff @(posedge clk) begin
    if (rst) begin
      wr_tick     <= '0;
      drop_count  <= '0;
      err_count   <= '0;
      gap_pending <= 1'b0;
      blk_ts      <= '0;
      blk_gap     <= '0;
    end else begin
      if (frame_err) err_count <= err_count + 1'b1;
      if (frame_ok) begin
        if (full || !(&ready_vec)) begin
          drop_count  <= drop_count + 1'b1;
          gap_pending <= 1'b1;
        end else begin
          if (wr_tick[$clog2(PKT_TICKS)-1:0] == '0) begin
            blk_ts[bsel]  <= frame_ts;
            blk_gap[bsel] <= gap_pending;
            gap_pending   <= 1'b0;
          end
          wr_tick <= wr_tick + 1'b1;
        end
      end
    end
  end

  initial assert (BUF_BLOCKS == (1 << BSEL_W)) else $fatal(1, "dpram_writer: BUF_BLOCKS must be a power of two");
endmodule
