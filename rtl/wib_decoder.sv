// wib_decoder: the Decoder inside the data reception block.
//
// It follows the 33-bit link words (32 data bits plus a k-character flag) of
// one fibre and turns each WIB frame - all 256 channels of one time tick -
// into 64 "Imm" words of four 16-bit samples (4 x 16 = 64 bits). The frame
// is one SOF k-character, four header words (id, timestamp low, timestamp
// high, spare), four COLDATA blocks of four block-header words and 24 data
// words, and an EOF k-character. The four blocks share one layout, so the
// decoder runs one small counter set per block and re-uses it four times:
// every three data words carry eight 12-bit samples (LSB first), and give two
// Imm words, one after the second word and one after the third. Word g of a
// tick holds channels 4g..4g+3 in lanes 0..3 (lane k in bits 16k+15:16k).
//
// Integrity checks: a frame must hold exactly FRAME_WORDS-2 data words
// between SOF and EOF with no other k-character inside (idle k-characters
// are skipped). A good frame ends with a one-cycle frame_ok pulse, a bad one
// with frame_err; the writer only commits ticks on frame_ok.
// ready_vec has bit b set once COLDATA block b has been fully written.
//
// Follows the description: 32-bit WIB in, N x 16-bit (N = 4) out, repeating
// block structure, basic corruption checks. This design's own choice: the
// exact frame layout, k-character codes and the sample packing order.
module wib_decoder
  import tpg_pkg::*;
(
  input  logic        clk,
  input  logic        rst,
  input  logic [31:0] rx_data,
  input  logic        rx_k,
  input  logic        rx_valid,
  output logic        imm_valid,
  output logic [63:0] imm_data,
  output logic [5:0]  imm_group,
  output logic [CD_BLOCKS-1:0] ready_vec,
  output logic [63:0] frame_ts,
  output logic        frame_ok,
  output logic        frame_err
);
  typedef enum logic [1:0] {S_IDLE, S_HDR, S_BLK, S_EOF} state_e;
  state_e state;

  logic [2:0]  hdr_cnt;     // WIB header word index
  logic [1:0]  blk;         // COLDATA block index
  logic [4:0]  wib;         // word within block, 0..27
  logic [1:0]  ph;          // phase within a 3-word triple
  logic [2:0]  trip;        // triple within block, 0..7
  logic [31:0] carry;       // previous data word

  logic is_idle, is_sof, is_eof, data_word;
  assign is_idle   = rx_valid && rx_k && rx_data[7:0] == K_IDLE;
  assign is_sof    = rx_valid && rx_k && rx_data[7:0] == K_SOF;
  assign is_eof    = rx_valid && rx_k && rx_data[7:0] == K_EOF;
  assign data_word = rx_valid && !rx_k;

  function automatic logic [63:0] widen(input logic [47:0] x);
    logic [63:0] r;
    for (int k = 0; k < 4; k++) r[16*k +: 16] = {4'h0, x[12*k +: 12]};
    return r;
  endfunction

  always_ff @(posedge clk) begin
    imm_valid <= 1'b0;
    frame_ok  <= 1'b0;
    frame_err <= 1'b0;
    if (rst) begin
      state     <= S_IDLE;
      hdr_cnt   <= '0;
      blk       <= '0;
      wib       <= '0;
      ph        <= '0;
      trip      <= '0;
      carry     <= '0;
      ready_vec <= '0;
      frame_ts  <= '0;
      imm_data  <= '0;
      imm_group <= '0;
    end else if (is_sof) begin
      // a SOF inside a frame aborts that frame
      if (state != S_IDLE) frame_err <= 1'b1;
      state     <= S_HDR;
      hdr_cnt   <= '0;
      blk       <= '0;
      wib       <= '0;
      ph        <= '0;
      trip      <= '0;
      ready_vec <= '0;
    end else if (is_eof) begin
      if (state == S_EOF) frame_ok  <= 1'b1;
      else if (state != S_IDLE) frame_err <= 1'b1;
      state <= S_IDLE;
    end else if (rx_valid && rx_k && !is_idle) begin
      // unknown k-character
      if (state != S_IDLE) frame_err <= 1'b1;
      state <= S_IDLE;
    end else if (data_word) begin
      unique case (state)
        S_IDLE: ;  // stray data outside a frame is ignored
        S_HDR: begin
          if (hdr_cnt == 3'd1) frame_ts[31:0]  <= rx_data;
          if (hdr_cnt == 3'd2) frame_ts[63:32] <= rx_data;
          hdr_cnt <= hdr_cnt + 1'b1;
          if (hdr_cnt == 3'(WIB_HDR_WORDS - 1)) state <= S_BLK;
        end
        S_BLK: begin
          if (wib >= 5'(CD_HDR_WORDS)) begin
            carry <= rx_data;
            if (ph == 2'd1) begin
              imm_valid <= 1'b1;
              imm_data  <= widen({rx_data[15:0], carry});
              imm_group <= {blk, trip, 1'b0};
            end
            if (ph == 2'd2) begin
              imm_valid <= 1'b1;
              imm_data  <= widen({rx_data, carry[31:16]});
              imm_group <= {blk, trip, 1'b1};
            end
            if (ph == 2'd2) begin
              ph   <= '0;
              trip <= trip + 1'b1;
            end else begin
              ph <= ph + 1'b1;
            end
          end
          if (wib == 5'(CD_WORDS - 1)) begin
            wib            <= '0;
            ready_vec[blk] <= 1'b1;
            blk            <= blk + 1'b1;
            if (blk == 2'(CD_BLOCKS - 1)) state <= S_EOF;
          end else begin
            wib <= wib + 1'b1;
          end
        end
        S_EOF: begin
          // too many data words
          frame_err <= 1'b1;
          state     <= S_IDLE;
        end
        default: state <= S_IDLE;
      endcase
    end
  end
endmodule
