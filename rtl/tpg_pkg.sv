// tpg_pkg: types and constants shared by the hit-finder link processor.
//
// A link processor takes the ADC samples of one detector fibre (256 wires,
// 12-bit samples, one frame per 2 MHz time tick), regroups them into
// per-channel packets of 64 ticks, runs pedestal subtraction, a 32-tap
// low-pass FIR and a threshold hit finder on each packet, and ships the
// resulting hit packets towards the readout. The numbers that come from the
// design description are: 256 channels per fibre, 12-bit samples, 64 samples
// per packet, 4 parallel TPG lanes (N = 4 x 16-bit), a pedestal accumulator
// limit of 10, a 32-tap FIR and 10 links per detector plane. The rest of
// this file (frame layout, k-characters, hit word layout, FIR coefficient
// values, register bus) is this design's own choice, documented per item.
package tpg_pkg;

  // ---------------------------------------------------------------- sizes
  localparam int unsigned ADC_BITS      = 12;   // ADC sample width
  localparam int unsigned SAMPLE_W      = 16;   // sample width inside the chain
  localparam int unsigned N_LANES       = 4;    // channels unpacked in parallel (TPG blocks)
  localparam int unsigned N_CHANNELS    = 256;  // wires per fibre
  localparam int unsigned PKT_TICKS     = 64;   // ADC samples per processing packet
  localparam int unsigned N_GROUPS      = N_CHANNELS / N_LANES; // 64-bit words per tick
  localparam int unsigned HDR_BEATS     = 5;    // header frame beats on the 16-bit stream
  localparam int unsigned FIR_TAPS      = 32;
  localparam int unsigned FIR_SHIFT     = 8;    // output scaling of the FIR (divide by 256)
  localparam int signed   PED_ACC_LIMIT = 10;   // accumulator value that moves the pedestal

  // ------------------------------------------------- WIB frame (32-bit + k flag)
  // Frame layout used on the 33-bit link word (32 data bits + k-character flag):
  //   SOF k-char, 4 WIB header words (id, timestamp low, timestamp high, spare),
  //   4 COLDATA blocks of (4 block-header words + 24 data words), EOF k-char.
  // The 24 data words of a block hold 64 channels x 12 bits, packed LSB first.
  localparam logic [7:0]  K_SOF          = 8'h3C;  // K28.1
  localparam logic [7:0]  K_EOF          = 8'hDC;  // K28.6
  localparam logic [7:0]  K_IDLE         = 8'hBC;  // K28.5
  localparam int unsigned WIB_HDR_WORDS  = 4;
  localparam int unsigned CD_BLOCKS      = 4;
  localparam int unsigned CD_HDR_WORDS   = 4;
  localparam int unsigned CD_DATA_WORDS  = 24;
  localparam int unsigned CD_WORDS       = CD_HDR_WORDS + CD_DATA_WORDS;
  localparam int unsigned FRAME_WORDS    = 1 + WIB_HDR_WORDS + CD_BLOCKS * CD_WORDS + 1; // 118

  // ------------------------------------------------------ hit packet words
  // Output packets of a TPG block are carried on a 64-bit AXI4-Stream:
  //   beat 0  hit_hdr_t, beat 1 timestamp (tuser marks the end of this header frame),
  //   optional ped_word_t (validation mode, only for packets that hold hits),
  //   then one hit_t per hit; tlast on the last beat.
  localparam logic [7:0] HDR_MAGIC = 8'hA5;
  localparam int unsigned FLAG_PED   = 0;   // packet carries a pedestal word
  localparam int unsigned FLAG_INERR = 1;   // input packet was flagged as damaged upstream

  typedef struct packed {
    logic [7:0]  magic;
    logic [7:0]  flags;
    logic [15:0] rsvd0;
    logic [7:0]  channel;
    logic [7:0]  rsvd1;
    logic [15:0] n_words;   // words that follow the two header beats
  } hit_hdr_t;

  typedef struct packed {
    logic [15:0] tag;        // PED_TAG
    logic [15:0] pedestal;
    logic [15:0] accum;      // signed accumulator, two's complement
    logic [15:0] rsvd;
  } ped_word_t;
  localparam logic [15:0] PED_TAG = 16'hBEDE;

  typedef struct packed {
    logic [5:0]  start;      // tick of the first sample of the hit within the packet
    logic [5:0]  stop;       // tick of the last sample above threshold
    logic [5:0]  peak_time;
    logic        cont;       // hit runs over the end of the packet
    logic [4:0]  rsvd;
    logic [15:0] peak_adc;
    logic [23:0] sum_adc;
  } hit_t;

  // ------------------------------------------------------ FIR coefficients
  // Hard-wired symmetric triangular low-pass window: c[k] = min(k+1, 32-k),
  // sum 272, output divided by 2**FIR_SHIFT.
  function automatic int fir_coef(input int k);
    return (k + 1 < FIR_TAPS - k) ? k + 1 : FIR_TAPS - k;
  endfunction

  // ------------------------------------------------------ register bus
  // IPbus-style register access (one strobe per transaction, acknowledged).
  typedef struct packed {
    logic [31:0] addr;
    logic [31:0] wdata;
    logic        strobe;
    logic        write;
  } ipb_wbus_t;

  typedef struct packed {
    logic [31:0] rdata;
    logic        ack;
    logic        err;
  } ipb_rbus_t;

  // The five readout-card registers of the IPbus-Wupper bridge.
  typedef enum logic [2:0] {
    BR_WRITE_ADDRESS = 3'd0,   // W: address in the request RAM
    BR_WRITE_DATA    = 3'd1,   // T: any write stores its 64 bits at BR_WRITE_ADDRESS
    BR_READ_ADDRESS  = 3'd2,   // W: address in the reply RAM
    BR_READ_DATA     = 3'd3,   // R: reply RAM word at BR_READ_ADDRESS
    BR_PKT_DONE      = 3'd4    // R: bit 0, a reply packet is ready
  } br_reg_e;

endpackage
