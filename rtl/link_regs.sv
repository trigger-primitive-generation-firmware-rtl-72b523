// link_regs: register block of one link processor on an IPbus-style bus.
//
// Holds the configuration the control software writes - the hit-finder
// threshold and the per-channel masks of the four TPG blocks - and lets it
// read the monitoring counters (probes, data router, CR interface).
// Address map (32-bit word addresses):
//   0x00        threshold, bits 15:0 (read/write, reset THRESH_RESET)
//   0x08+2k     channel mask of TPG block k, channels 4g+k for g = 0..31
//   0x09+2k     same, g = 32..63                     (read/write, reset 0)
//   0x40+i      status word i, i < N_RO                 (read only)
// Other addresses answer with err. A strobe is answered with ack (or err)
// one cycle later; rdata is valid with ack. The bus structure follows the
// usual IPbus slave signals (addr, wdata, strobe, write / rdata, ack, err).
//
// Follows the description: threshold and channel masking are configured
// over IPbus and monitoring registers are read back. This design's own
// choice: the address map and reset values.
module link_regs
  import tpg_pkg::*;
#(
  parameter int unsigned N_RO         = 16,
  parameter logic [15:0] THRESH_RESET = 16'd20
) (
  input  logic      clk,
  input  logic      rst,
  input  ipb_wbus_t ipb_in,
  output ipb_rbus_t ipb_out,
  input  logic [N_RO-1:0][31:0] ro,
  output logic [15:0] threshold,
  output logic [N_LANES-1:0][N_GROUPS-1:0] chan_mask
);
  logic [31:0] a;
  logic        is_thr, is_mask, is_ro;
  logic [2:0]  mask_sel;

  assign a        = ipb_in.addr;
  assign is_thr   = a == 32'h0;
  assign is_mask  = a >= 32'h8 && a < 32'h8 + 32'(2 * N_LANES);
  assign is_ro    = a >= 32'h40 && a < 32'h40 + 32'(N_RO);
  assign mask_sel = 3'(a - 32'h8);

  always_ff @(posedge clk) begin
    if (rst) begin
      threshold <= THRESH_RESET;
      chan_mask <= '0;
      ipb_out   <= '0;
    end else begin
      ipb_out.ack   <= 1'b0;
      ipb_out.err   <= 1'b0;
      ipb_out.rdata <= '0;
      if (ipb_in.strobe && !ipb_out.ack && !ipb_out.err) begin
        if (is_thr) begin
          ipb_out.ack   <= 1'b1;
          ipb_out.rdata <= {16'h0, threshold};
          if (ipb_in.write) threshold <= ipb_in.wdata[15:0];
        end else if (is_mask) begin
          ipb_out.ack   <= 1'b1;
          ipb_out.rdata <= chan_mask[mask_sel[2:1]][32*mask_sel[0] +: 32];
          if (ipb_in.write) chan_mask[mask_sel[2:1]][32*mask_sel[0] +: 32] <= ipb_in.wdata;
        end else if (is_ro && !ipb_in.write) begin
          ipb_out.ack   <= 1'b1;
          ipb_out.rdata <= ro[($clog2(N_RO))'(a - 32'h40)];
        end else begin
          ipb_out.err   <= 1'b1;
        end
      end
    end
  end
endmodule
