// cr_probe: passive monitor of a Central-Router word stream.
//
// Watches the 32-bit CR words leaving a link processor (cr_data, cr_k,
// cr_valid, cr_ready) and counts the packets that pass (accepted EOP
// k-characters) and the CR protocol errors it sees:
//   - a word offered and not taken that is withdrawn or changed next cycle;
//   - an SOP inside a packet, or an EOP or data word outside one;
//   - a packet with an odd number of 32-bit data words (64-bit words are
//     sent as two halves);
//   - a k-character other than SOP and EOP.
// in_pkt shows whether a packet is open. Counters wrap.
//
// Follows the description: probes that count flowing packets and monitor
// CR protocol errors. This design's own choice: the rules, which are those
// of the CR word format used by crif_packer, and the counter widths.
module cr_probe
  import tpg_pkg::*;
(
  input  logic        clk,
  input  logic        rst,
  input  logic [31:0] cr_data,
  input  logic        cr_k,
  input  logic        cr_valid,
  input  logic        cr_ready,
  output logic [31:0] pkt_count,
  output logic [15:0] err_count,
  output logic        in_pkt
);
  logic        stalled, odd;
  logic [32:0] held;
  logic        is_sop, is_eop, take, bad_word, bad_hold;

  assign take     = cr_valid && cr_ready;
  assign is_sop   = cr_k && cr_data[7:0] == K_SOF;
  assign is_eop   = cr_k && cr_data[7:0] == K_EOF;
  assign bad_hold = stalled && (!cr_valid || held != {cr_k, cr_data});
  always_comb begin
    bad_word = 1'b0;
    if (take) begin
      if (cr_k && !is_sop && !is_eop) bad_word = 1'b1;
      else if (is_sop)                bad_word = in_pkt;
      else if (is_eop)                bad_word = !in_pkt || odd;
      else                            bad_word = !in_pkt;
    end
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      pkt_count <= '0;
      err_count <= '0;
      stalled   <= 1'b0;
      held      <= '0;
      in_pkt    <= 1'b0;
      odd       <= 1'b0;
    end else begin
      stalled <= cr_valid && !cr_ready;
      held    <= {cr_k, cr_data};
      err_count <= err_count + 16'(bad_hold) + 16'(bad_word);
      if (take) begin
        if (is_sop) begin
          in_pkt <= 1'b1;
          odd    <= 1'b0;
        end else if (is_eop) begin
          if (in_pkt) pkt_count <= pkt_count + 1'b1;
          in_pkt <= 1'b0;
        end else if (!cr_k) begin
          odd <= !odd;
        end
      end
    end
  end
endmodule
