// cr_mux: merges the Central-Router word streams of several link processors
// into one hit output link.
//
// N_IN inputs, each a stream of CR packets (SOP k-character, data words, EOP
// k-character) with valid/ready flow control. When idle, the multiplexer
// picks, round-robin starting after the input it served last, an input that
// offers a word; from then on it connects that input straight to the output
// until the input's EOP has been accepted, so packets are never interleaved.
// The SOP word of every packet leaves with the number of its source link,
// LINK_BASE + input index, in bits 15:8, so the receiver can tell the
// fibres apart. A word that is not an SOP offered by an idle input (which
// the link processors never send) is passed on like a packet start; the
// downstream CR probe or receiver sees it as a protocol error.
//
// Timing: one idle cycle to select an input, then one word per cycle with no
// added latency (the output is combinational from the selected input).
//
// Follows the description: five HF processors per multiplexer feeding one
// path into the readout's DMA engine, two such paths for ten links, and the
// link configuration with two links that aggregate hits. This design's own
// choice: the round-robin order, the packet-boundary switching and the
// source tag in the SOP word.
module cr_mux
  import tpg_pkg::*;
#(
  parameter int unsigned N_IN      = 5,
  parameter int unsigned LINK_BASE = 0
) (
  input  logic                  clk,
  input  logic                  rst,
  input  logic [N_IN-1:0][31:0] s_data,
  input  logic [N_IN-1:0]       s_k,
  input  logic [N_IN-1:0]       s_valid,
  output logic [N_IN-1:0]       s_ready,
  output logic [31:0]           m_data,
  output logic                  m_k,
  output logic                  m_valid,
  input  logic                  m_ready
);
  localparam int unsigned SW = (N_IN > 1) ? $clog2(N_IN) : 1;

  logic          busy;
  logic [SW-1:0] sel, last_sel;
  logic          is_sop, is_eop;

  assign is_sop = s_k[sel] && s_data[sel][7:0] == K_SOF;
  assign is_eop = s_k[sel] && s_data[sel][7:0] == K_EOF;

  always_comb begin
    s_ready = '0;
    s_ready[sel] = busy && m_ready;
    m_valid = busy && s_valid[sel];
    m_k     = s_k[sel];
    m_data  = s_data[sel];
    if (is_sop) m_data[15:8] = 8'(LINK_BASE + 32'(sel));
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      busy     <= 1'b0;
      sel      <= '0;
      last_sel <= SW'(N_IN - 1);
    end else if (!busy) begin
      for (int k = N_IN; k >= 1; k--) begin
        automatic int unsigned i = (32'(last_sel) + 32'(k)) % N_IN;
        if (s_valid[i]) begin
          sel  <= SW'(i);
          busy <= 1'b1;
        end
      end
    end else if (m_valid && m_ready && is_eop) begin
      busy     <= 1'b0;
      last_sel <= sel;
    end
  end
endmodule
