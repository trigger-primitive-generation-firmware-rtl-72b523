// crif_packer: translates hit packets into the Central Router packet format.
//
// The Central Router (CR) of the readout card takes a stream of 32-bit words
// with a k-character flag, framed like a FULL-mode link: a start-of-packet
// k-character, the payload, an end-of-packet k-character. Each 64-bit hit
// packet word becomes two payload words, low half first. cr_ready is the
// CR's flow control; the packer holds its output word while it is low.
//
// Interface: 64-bit AXI4-Stream in; cr_data/cr_k/cr_valid out. Throughput:
// 2 cycles per 64-bit word plus 2 per packet. Follows the description: the
// packer turns each hit packet into a CR packet. This design's own choice:
// the CR word format, which the description does not give.
module crif_packer
  import tpg_pkg::*;
(
  input  logic        clk,
  input  logic        rst,
  input  logic [63:0] s_tdata,
  input  logic        s_tvalid,
  input  logic        s_tlast,
  output logic        s_tready,
  output logic [31:0] cr_data,
  output logic        cr_k,
  output logic        cr_valid,
  input  logic        cr_ready
);
  typedef enum logic [1:0] {S_SOP, S_LO, S_HI, S_EOP} state_e;
  state_e state;

  assign cr_valid = (state == S_EOP) ? 1'b1 : s_tvalid;
  assign s_tready = (state == S_HI) && cr_ready;

  always_comb begin
    unique case (state)
      S_SOP:   begin cr_k = 1'b1; cr_data = {24'h0, K_SOF}; end
      S_LO:    begin cr_k = 1'b0; cr_data = s_tdata[31:0];  end
      S_HI:    begin cr_k = 1'b0; cr_data = s_tdata[63:32]; end
      default: begin cr_k = 1'b1; cr_data = {24'h0, K_EOF}; end
    endcase
  end

  always_ff @(posedge clk) begin
    if (rst) state <= S_SOP;
    else if (cr_valid && cr_ready) begin
      unique case (state)
        S_SOP:   state <= S_LO;
        S_LO:    state <= S_HI;
        S_HI:    state <= s_tlast ? S_EOP : S_LO;
        default: state <= S_SOP;
      endcase
    end
  end
endmodule
