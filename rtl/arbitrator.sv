// arbitrator: merges the hit packets of the four TPG blocks into one stream.
//
// Each input has its own FIFO, so a TPG block can hand over a packet while
// another one is being sent. The arbitrator forwards only complete packets:
// it counts the tlast beats written into and read out of each FIFO, picks
// (round-robin, starting after the last served input) an input holding at
// least one whole packet, and stays on it until that packet's tlast has
// left. Input tready is the FIFO's not-full.
//
// Interface: N_IN 64-bit AXI4-Stream inputs (tdata, tuser, tlast), one
// output; the output is driven straight from the FIFO head (no extra
// latency). Follows the description: FIFOs per input, waiting for the end
// of packet before sending. This design's own choice: round-robin order and
// FIFO depth.
module arbitrator
  import tpg_pkg::*;
#(
  parameter int unsigned N_IN  = N_LANES,
  parameter int unsigned DEPTH = 64
) (
  input  logic        clk,
  input  logic        rst,
  input  logic [N_IN-1:0][63:0] s_tdata,
  input  logic [N_IN-1:0]       s_tvalid,
  input  logic [N_IN-1:0]       s_tuser,
  input  logic [N_IN-1:0]       s_tlast,
  output logic [N_IN-1:0]       s_tready,
  output logic [63:0] m_tdata,
  output logic        m_tvalid,
  output logic        m_tuser,
  output logic        m_tlast,
  input  logic        m_tready,
  output logic [$clog2(N_IN)-1:0] m_src
);
  localparam int unsigned SW = $clog2(N_IN);
  localparam int unsigned CW = $clog2(DEPTH + 1);

  logic [N_IN-1:0][65:0] f_out;
  logic [N_IN-1:0]       f_full, f_empty, f_pop;
  logic [N_IN-1:0][CW-1:0] pkts;
  logic [SW-1:0]         sel, last_sel;
  logic                  busy;
  logic [N_IN-1:0]       have;

  for (genvar i = 0; i < N_IN; i++) begin : g_in
    logic [CW-1:0] cnt_unused;
    sync_fifo #(.W(66), .DEPTH(DEPTH)) u_fifo (
      .clk, .rst,
      .push(s_tvalid[i] && s_tready[i]), .wr_data({s_tuser[i], s_tlast[i], s_tdata[i]}),
      .pop(f_pop[i]), .rd_data(f_out[i]),
      .full(f_full[i]), .empty(f_empty[i]), .count(cnt_unused)
    );
    assign s_tready[i] = !f_full[i];
    assign have[i]     = pkts[i] != '0;
    assign f_pop[i]    = busy && sel == SW'(i) && m_tready;

    always_ff @(posedge clk) begin
      if (rst) pkts[i] <= '0;
      else pkts[i] <= pkts[i] + CW'(s_tvalid[i] && s_tready[i] && s_tlast[i])
                              - CW'(f_pop[i] && f_out[i][64]);
    end
  end

  assign m_tvalid = busy;
  assign m_tdata  = f_out[sel][63:0];
  assign m_tlast  = f_out[sel][64];
  assign m_tuser  = f_out[sel][65];
  assign m_src    = sel;

  always_ff @(posedge clk) begin
    if (rst) begin
      busy     <= 1'b0;
      sel      <= '0;
      last_sel <= SW'(N_IN - 1);
    end else if (!busy) begin
      for (int k = N_IN; k >= 1; k--) begin
        if (have[SW'((32'(last_sel) + k) % N_IN)]) begin
          sel  <= SW'((32'(last_sel) + k) % N_IN);
          busy <= 1'b1;
        end
      end
    end else if (m_tready && m_tlast) begin
      busy     <= 1'b0;
      last_sel <= sel;
    end
  end
endmodule
