// axi_probe: passive monitor of one AXI4-Stream interface.
//
// Counts the packets that pass (beats with tvalid, tready and tlast) and the
// protocol errors it sees: tvalid withdrawn, or tdata/tlast/tuser changed,
// while a beat is waiting for tready. It also shows the live state of the
// bus: ready (tready), and the valid/user/last bits - the "[rdy] (vul)"
// columns of a probe read-out. Counters wrap.
//
// Follows the description: probes plugged at the interface between blocks,
// counting flowing packets and monitoring AXI4-Stream protocol errors. This
// design's own choice: the exact error rules and counter widths.
module axi_probe #(
  parameter int unsigned W = 64
) (
  input  logic         clk,
  input  logic         rst,
  input  logic [W-1:0] tdata,
  input  logic         tvalid,
  input  logic         tuser,
  input  logic         tlast,
  input  logic         tready,
  output logic [31:0]  pkt_count,
  output logic [15:0]  err_count,
  output logic [3:0]   status      // {tready, tvalid, tuser, tlast}
);
  logic         stalled;     // a beat was offered and not taken last cycle
  logic [W+1:0] held;

  assign status = {tready, tvalid, tuser, tlast};

  always_ff @(posedge clk) begin
    if (rst) begin
      pkt_count <= '0;
      err_count <= '0;
      stalled   <= 1'b0;
      held      <= '0;
    end else begin
      if (tvalid && tready && tlast) pkt_count <= pkt_count + 1'b1;
      if (stalled && (!tvalid || held != {tuser, tlast, tdata}))
        err_count <= err_count + 1'b1;
      stalled <= tvalid && !tready;
      held    <= {tuser, tlast, tdata};
    end
  end
endmodule
