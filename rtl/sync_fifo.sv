// sync_fifo: single-clock first-word-fall-through FIFO.
//
// Helper used for the arbitrator input buffers, the hit buffer of the header
// stripper/combiner and the CR-interface FIFO wrapper. The head entry is
// visible on rd_data whenever empty is low; pop removes it. push while full
// and pop while empty are ignored. Storage is a plain array (LUT or block RAM
// after synthesis), pointers are one bit wider than the address.
module sync_fifo #(
  parameter int unsigned W     = 64,
  parameter int unsigned DEPTH = 16
) (
  input  logic                       clk,
  input  logic                       rst,
  input  logic                       push,
  input  logic [W-1:0]               wr_data,
  input  logic                       pop,
  output logic [W-1:0]               rd_data,
  output logic                       full,
  output logic                       empty,
  output logic [$clog2(DEPTH+1)-1:0] count
);
  localparam int unsigned AW = (DEPTH > 1) ? $clog2(DEPTH) : 1;

  logic [W-1:0]  mem [DEPTH];
  logic [AW:0]   wp, rp;
  logic          do_push, do_pop;

  assign count   = ($clog2(DEPTH+1))'(wp - rp);
  assign full    = (count == ($clog2(DEPTH+1))'(DEPTH));
  assign empty   = (wp == rp);
  assign do_push = push && !full;
  assign do_pop  = pop && !empty;
  assign rd_data = mem[rp[AW-1:0]];

  always_ff @(posedge clk) begin
    if (rst) begin
      wp <= '0;
      rp <= '0;
    end else begin
      if (do_push) wp <= wp + 1'b1;
      if (do_pop)  rp <= rp + 1'b1;
    end
  end

  always_ff @(posedge clk)
    if (do_push) mem[wp[AW-1:0]] <= wr_data;

  initial assert (DEPTH == (1 << AW)) else $fatal(1, "sync_fifo: DEPTH must be a power of two");
endmodule
