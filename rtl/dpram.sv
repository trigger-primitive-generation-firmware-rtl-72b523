// dpram: the Data Storage block of the data router.
//
// A simple dual-port RAM (one write port, one read port, one clock) that the
// data reception block fills with 64-bit words of four 16-bit samples and the
// unpacker reads back. Reads are synchronous: rd_data holds mem[rd_addr] of
// the previous clock edge, which maps onto FPGA block RAM. Default size: two
// blocks of 64 ticks x 64 words = 8192 x 64 bits (the depth of the circular
// buffer is this design's choice; the description only calls it a
// circular buffer in dual-port RAM with 64-bit words).
module dpram #(
  parameter int unsigned DW = 64,
  parameter int unsigned AW = 13
) (
  input  logic          clk,
  input  logic          we,
  input  logic [AW-1:0] wr_addr,
  input  logic [DW-1:0] wr_data,
  input  logic [AW-1:0] rd_addr,
  output logic [DW-1:0] rd_data
);
  logic [DW-1:0] mem [2**AW];

  always_ff @(posedge clk) begin
    if (we) mem[wr_addr] <= wr_data;
    rd_data <= mem[rd_addr];
  end
endmodule
