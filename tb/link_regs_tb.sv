// link_regs_tb: register map of the link processor.
//
// Checks the reset values, write and read-back of the threshold and of all
// eight channel-mask words (and that each lands on the right output bits),
// reads of every read-only status word, err on a write to a read-only word
// and on unmapped addresses (with no side effect), and that the answer
// (ack or err) comes exactly one cycle after the strobe.
module link_regs_tb;
  import tpg_pkg::*;

  localparam int unsigned N_RO = 16;

  logic clk = 0, rst = 1;
  always #5 clk = ~clk;

  ipb_wbus_t ipb_in;
  ipb_rbus_t ipb_out;
  logic [N_RO-1:0][31:0] ro;
  logic [15:0] threshold;
  logic [N_LANES-1:0][N_GROUPS-1:0] chan_mask;

  link_regs #(.N_RO(N_RO)) dut (.*);

  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; if (failures < 20) $display("FAIL: %s", what); end
  endtask

  // one transaction; returns read data, ack, err and the answer latency
  task automatic ipb(input logic [31:0] addr, input bit wr, input logic [31:0] wd,
                     output logic [31:0] rd, output bit ack, output bit err);
    int lat = 0;
    @(posedge clk);
    ipb_in <= '{addr: addr, wdata: wd, strobe: 1'b1, write: wr};
    do begin @(posedge clk); #1; lat++; end while (!(ipb_out.ack || ipb_out.err) && lat < 10);
    rd  = ipb_out.rdata;
    ack = ipb_out.ack;
    err = ipb_out.err;
    check(lat == 1, $sformatf("answer latency %0d at %h", lat, addr));
    ipb_in <= '0;
    @(posedge clk);
  endtask

  initial begin
    logic [31:0] rd, mw [8];
    logic [31:0] bad [6] = '{32'h1, 32'h7, 32'h10, 32'h3F, 32'h40 + N_RO, 32'hFFFF_0000};
    bit ack, err;
    ipb_in = '0;
    for (int i = 0; i < N_RO; i++) ro[i] = $urandom;
    repeat (3) @(posedge clk);
    rst = 0;
    @(posedge clk);
    check(threshold == 16'd20, "threshold reset value");
    check(chan_mask == '0, "mask reset value");
    ipb(32'h0, 0, 0, rd, ack, err);
    check(ack && !err && rd == 32'd20, $sformatf("threshold read %h", rd));
    // threshold
    ipb(32'h0, 1, 32'hDEAD_0123, rd, ack, err);
    check(ack && !err, "threshold write ack");
    check(threshold == 16'h0123, $sformatf("threshold %h", threshold));
    ipb(32'h0, 0, 0, rd, ack, err);
    check(rd == 32'h0000_0123, "threshold read-back");
    // masks
    for (int w = 0; w < 8; w++) begin
      mw[w] = $urandom;
      ipb(32'h8 + w, 1, mw[w], rd, ack, err);
      check(ack && !err, "mask write ack");
    end
    for (int w = 0; w < 8; w++) begin
      ipb(32'h8 + w, 0, 0, rd, ack, err);
      check(ack && rd == mw[w], $sformatf("mask word %0d read %h exp %h", w, rd, mw[w]));
      check(chan_mask[w / 2][32 * (w % 2) +: 32] == mw[w], $sformatf("mask word %0d output", w));
    end
    // read-only words
    for (int i = 0; i < N_RO; i++) begin
      ipb(32'h40 + i, 0, 0, rd, ack, err);
      check(ack && !err && rd == ro[i], $sformatf("status %0d read %h exp %h", i, rd, ro[i]));
    end
    // write to a read-only word, unmapped addresses
    ipb(32'h41, 1, 32'h1, rd, ack, err);
    check(err && !ack, "write to read-only not refused");
    foreach (bad[i]) begin
      automatic logic [31:0] a = bad[i];
      ipb(a, 1, 32'hFFFF_FFFF, rd, ack, err);
      check(err && !ack, $sformatf("unmapped %h not refused", a));
    end
    check(threshold == 16'h0123, "threshold changed by a refused write");
    for (int w = 0; w < 8; w++) check(chan_mask[w / 2][32 * (w % 2) +: 32] == mw[w], "mask changed by a refused write");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
