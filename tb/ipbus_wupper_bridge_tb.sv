// ipbus_wupper_bridge_tb: self-checking test of the IPbus-Wupper bridge.
//
// The host side writes random request packets through BR_WRITE_ADDRESS /
// BR_WRITE_DATA at random addresses; a behavioural master reads every word
// back from the request RAM (one clock after req_addr) and compares it.
// The master then writes random replies into the reply RAM and toggles
// pkt_done; the host reads them back through BR_READ_ADDRESS /
// BR_READ_DATA (two clocks after the address write) and polls BR_PKT_DONE.
// The address registers are read back after every write. Idle clocks of
// random length separate the accesses. A watchdog ends a hung run.
module ipbus_wupper_bridge_tb;
  import tpg_pkg::*;

  localparam int AW = 9;
  logic clk = 1'b0, rst = 1'b1;
  always #2 clk = ~clk;

  logic          reg_write = 1'b0;
  br_reg_e       reg_sel = BR_PKT_DONE;
  logic [63:0]   reg_wdata = '0, reg_rdata;
  logic [AW-1:0] req_addr = '0, rsp_addr = '0;
  logic [63:0]   req_data, rsp_data = '0;
  logic          rsp_we = 1'b0, pkt_done = 1'b0;

  ipbus_wupper_bridge #(.AW(AW)) dut (.*);

  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL: %s", what);
    end
  endtask

  task automatic host_write(input br_reg_e sel, input logic [63:0] d);
    @(posedge clk);
    reg_write <= 1'b1; reg_sel <= sel; reg_wdata <= d;
    @(posedge clk);
    reg_write <= 1'b0; reg_wdata <= $urandom;
    repeat ($urandom_range(0, 2)) @(posedge clk);
  endtask

  task automatic host_read(input br_reg_e sel, output logic [63:0] d);
    @(posedge clk);
    reg_sel <= sel;
    @(posedge clk);
    @(posedge clk);
    d = reg_rdata;
  endtask

  logic [63:0] req_mem [1 << AW], rsp_mem [1 << AW];

  initial begin
    logic [63:0] d;
    int base, n;
    repeat (3) @(posedge clk);
    rst <= 1'b0;
    for (int pkt = 0; pkt < 60; pkt++) begin
      // host writes a request packet
      base = $urandom_range(0, (1 << AW) - 1);
      n    = $urandom_range(1, 24);
      host_write(BR_WRITE_ADDRESS, 64'(base));
      host_read(BR_WRITE_ADDRESS, d);
      check(d == 64'(base), "write address read-back");
      for (int i = 0; i < n; i++) begin
        automatic logic [63:0] w = {$urandom, $urandom};
        automatic int a = (base + i) % (1 << AW);
        host_write(BR_WRITE_ADDRESS, 64'(a));
        host_write(BR_WRITE_DATA, w);
        req_mem[a] = w;
      end
      // master reads it back
      for (int i = 0; i < n; i++) begin
        automatic int a = (base + i) % (1 << AW);
        @(posedge clk); req_addr <= AW'(a);
        @(posedge clk);
        #1 check(req_data == req_mem[a], $sformatf("request word %0d", a));
      end
      // master writes the reply and raises pkt_done
      host_read(BR_PKT_DONE, d);
      check(d == 64'h0, "packet done low before reply");
      for (int i = 0; i < n; i++) begin
        automatic int a = (base + 2 * i) % (1 << AW);
        automatic logic [63:0] w = {$urandom, $urandom};
        @(posedge clk);
        rsp_we <= 1'b1; rsp_addr <= AW'(a); rsp_data <= w;
        rsp_mem[a] = w;
      end
      @(posedge clk); rsp_we <= 1'b0; pkt_done <= 1'b1;
      host_read(BR_PKT_DONE, d);
      check(d == 64'h1, "packet done high after reply");
      // host reads the reply
      for (int i = 0; i < n; i++) begin
        automatic int a = (base + 2 * i) % (1 << AW);
        host_write(BR_READ_ADDRESS, 64'(a));
        host_read(BR_READ_ADDRESS, d);
        check(d == 64'(a), "read address read-back");
        host_read(BR_READ_DATA, d);
        check(d == rsp_mem[a], $sformatf("reply word %0d", a));
      end
      @(posedge clk); pkt_done <= 1'b0;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #10ms;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end
endmodule
