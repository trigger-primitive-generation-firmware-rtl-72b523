// axi_probe_tb: packet and protocol-error counting of the stream probe.
//
// Drives a random stream straight onto the probe's inputs. Most cycles obey
// the AXI4-Stream rule (a beat offered and not taken stays unchanged); at
// random, a stalled beat is withdrawn or has its data, tlast or tuser
// changed. A reference model counts packets and violations independently
// from the stimulus decisions; counters and the live status bits are
// compared every cycle.
module axi_probe_tb;
  localparam int unsigned W = 16;

  logic clk = 0, rst = 1;
  always #5 clk = ~clk;

  logic [W-1:0] tdata;
  logic tvalid, tuser, tlast, tready;
  logic [31:0] pkt_count;
  logic [15:0] err_count;
  logic [3:0]  status;

  axi_probe #(.W(W)) dut (.*);

  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; if (failures < 20) $display("FAIL: %s", what); end
  endtask

  int exp_pkts = 0, exp_errs = 0, pend = 0;

  always_ff @(posedge clk) begin
    if (rst) begin
      tvalid <= 0; tready <= 0; tuser <= 0; tlast <= 0; tdata <= '0; pend = 0;
    end else begin
      // model of the probe, from the stimulus of this cycle
      // a violation scheduled last cycle is on the bus now
      if (tvalid && tready && tlast) exp_pkts++;
      exp_errs += pend;
      pend = 0;
      tready <= $urandom_range(0, 2) != 0;
      if (tvalid && !tready) begin
        // beat waiting: keep it, or (rarely) break the rule
        case ($urandom_range(0, 19))
          0: begin tvalid <= 0; pend = 1; end
          1: begin tdata <= tdata ^ W'(1 << $urandom_range(0, W - 1)); pend = 1; end
          2: begin tlast <= !tlast; pend = 1; end
          3: begin tuser <= !tuser; pend = 1; end
          default: ;
        endcase
      end else begin
        tvalid <= $urandom_range(0, 3) != 0;
        tdata  <= W'($urandom);
        tlast  <= $urandom_range(0, 4) == 0;
        tuser  <= $urandom_range(0, 6) == 0;
      end
    end
  end

  always_ff @(negedge clk) if (!rst) begin
    check(status == {tready, tvalid, tuser, tlast}, "status bits");
  end

  initial begin
    repeat (3) @(posedge clk);
    rst = 0;
    repeat (5000) begin
      @(posedge clk);
      #1;
      check(pkt_count == exp_pkts, $sformatf("pkt_count %0d exp %0d", pkt_count, exp_pkts));
      check(err_count == 16'(exp_errs), $sformatf("err_count %0d exp %0d", err_count, exp_errs));
    end
    check(exp_pkts > 100 && exp_errs > 20, "stimulus");
    $display("packets %0d, errors %0d", exp_pkts, exp_errs);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
