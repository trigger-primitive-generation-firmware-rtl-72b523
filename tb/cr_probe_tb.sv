// cr_probe_tb: packet and protocol-error counting of the CR-word probe.
//
// Builds a CR word stream of mostly well-formed packets (SOP, an even number
// of data words, EOP) with idle gaps, and injects sequence errors: SOP
// inside a packet, EOP or data outside a packet, odd data-word counts and
// unknown k-characters. While driving it, random flow control stalls the
// stream and now and then a stalled word is withdrawn or (for data words)
// changed. The expected counts come from a separate parse of the words as
// they are accepted and from the stimulus decisions; the probe's counters
// are compared after every clock.
module cr_probe_tb;
  import tpg_pkg::*;

  logic clk = 0, rst = 1;
  always #5 clk = ~clk;

  logic [31:0] cr_data;
  logic cr_k, cr_valid, cr_ready;
  logic [31:0] pkt_count;
  logic [15:0] err_count;
  logic in_pkt;

  cr_probe dut (.*);

  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; if (failures < 20) $display("FAIL: %s", what); end
  endtask

  localparam logic [32:0] SOP = {1'b1, 24'h0, K_SOF};
  localparam logic [32:0] EOP = {1'b1, 24'h0, K_EOF};

  logic [32:0] src [$];
  initial begin
    for (int p = 0; p < 300; p++) begin
      automatic int kind = $urandom_range(0, 11);
      automatic int nd = 2 * $urandom_range(1, 6);
      if (kind == 7) nd++;                                  // odd data words
      if (kind != 8) src.push_back(SOP);                    // 8: no SOP
      for (int i = 0; i < nd; i++) begin
        src.push_back({1'b0, $urandom});
        if (kind == 9 && i == 0) src.push_back(SOP);        // SOP inside
        if (kind == 10 && i == 1) src.push_back({1'b1, 24'h0, 8'hF7}); // unknown k
      end
      src.push_back(EOP);
      if (kind == 11) src.push_back(EOP);                   // EOP outside
    end
  end

  // reference parse of accepted words
  bit r_open = 0, r_odd = 0;
  int exp_pkts = 0, exp_errs = 0, pend = 0, sp = 0;
  function automatic void parse(logic [32:0] w);
    if (w[32] && w[7:0] != K_SOF && w[7:0] != K_EOF) exp_errs++;
    else if (w[32] && w[7:0] == K_SOF) begin
      if (r_open) exp_errs++;
      r_open = 1; r_odd = 0;
    end else if (w[32]) begin
      if (!r_open || r_odd) exp_errs++;
      if (r_open) exp_pkts++;
      r_open = 0;
    end else begin
      if (!r_open) exp_errs++;
      else r_odd = !r_odd;
    end
  endfunction

  always_ff @(posedge clk) begin
    if (rst) begin
      cr_valid <= 0; cr_ready <= 0; cr_k <= 0; cr_data <= '0;
    end else begin
      exp_errs += pend;
      pend = 0;
      if (cr_valid && cr_ready) begin
        parse({cr_k, cr_data});
        sp = sp + 1;
      end
      cr_ready <= $urandom_range(0, 2) != 0;
      if (cr_valid && !cr_ready && $urandom_range(0, 15) == 0) begin
        if (!cr_k) begin cr_data <= cr_data ^ 32'h1; pend = 1; end
        else begin cr_valid <= 0; pend = 1; end
      end else if (!cr_valid || cr_ready) begin             // else hold the stalled word
        cr_valid <= (sp < src.size()) && $urandom_range(0, 4) != 0;
        if (sp < src.size()) {cr_k, cr_data} <= src[sp];
      end
    end
  end

  initial begin
    repeat (3) @(posedge clk);
    rst = 0;
    while (sp < src.size()) begin
      @(posedge clk);
      #1;
      check(pkt_count == exp_pkts, $sformatf("pkt_count %0d exp %0d", pkt_count, exp_pkts));
      check(err_count == 16'(exp_errs), $sformatf("err_count %0d exp %0d", err_count, exp_errs));
      check(in_pkt == r_open, "in_pkt");
    end
    check(exp_pkts > 200 && exp_errs > 50, "stimulus");
    $display("packets %0d, errors %0d", exp_pkts, exp_errs);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (40000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
