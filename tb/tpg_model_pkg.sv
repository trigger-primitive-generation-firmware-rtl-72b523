// tpg_model_pkg: reference models used by the testbenches.
//
// Written from the algorithm descriptions, independently of the RTL: a
// pedestal-subtraction and FIR model with per-channel state, a hit-finder
// model, a WIB frame builder and helpers to pack the expected hit packet.
package tpg_model_pkg;
  import tpg_pkg::*;

  typedef logic [32:0] link_word_t;   // {k, data}

  // ------------------------------------------------------------ WIB frames
  // samples[c] is the 12-bit value of channel c
  function automatic void build_frame(input logic [63:0] ts, input logic [11:0] samples [256],
                                      ref link_word_t q[$]);
    q.push_back({1'b1, 24'h0, K_SOF});
    q.push_back({1'b0, 32'hC0FFEE01});
    q.push_back({1'b0, ts[31:0]});
    q.push_back({1'b0, ts[63:32]});
    q.push_back({1'b0, 32'h0});
    for (int b = 0; b < 4; b++) begin
      logic [767:0] bits;
      for (int j = 0; j < 64; j++) bits[12*j +: 12] = samples[64*b + j];
      for (int h = 0; h < 4; h++) q.push_back({1'b0, 32'hCD000000 | 32'(b * 16 + h)});
      for (int w = 0; w < 24; w++) q.push_back({1'b0, bits[32*w +: 32]});
    end
    q.push_back({1'b1, 24'h0, K_EOF});
  endfunction

  // --------------------------------------------------------- hit finding
  function automatic void find_hits(input logic signed [15:0] s [64], input logic signed [15:0] thr,
                                    ref hit_t hits[$]);
    bit in_hit = 0;
    hit_t h;
    for (int i = 0; i < 64; i++) begin
      bit above = s[i] > thr;
      if (!in_hit) begin
        if (i > 0 && above && s[i-1] > thr) begin
          in_hit = 1;
          h = '0;
          h.start = 6'(i - 1);
          h.sum_adc = 24'(s[i-1]) + 24'(s[i]);
          if (s[i] > s[i-1]) begin h.peak_adc = s[i];   h.peak_time = 6'(i);     end
          else               begin h.peak_adc = s[i-1]; h.peak_time = 6'(i - 1); end
        end
      end else if (above) begin
        h.sum_adc += 24'(s[i]);
        if (s[i] > signed'(h.peak_adc)) begin h.peak_adc = s[i]; h.peak_time = 6'(i); end
      end else begin
        h.stop = 6'(i - 1);
        hits.push_back(h);
        in_hit = 0;
      end
      if (i == 63 && in_hit) begin
        h.stop = 6'd63;
        h.cont = 1'b1;
        hits.push_back(h);
      end
    end
  endfunction

  // ------------------------------------------------- pedestal + FIR chain
  class chain_model;
    logic [15:0]        ped  [256];
    int                 acc  [256];
    bit                 seen [256];
    logic signed [15:0] hist [256][31];   // hist[c][0] = x(n-1)

    function new();
      foreach (seen[c]) seen[c] = 0;
    endfunction

    // returns pedestal-subtracted samples, filtered samples and the pedestal
    // state at the start of the packet
    function void run(input int c, input logic [15:0] x [64],
                      output logic signed [15:0] sub [64], output logic signed [15:0] filt [64],
                      output logic [15:0] p0, output logic [15:0] a0);
      if (!seen[c]) begin
        ped[c] = x[0];
        acc[c] = 0;
        for (int k = 0; k < 31; k++) hist[c][k] = 0;
      end
      p0 = ped[c];
      a0 = 16'(acc[c]);
      for (int i = 0; i < 64; i++) begin
        sub[i] = signed'(x[i] - ped[c]);
        if (x[i] > ped[c]) acc[c]++;
        if (x[i] < ped[c]) acc[c]--;
        if (acc[c] == 10)  begin ped[c]++; acc[c] = 0; end
        if (acc[c] == -10) begin ped[c]--; acc[c] = 0; end
      end
      for (int i = 0; i < 64; i++) begin
        longint y = longint'(sub[i]) * fir_coef(0);
        for (int k = 1; k < 32; k++) y += longint'(hist[c][k-1]) * fir_coef(k);
        y = y >>> FIR_SHIFT;
        if (y > 32767) y = 32767;
        if (y < -32768) y = -32768;
        filt[i] = 16'(y);
        for (int k = 30; k > 0; k--) hist[c][k] = hist[c][k-1];
        hist[c][0] = sub[i];
      end
      seen[c] = 1;
    endfunction
  endclass

  // expected 64-bit hit packet of one channel
  function automatic void hit_packet(input int c, input logic [63:0] ts, input logic [7:0] flags_in,
                                     input hit_t hits[$], input bit send_ped,
                                     input logic [15:0] p0, input logic [15:0] a0,
                                     ref logic [63:0] pkt[$]);
    hit_hdr_t  h;
    ped_word_t pw;
    bit wp = send_ped && hits.size() > 0;
    h = '0;
    h.magic = HDR_MAGIC;
    h.flags[FLAG_PED] = wp;
    h.flags[FLAG_INERR] = flags_in[0];
    h.channel = 8'(c);
    h.n_words = 16'(hits.size() + int'(wp));
    pkt.push_back(h);
    pkt.push_back(ts);
    if (wp) begin
      pw = '0; pw.tag = PED_TAG; pw.pedestal = p0; pw.accum = a0;
      pkt.push_back(pw);
    end
    foreach (hits[i]) pkt.push_back(hits[i]);
  endfunction
endpackage
