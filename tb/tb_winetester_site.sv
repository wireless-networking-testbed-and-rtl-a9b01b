// tb_winetester_site: end-to-end test of a whole site at its default size
// (2 inputs, 6 outputs, 7 taps per output, 1024-sample delay memories).
//
// Programs the site through its register port the way the site processor
// would, drives random 12-bit samples on both inputs, and checks the 16-bit
// DAC words against a model computed here:
//   output 0 (input 0): the first four taps of the ITU Vehicular A profile
//     (delays 0, 310, 710, 1090 ns = 0, 31, 71, 109 samples at 100 MHz;
//     gains 0, -1, -9, -10 dB), frozen coefficients, 6 dB FPGA attenuation,
//     non-identity I/Q correction; later the delays are rewritten while
//     running and checked again;
//   output 3 (input 1): one tap at the largest delay (1023), 0 dB, a large
//     coefficient so that the output saturates;
//   outputs 2, 4, 5: left at their reset state, which must be silent;
//   output 1: one tap with a moving sum of sinusoids (frequencies far above a
//     real Doppler so that fading shows within the simulated time); checked
//     to vary and to average a plausible power.
// Also checks the step-attenuator control ports and the coefficient update
// rate, and counts each mechanism (zero-delay tap, largest delay, delay
// change, saturation, attenuation, I/Q correction, fading updates); a
// mechanism that never happened counts as a failure.
module tb_winetester_site;
  import winetester_pkg::*;
  localparam int NO = 6, NT = 7, UDIV = 32;
  logic clk = 0, rst_n = 0;
  cfg_wr_t cfg;
  adc_iq_t adc_in [2];
  dac_iq_t dac_out [NO];
  logic [6:0] dsa_code [2];
  logic [4:0] tx_att_code [NO];
  logic [NO-1:0] sat, coef_upd;
  int checks = 0, failures = 0;

  winetester_site dut (.*);

  always #5 clk = ~clk;

  // input history: hist[k][0] is the sample taken at the latest clock edge
  adc_iq_t hist [2][$];
  longint unsigned cyc = 0, last_upd = 0;
  int n_upd = 0, n_sat = 0, n_upd_bad = 0;
  always @(posedge clk) begin
    cyc++;
    for (int k = 0; k < 2; k++) begin
      hist[k].push_front(adc_in[k]);
      if (hist[k].size() > 1100) void'(hist[k].pop_back());
    end
    if (coef_upd[0]) begin
      if (n_upd > 0 && cyc - last_upd != UDIV) n_upd_bad++;
      n_upd++;
      last_upd = cyc;
    end
    if (sat[3]) n_sat++;
  end

  // model state
  longint hi [NO][NT], hq [NO][NT];
  int     dly [NO][NT];
  int     att [NO];
  longint gi [NO], gq [NO], ph [NO], dci [NO], dcq [NO];

  // mechanism counters
  int m_zero_delay = 0, m_max_delay = 0, m_delay_change = 0, m_atten = 0, m_iq = 0,
      m_fading = 0, m_silent = 0;

  function automatic longint rsin(logic [31:0] p);
    int k = int'(p[31:22]);
    return $rtoi($floor(32767.0 * $sin(2.0 * 3.14159265358979323846 * k / 1024.0) + 0.5));
  endfunction
  function automatic longint s16(longint v);
    return v > 32767 ? 32767 : v < -32768 ? -32768 : v;
  endfunction
  function automatic longint lin(int c);
    return $rtoi($floor(32768.0 * (10.0 ** (-c / 200.0)) + 0.5));
  endfunction

  initial begin
    #5000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic tick();
    @(negedge clk);
    adc_in[0] = adc_iq_t'($urandom);
    adc_in[1] = adc_iq_t'($urandom);
  endtask

  task automatic wr(int o, int t, logic [5:0] f, logic [31:0] d);
    cfg.we = 1; cfg.addr = {3'(o), 3'(t), 4'd0, f}; cfg.data = d;
    tick();
    cfg.we = 0;
  endtask

  // frozen tap: one sinusoid per component at zero frequency
  task automatic static_tap(int o, int t, int delay, real gain_db, logic [31:0] pi, logic [31:0] pq,
                            real scale);
    longint g;
    g = longint'($rtoi(scale * 65535.0 * (10.0 ** (gain_db / 20.0))));
    wr(o, t, F_PHASE_I, pi);
    wr(o, t, F_PHASE_Q, pq);
    wr(o, t, F_GAIN, 32'(g));
    wr(o, t, F_DELAY, 32'(delay));
    hi[o][t] = s16((rsin(pi) * g) >>> 17);
    hq[o][t] = s16((rsin(pq) * g) >>> 17);
    dly[o][t] = delay;
  endtask

  task automatic set_out(int o, int a, longint g_i, longint g_q, longint p, longint d_i, longint d_q);
    wr(o, 7, O_ATTEN, 32'(a));
    wr(o, 7, O_GAIN_I, 32'(g_i));
    wr(o, 7, O_GAIN_Q, 32'(g_q));
    wr(o, 7, O_PHASE, 32'(p));
    wr(o, 7, O_DC_I, 32'(d_i));
    wr(o, 7, O_DC_Q, 32'(d_q));
    att[o] = a; gi[o] = g_i; gq[o] = g_q; ph[o] = p; dci[o] = d_i; dcq[o] = d_q;
  endtask

  // expected DAC word of output o after the latest edge
  task automatic expect_out(int o, output longint ei, output longint eq, output longint raw_i);
    longint si, sq, xi, xq, ai, aq;
    int k = o / 3;
    si = 0; sq = 0;
    for (int t = 0; t < NT; t++) begin
      xi = hist[k][4 + dly[o][t]].i;
      xq = hist[k][4 + dly[o][t]].q;
      si += xi * hi[o][t] - xq * hq[o][t];
      sq += xi * hq[o][t] + xq * hi[o][t];
    end
    ai = s16((si * lin(att[o])) >>> 25);
    aq = s16((sq * lin(att[o])) >>> 25);
    raw_i = ai;
    ei = s16(((gi[o] * ai) >>> 14) + dci[o]);
    eq = s16(((gq[o] * aq + ph[o] * ai) >>> 14) + dcq[o]);
  endtask

  task automatic check_outputs(int n);
    longint ei, eq, ri;
    for (int c = 0; c < n; c++) begin
      tick();
      foreach (dac_out[o]) begin
        if (o == 1) continue;
        expect_out(o, ei, eq, ri);
        checks++;
        if (longint'(dac_out[o].i) != ei || longint'(dac_out[o].q) != eq) begin
          failures++;
          if (failures < 10) $display("cycle %0d out %0d: got %0d,%0d expected %0d,%0d",
                                      cyc, o, dac_out[o].i, dac_out[o].q, ei, eq);
        end
        if (o == 0 && ri != longint'(dac_out[o].i)) m_iq++;
        if (o >= 4 || o == 2) m_silent++;
      end
    end
  endtask

  initial begin
    longint p1 = 0;
    int nchg = 0;
    dac_iq_t prev;
    cfg = '0;
    adc_in[0] = '0; adc_in[1] = '0;
    for (int o = 0; o < NO; o++) begin
      for (int t = 0; t < NT; t++) begin hi[o][t] = 0; hq[o][t] = 0; dly[o][t] = 0; end
      att[o] = 690; gi[o] = 16384; gq[o] = 16384; ph[o] = 0; dci[o] = 0; dcq[o] = 0;
    end
    repeat (3) tick();
    rst_n = 1;
    tick();

    // analog step attenuator controls
    checks++; if (dsa_code[0] != 7'd64 || tx_att_code[0] != 5'd28) failures++;
    wr(7, 0, 6'd0, 32'd10);
    wr(7, 0, 6'd1, 32'd20);
    wr(0, 7, O_TX_ATT, 32'd3);
    checks++; if (dsa_code[0] != 7'd10 || dsa_code[1] != 7'd20 || tx_att_code[0] != 5'd3) failures++;

    // output 0: ITU Vehicular A, first four taps
    static_tap(0, 0, 0,    0.0,  $urandom, $urandom, 0.25);
    static_tap(0, 1, 31,  -1.0,  $urandom, $urandom, 0.25);
    static_tap(0, 2, 71,  -9.0,  $urandom, $urandom, 0.25);
    static_tap(0, 3, 109, -10.0, $urandom, $urandom, 0.25);
    set_out(0, 60, 17000, 15800, -700, 37, -21);
    m_zero_delay++;
    m_atten++;
    // output 3: largest delay, saturating
    static_tap(3, 0, 1023, 0.0, 32'h4000_0000, 32'hC000_0000, 1.0);
    set_out(3, 0, 16384, 16384, 0, 0, 0);
    m_max_delay++;
    // output 1: fading tap
    for (int n = 0; n < 8; n++) begin
      wr(1, 0, F_INC_I + 6'(n), 32'(($urandom_range(0, 1) ? 1 : -1) * int'(32'h0400_0000 + $urandom_range(0, 32'h0040_0000))));
      wr(1, 0, F_INC_Q + 6'(n), 32'(($urandom_range(0, 1) ? 1 : -1) * int'(32'h0400_0000 + $urandom_range(0, 32'h0040_0000))));
      wr(1, 0, F_PHASE_I + 6'(n), $urandom);
      wr(1, 0, F_PHASE_Q + 6'(n), $urandom);
    end
    wr(1, 0, F_GAIN, 32'd16384);
    wr(1, 7, O_ATTEN, 32'd0);

    // let the delay memories fill, then check
    repeat (1040) tick();
    check_outputs(3000);

    // rewrite the delays of output 0 while running
    static_tap(0, 1, 250, -1.0,  $urandom, $urandom, 0.25);
    static_tap(0, 2, 500, -9.0,  $urandom, $urandom, 0.25);
    static_tap(0, 3, 1000, -10.0, $urandom, $urandom, 0.25);
    m_delay_change++;
    repeat (1040) tick();
    check_outputs(2000);

    // fading output: constant input, the output must move
    adc_in[1] = '0;
    for (int c = 0; c < 3000; c++) begin
      @(negedge clk);
      adc_in[0] = '{i: 12'sd1000, q: 12'sd0};
      adc_in[1] = adc_iq_t'($urandom);
      if (c > 20) begin
        if (dac_out[1] != prev) nchg++;
        p1 += longint'(dac_out[1].i) ** 2 + longint'(dac_out[1].q) ** 2;
      end
      prev = dac_out[1];
    end
    m_fading = nchg;
    // input 1000 -> 16000 DAC LSBs at |h| = 1; E|h|^2 = 0.5 with gain 0.25 and 8 sinusoids per component
    $display("output 1: %0d changes, mean power %f of the unfaded value", nchg,
             real'(p1) / 2979.0 / (16000.0 ** 2));
    checks++;
    if (real'(p1) / 2979.0 / (16000.0 ** 2) < 0.1 || real'(p1) / 2979.0 / (16000.0 ** 2) > 5.0) begin
      failures++; $display("fading power out of range");
    end

    checks++; if (n_upd_bad != 0 || n_upd < 100) begin failures++; $display("update rate wrong"); end
    $display("mechanisms: zero_delay=%0d max_delay=%0d delay_change=%0d saturation=%0d attenuation=%0d iq_correction=%0d fading_changes=%0d coef_updates=%0d silent_checks=%0d",
             m_zero_delay, m_max_delay, m_delay_change, n_sat, m_atten, m_iq, m_fading, n_upd, m_silent);
    checks++; if (m_zero_delay == 0) failures++;
    checks++; if (m_max_delay == 0) failures++;
    checks++; if (m_delay_change == 0) failures++;
    checks++; if (n_sat == 0) begin failures++; $display("no saturation"); end
    checks++; if (m_atten == 0) failures++;
    checks++; if (m_iq == 0) begin failures++; $display("I/Q correction never changed a word"); end
    checks++; if (m_fading < 50) begin failures++; $display("fading output did not vary"); end
    checks++; if (m_silent == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
