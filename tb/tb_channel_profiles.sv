// tb_channel_profiles: runs the channel profiles used to evaluate the
// emulator through a full-size site (default parameters).
//
// Output 0 is programmed in turn with Environment 1 (one tap, 0 dB),
// Environments 2, 3 and 4 (the first 2, 3 and 4 taps of ITU Vehicular A) and
// the full six-tap Vehicular A profile, with tap delays converted at a
// 100 MHz sample clock (0, 31, 71, 109, 173, 251 samples) and the profile's
// tap gains. The coefficients are frozen (zero Doppler) so that every DAC word
// can be checked exactly against a model computed here.
// Output 3 runs one tap at the profile's real Doppler of 184 Hz (16
// sinusoids at 184 Hz times cos of spread arrival angles, dithered) on a
// constant input; over 300,000 clocks (3 ms at 100 MHz, about half a Doppler
// period) its envelope must move by more than 1 dB and its coefficient must
// change many times.
module tb_channel_profiles;
  import winetester_pkg::*;
  localparam int NO = 6, NT = 7;
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

  adc_iq_t hist [$];
  always @(posedge clk) begin
    hist.push_front(adc_in[0]);
    if (hist.size() > 300) void'(hist.pop_back());
  end

  longint hi [NT], hq [NT];
  int dly [NT];
  int att0 = 20;   // 2 dB headroom on output 0

  const int    VA_DELAY_NS [6] = '{0, 310, 710, 1090, 1730, 2510};
  const real   VA_GAIN_DB  [6] = '{0.0, -1.0, -9.0, -10.0, -15.0, -20.0};

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
    #50000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic tick();
    @(negedge clk);
    adc_in[0] = adc_iq_t'($urandom);
  endtask

  task automatic wr(int o, int t, logic [5:0] f, logic [31:0] d);
    cfg.we = 1; cfg.addr = {3'(o), 3'(t), 4'd0, f}; cfg.data = d;
    tick();
    cfg.we = 0;
  endtask

  task automatic load_profile(int n_taps);
    logic [31:0] pi, pq;
    longint g;
    for (int t = 0; t < NT; t++) begin
      if (t < n_taps) begin
        g = longint'($rtoi(16384.0 * (10.0 ** (VA_GAIN_DB[t] / 20.0)) + 0.5));
        dly[t] = (VA_DELAY_NS[t] + 9) / 10;          // ceil(tau * 100 MHz)
        pi = $urandom; pq = $urandom;
      end else begin
        g = 0; dly[t] = 0; pi = 0; pq = 0;
      end
      wr(0, t, F_PHASE_I, pi);
      wr(0, t, F_PHASE_Q, pq);
      wr(0, t, F_GAIN, 32'(g));
      wr(0, t, F_DELAY, 32'(dly[t]));
      // one sinusoid per component, zero frequency: h = rsin(p) * g / 2^17
      hi[t] = s16((rsin(pi) * g) >>> 17);
      hq[t] = s16((rsin(pq) * g) >>> 17);
    end
  endtask

  task automatic check_profile(string name, int n);
    longint si, sq, xi, xq, ei, eq;
    int bad = 0;
    repeat (300) tick();
    for (int c = 0; c < n; c++) begin
      tick();
      si = 0; sq = 0;
      for (int t = 0; t < NT; t++) begin
        xi = hist[4 + dly[t]].i; xq = hist[4 + dly[t]].q;
        si += xi * hi[t] - xq * hq[t];
        sq += xi * hq[t] + xq * hi[t];
      end
      ei = s16((si * lin(att0)) >>> 25);
      eq = s16((sq * lin(att0)) >>> 25);
      checks++;
      if (longint'(dac_out[0].i) != ei || longint'(dac_out[0].q) != eq) begin
        failures++; bad++;
        if (bad < 5) $display("%s: got %0d,%0d expected %0d,%0d", name, dac_out[0].i, dac_out[0].q, ei, eq);
      end
    end
    $display("%s: %0d words checked, %0d wrong", name, n, bad);
  endtask

  initial begin
    real pmin, pmax, p;
    int nchg;
    dac_iq_t prev;
    int inc;
    cfg = '0;
    adc_in[0] = '0;
    adc_in[1] = '{i: 12'sd1000, q: 12'sd0};
    repeat (3) tick();
    rst_n = 1;
    tick();
    wr(0, 7, O_ATTEN, 32'(att0));
    wr(3, 7, O_ATTEN, 32'd0);

    load_profile(1); check_profile("Environment 1", 1000);
    load_profile(2); check_profile("Environment 2", 1000);
    load_profile(3); check_profile("Environment 3", 1000);
    load_profile(4); check_profile("Environment 4", 1000);
    load_profile(6); check_profile("Vehicular A, 6 taps", 1000);

    // 184 Hz Doppler on output 3: inc = 184 * 2^32 * 32 / 100e6 = 252886
    for (int n = 0; n < 8; n++) begin
      inc = $rtoi(252886.0 * $cos(2.0 * 3.14159265358979 * (n + 0.5 + 0.1 * ($urandom_range(0, 10) - 5)) / 32.0));
      wr(3, 0, F_INC_I + 6'(n), 32'(inc + $urandom_range(0, 200) - 100));
      inc = $rtoi(252886.0 * $sin(2.0 * 3.14159265358979 * (n + 0.5 + 0.1 * ($urandom_range(0, 10) - 5)) / 32.0));
      wr(3, 0, F_INC_Q + 6'(n), 32'(inc + $urandom_range(0, 200) - 100));
      wr(3, 0, F_PHASE_I + 6'(n), $urandom);
      wr(3, 0, F_PHASE_Q + 6'(n), $urandom);
    end
    wr(3, 0, F_GAIN, 32'd16384);
    repeat (100) tick();
    pmin = 1.0e30; pmax = 0.0; nchg = 0; prev = dac_out[3];
    for (int c = 0; c < 300000; c++) begin
      @(negedge clk);
      if (dac_out[3] != prev) nchg++;
      prev = dac_out[3];
      if (c % 1000 == 0) begin
        p = real'(dac_out[3].i) ** 2 + real'(dac_out[3].q) ** 2 + 1.0;
        if (p < pmin) pmin = p;
        if (p > pmax) pmax = p;
      end
    end
    $display("184 Hz fading: %0d coefficient changes, envelope range %f dB", nchg,
             10.0 * $log10(pmax / pmin));
    checks++;
    if (nchg < 100) begin failures++; $display("fading coefficient did not move"); end
    checks++;
    if (10.0 * $log10(pmax / pmin) < 1.0) begin failures++; $display("no fading seen"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
