// tb_sos_fading_gen: programs random increments, initial phases and gain in
// the quiet part of an update period, then checks every following
// coefficient against a model kept here: one phase accumulator per sinusoid,
// sin() of the top 10 phase bits scaled to 32767 and rounded, the sums times
// the gain, shifted to 14 fractional bits and saturated. Also checks the
// update interval (UPDATE_DIV clocks), a saturating setting, and that the
// coefficient really varies and has a Rayleigh-like mean power.
module tb_sos_fading_gen;
  import winetester_pkg::*;
  localparam int N = 8;
  localparam int UDIV = 64;
  logic clk = 0, rst_n = 0;
  logic cfg_we;
  logic [5:0] cfg_field;
  logic [31:0] cfg_data;
  coef_t h;
  logic h_upd;
  int checks = 0, failures = 0;
  longint unsigned cyc = 0;

  sos_fading_gen #(.N_SIN(N), .UPDATE_DIV(UDIV)) dut (
    .clk(clk), .rst_n(rst_n), .cfg_we(cfg_we), .cfg_field(cfg_field), .cfg_data(cfg_data),
    .h(h), .h_upd(h_upd));

  always #5 clk = ~clk;
  always @(posedge clk) cyc++;

  logic [31:0] m_phase [2*N];
  logic [31:0] m_inc   [2*N];
  logic [15:0] m_gain;

  function automatic longint rsin(logic [31:0] ph);
    int k = int'(ph[31:22]);
    return $rtoi($floor(32767.0 * $sin(2.0 * 3.14159265358979323846 * k / 1024.0) + 0.5));
  endfunction

  function automatic longint sat16(longint v);
    return v > 32767 ? 32767 : v < -32768 ? -32768 : v;
  endfunction

  initial begin
    #20000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic wr(logic [5:0] f, logic [31:0] d);
    cfg_we = 1; cfg_field = f; cfg_data = d;
    @(negedge clk);
    cfg_we = 0;
  endtask

  // Program everything right after an update pulse, in the clocks where no
  // sinusoid is read.
  task automatic load_sinusoids(bit saturating);
    @(posedge clk iff h_upd);
    @(negedge clk);
    for (int n = 0; n < 2 * N; n++) begin
      m_inc[n]   = saturating ? 0 : ($urandom_range(0, 1) ? 32'(30000000 + $urandom_range(0, 2000000))
                                                          : -32'(30000000 + $urandom_range(0, 2000000)));
      m_phase[n] = saturating ? 32'h4000_0000 : $urandom;
      wr(n < N ? F_INC_I + 6'(n) : F_INC_Q + 6'(n - N), m_inc[n]);
      wr(n < N ? F_PHASE_I + 6'(n) : F_PHASE_Q + 6'(n - N), m_phase[n]);
    end
    m_gain = saturating ? 16'hFFFF : 16'd16384;   // 0.25 ~ sqrt(2/N)/2
    wr(F_GAIN, 32'(m_gain));
  endtask

  task automatic check_updates(int n_upd, output real pwr, output int n_changes);
    longint si, sq, ei, eq;
    longint unsigned last;
    coef_t prev;
    pwr = 0; n_changes = 0; last = 0; prev = '0;
    for (int u = 0; u < n_upd; u++) begin
      @(posedge clk iff h_upd);
      #1;
      si = 0; sq = 0;
      for (int n = 0; n < N; n++) begin
        si += rsin(m_phase[n]);
        sq += rsin(m_phase[n + N]);
      end
      ei = sat16((si * longint'(m_gain)) >>> 17);
      eq = sat16((sq * longint'(m_gain)) >>> 17);
      checks++;
      if (longint'(h.i) != ei || longint'(h.q) != eq) begin
        failures++;
        if (failures < 10) $display("update %0d: got %0d,%0d expected %0d,%0d", u, h.i, h.q, ei, eq);
      end
      if (u > 0) begin
        checks++;
        if (cyc - last != UDIV) begin
          failures++;
          $display("update interval %0d, expected %0d", cyc - last, UDIV);
        end
        if (h != prev) n_changes++;
      end
      last = cyc; prev = h;
      pwr += (real'(h.i) ** 2 + real'(h.q) ** 2) / (16384.0 ** 2);
      for (int n = 0; n < 2 * N; n++) m_phase[n] += m_inc[n];
    end
    pwr = pwr / n_upd;
  endtask

  initial begin
    real pwr;
    int nch;
    cfg_we = 0; cfg_field = 0; cfg_data = 0;
    repeat (3) @(negedge clk);
    rst_n = 1;
    // reset state: all-zero coefficient
    @(posedge clk iff h_upd); #1;
    checks++; if (h != '0) failures++;
    load_sinusoids(0);
    check_updates(3000, pwr, nch);
    $display("mean |h|^2 = %f over 3000 updates, %0d changes", pwr, nch);
    // each component is 0.25 * (sum of 8 sinusoids): E|h|^2 = 2 * 0.25^2 * 8 * 1/2 = 0.5
    checks++; if (pwr < 0.3 || pwr > 0.8) begin failures++; $display("mean power out of range"); end
    checks++; if (nch < 2900) begin failures++; $display("coefficient does not vary"); end
    load_sinusoids(1);
    check_updates(5, pwr, nch);
    checks++; if (h.i != 16'sd32767) begin failures++; $display("no saturation"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
