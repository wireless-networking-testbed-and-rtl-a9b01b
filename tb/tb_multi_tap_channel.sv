// tb_multi_tap_channel: programs all seven taps with random delays (one of
// them 0, one clamped from an out-of-range write to 1023) and constant
// coefficients (one sinusoid per component, zero frequency, random phase and
// gain), drives random samples, and checks every output against
// sum_k h_k * x(t - 3 - L'_k) computed here, with h_k modelled from the
// sine formula. Then reprograms the delays and checks again, and checks that
// coefficient updates come every UPDATE_DIV clocks.
module tb_multi_tap_channel;
  import winetester_pkg::*;
  localparam int NT = 7, MAXD = 1024, UDIV = 32;
  localparam int SUM_W = PROD_W + $clog2(NT);
  logic clk = 0, rst_n = 0;
  adc_iq_t din;
  logic cfg_we;
  logic [2:0] cfg_tap;
  logic [5:0] cfg_field;
  logic [31:0] cfg_data;
  logic signed [SUM_W-1:0] dout_i, dout_q;
  logic coef_upd;
  int checks = 0, failures = 0;
  longint unsigned cyc = 0, last_upd = 0;
  int n_upd = 0;

  multi_tap_channel #(.N_TAPS(NT), .MAX_DELAY(MAXD), .UPDATE_DIV(UDIV)) dut (
    .clk(clk), .rst_n(rst_n), .din(din), .cfg_we(cfg_we), .cfg_tap(cfg_tap),
    .cfg_field(cfg_field), .cfg_data(cfg_data), .dout_i(dout_i), .dout_q(dout_q),
    .coef_upd(coef_upd));

  always #5 clk = ~clk;

  adc_iq_t hist [$];
  always @(posedge clk) begin
    cyc++;
    hist.push_front(din);
    if (hist.size() > MAXD + 8) void'(hist.pop_back());
    if (coef_upd) begin
      if (n_upd > 0) begin
        checks++;
        if (cyc - last_upd != UDIV) failures++;
      end
      n_upd++;
      last_upd = cyc;
    end
  end

  longint hi [NT], hq [NT];
  int     dly [NT];

  function automatic longint rsin(logic [31:0] ph);
    int k = int'(ph[31:22]);
    return $rtoi($floor(32767.0 * $sin(2.0 * 3.14159265358979323846 * k / 1024.0) + 0.5));
  endfunction

  initial begin
    #50000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic wr(int tap, logic [5:0] f, logic [31:0] d);
    cfg_we = 1; cfg_tap = 3'(tap); cfg_field = f; cfg_data = d;
    @(negedge clk);
    cfg_we = 0;
    din = adc_iq_t'($urandom);
  endtask

  task automatic set_delays(int d0, int d1, int d2, int d3, int d4, int d5, int d6);
    int d [NT];
    d = '{d0, d1, d2, d3, d4, d5, d6};
    for (int k = 0; k < NT; k++) begin
      wr(k, F_DELAY, 32'(d[k]));
      dly[k] = d[k] >= MAXD ? MAXD - 1 : d[k];
    end
  endtask

  task automatic run_check(int n);
    longint ei, eq, xi, xq;
    repeat (MAXD + 8) begin @(negedge clk); din = adc_iq_t'($urandom); end
    for (int t = 0; t < n; t++) begin
      @(negedge clk);
      ei = 0; eq = 0;
      for (int k = 0; k < NT; k++) begin
        xi = hist[2 + dly[k]].i; xq = hist[2 + dly[k]].q;
        ei += xi * hi[k] - xq * hq[k];
        eq += xi * hq[k] + xq * hi[k];
      end
      checks++;
      if (longint'(dout_i) != ei || longint'(dout_q) != eq) begin
        failures++;
        if (failures < 10) $display("t=%0d got %0d,%0d expected %0d,%0d", t, dout_i, dout_q, ei, eq);
      end
      din = adc_iq_t'($urandom);
    end
  endtask

  initial begin
    logic [31:0] pi, pq;
    logic [15:0] g;
    din = '0; cfg_we = 0; cfg_tap = 0; cfg_field = 0; cfg_data = 0;
    repeat (3) @(negedge clk);
    rst_n = 1;
    for (int k = 0; k < NT; k++) begin
      pi = $urandom; pq = $urandom; g = 16'($urandom_range(8000, 30000));
      wr(k, F_PHASE_I, pi);
      wr(k, F_PHASE_Q, pq);
      wr(k, F_GAIN, 32'(g));
      hi[k] = (rsin(pi) * longint'(g)) >>> 17;
      hq[k] = (rsin(pq) * longint'(g)) >>> 17;
    end
    set_delays(0, 31, 71, 109, 173, 251, 5000);
    run_check(1500);
    set_delays(3, 0, 1023, 7, 500, 2, 64);
    run_check(1500);
    checks++;
    if (n_upd < 10) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
