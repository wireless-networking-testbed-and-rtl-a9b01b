// multi_tap_channel: the multipath fading channel of one output.
//
// Every tap takes the same input, delays it by its own programmed number of
// samples (tap_delay_line), multiplies it by its own time-varying complex
// fading coefficient (sos_fading_gen, complex_tap_mult), and the tap outputs
// are added. The structure (N_TAPS = 7 taps, delay units of up to 1024
// samples, one fading coefficient per tap, a final sum) is the document's.
// Register placement, widths and the clamping of delays are this design's.
//
// Configuration: cfg_we writes cfg_data to field cfg_field of tap cfg_tap
// (fields in winetester_pkg). Delay writes above MAX_DELAY-1 are clamped.
// Output: the full-precision sum with COEF_FRAC fractional bits relative to
// the input sample, so a single tap with coefficient 1.0 gives
// dout = din * 2^COEF_FRAC.
// Timing: dout(t) = sum_k h_k * din(t - 3 - L'_k), L'_k the delay of tap k.
// coef_upd pulses when the coefficients change (every UPDATE_DIV clocks).
module multi_tap_channel
  import winetester_pkg::*;
#(
  parameter int N_TAPS     = 7,
  parameter int MAX_DELAY  = 1024,
  parameter int N_SIN      = 8,
  parameter int UPDATE_DIV = 32,
  localparam int SUM_W     = PROD_W + $clog2(N_TAPS),
  localparam int AW        = $clog2(MAX_DELAY)
) (
  input  logic                    clk,
  input  logic                    rst_n,
  input  adc_iq_t                 din,
  input  logic                    cfg_we,
  input  logic [2:0]              cfg_tap,
  input  logic [5:0]              cfg_field,
  input  logic [31:0]             cfg_data,
  output logic signed [SUM_W-1:0] dout_i,
  output logic signed [SUM_W-1:0] dout_q,
  output logic                    coef_upd
);
  logic [AW-1:0] delay   [N_TAPS];
  adc_iq_t       delayed [N_TAPS];
  coef_t         coef    [N_TAPS];
  prod_t         prod    [N_TAPS];
  logic          upd     [N_TAPS];
  logic signed [SUM_W-1:0] sum_i, sum_q;

  for (genvar k = 0; k < N_TAPS; k++) begin : g_tap
    logic tap_we;
    assign tap_we = cfg_we && (32'(cfg_tap) == k);

    always_ff @(posedge clk or negedge rst_n) begin
      if (!rst_n) delay[k] <= '0;
      else if (tap_we && cfg_field == F_DELAY)
        delay[k] <= (cfg_data >= 32'(MAX_DELAY)) ? AW'(MAX_DELAY - 1) : cfg_data[AW-1:0];
    end

    tap_delay_line #(.DATA_W(2 * ADC_W), .MAX_DELAY(MAX_DELAY)) u_delay (
      .clk (clk), .rst_n(rst_n), .din(din), .delay(delay[k]), .dout(delayed[k])
    );

    sos_fading_gen #(.N_SIN(N_SIN), .UPDATE_DIV(UPDATE_DIV)) u_fading (
      .clk (clk), .rst_n(rst_n),
      .cfg_we(tap_we), .cfg_field(cfg_field), .cfg_data(cfg_data),
      .h(coef[k]), .h_upd(upd[k])
    );

    complex_tap_mult u_mult (
      .clk(clk), .rst_n(rst_n), .x(delayed[k]), .h(coef[k]), .y(prod[k])
    );
  end

  always_comb begin
    sum_i = '0;
    sum_q = '0;
    for (int k = 0; k < N_TAPS; k++) begin
      sum_i += SUM_W'(prod[k].i);
      sum_q += SUM_W'(prod[k].q);
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      dout_i <= '0;
      dout_q <= '0;
    end else begin
      dout_i <= sum_i;
      dout_q <= sum_q;
    end
  end

  assign coef_upd = upd[0];
endmodule
