// winetester_site: the FPGA channel-emulation datapath of one DSP site.
//
// A site carries two RF boards. Each board digitizes the signal of one
// transmitting device (12-bit I/Q from its ADC pair) and has three
// up-conversion chains (16-bit I/Q DACs), each cabled to a different
// receiving device. The FPGA copies each input to the three outputs of its
// board and gives every output its own multipath fading channel, so the
// site emulates six independent one-way links:
//
//   adc_in[k] -> multi_tap_channel (7 taps) -> fpga_attenuator -> iq_corrector
//             -> dac_out[o],   o = 3k .. 3k+2
//
// The site processor configures everything through cfg (site_regs; address
// map in winetester_pkg). The control words of the RF boards' analog step
// attenuators (dsa_code per input, tx_att_code per output) are brought out as
// ports. Counts of inputs, outputs, taps and maximum delay are the document's;
// pairing each input with the outputs of its own board is this design's
// choice.
//
// Timing: one sample per clock on every port. With tap delay L', a sample
// reaches dac_out 5 + L' clocks after it enters adc_in (delay line 1,
// multiplier 1, tap sum 1, attenuator 1, I/Q correction 1).
module winetester_site
  import winetester_pkg::*;
#(
  parameter int N_IN         = 2,
  parameter int N_OUT_PER_IN = 3,
  parameter int N_TAPS       = 7,
  parameter int MAX_DELAY    = 1024,
  parameter int N_SIN        = 8,
  parameter int UPDATE_DIV   = 32,
  localparam int N_OUT       = N_IN * N_OUT_PER_IN
) (
  input  logic       clk,
  input  logic       rst_n,
  input  cfg_wr_t    cfg,
  input  adc_iq_t    adc_in      [N_IN],
  output dac_iq_t    dac_out     [N_OUT],
  output logic [6:0] dsa_code    [N_IN],
  output logic [4:0] tx_att_code [N_OUT],
  output logic [N_OUT-1:0] sat,        // an output saturated this clock
  output logic [N_OUT-1:0] coef_upd    // an output's fading coefficients changed
);
  localparam int SUM_W = PROD_W + $clog2(N_TAPS);

  logic [N_OUT-1:0] tap_we;
  logic [2:0]       tap_idx;
  logic [5:0]       tap_field;
  logic [31:0]      tap_data;
  logic [9:0]       atten [N_OUT];
  iqcorr_t          corr  [N_OUT];

  site_regs #(.N_IN(N_IN), .N_OUT(N_OUT)) u_regs (
    .clk(clk), .rst_n(rst_n), .cfg(cfg),
    .tap_we(tap_we), .tap_idx(tap_idx), .tap_field(tap_field), .tap_data(tap_data),
    .atten(atten), .corr(corr), .tx_att(tx_att_code), .dsa(dsa_code)
  );

  for (genvar o = 0; o < N_OUT; o++) begin : g_out
    logic signed [SUM_W-1:0] ch_i, ch_q;
    dac_iq_t                 att_out;
    logic                    sat_att, sat_iq;

    multi_tap_channel #(
      .N_TAPS(N_TAPS), .MAX_DELAY(MAX_DELAY), .N_SIN(N_SIN), .UPDATE_DIV(UPDATE_DIV)
    ) u_channel (
      .clk(clk), .rst_n(rst_n), .din(adc_in[o / N_OUT_PER_IN]),
      .cfg_we(tap_we[o]), .cfg_tap(tap_idx), .cfg_field(tap_field), .cfg_data(tap_data),
      .dout_i(ch_i), .dout_q(ch_q), .coef_upd(coef_upd[o])
    );

    fpga_attenuator #(.IN_W(SUM_W)) u_atten (
      .clk(clk), .rst_n(rst_n), .din_i(ch_i), .din_q(ch_q), .atten(atten[o]),
      .dout(att_out), .sat(sat_att)
    );

    iq_corrector u_iq (
      .clk(clk), .rst_n(rst_n), .din(att_out), .corr(corr[o]), .dout(dac_out[o]), .sat(sat_iq)
    );

    assign sat[o] = sat_att || sat_iq;
  end
endmodule
