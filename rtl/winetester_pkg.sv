// winetester_pkg: types, widths and the register address map shared by the
// channel-emulation datapath of a DSP site.
//
// The datapath carries complex baseband samples as I/Q pairs. Samples enter at
// the ADC resolution (12 bits, as on the RF board) and leave at the DAC
// resolution (16 bits). Fading coefficients are signed fixed-point numbers with
// COEF_FRAC fractional bits (this design's choice: 16 bits, range +/-2).
//
// Register address map (16-bit word address, 32-bit data), this design's own:
//   addr[15:13] = output index 0..5, or 7 for site-wide registers
//   addr[12:10] = tap index 0..6, or 7 for the output's own registers
//   addr[5:0]   = field
// Tap fields:     0 delay L' (samples), 1 tap gain (unsigned Q0.16),
//                 16+n phase increment of sinusoid n of the I sum,
//                 24+n phase increment of sinusoid n of the Q sum,
//                 32+n / 40+n initial phase of sinusoid n of the I / Q sum.
// Output fields:  0 FPGA attenuation (0.1 dB units, 0..690), 1 I gain,
//                 2 Q gain, 3 phase (Q-from-I) term, 4 I DC offset,
//                 5 Q DC offset, 6 analog output attenuator code (dB, 0..28).
// Site fields:    0+k input k's step attenuator code (dB, 0..64).
package winetester_pkg;

  localparam int ADC_W     = 12;   // RF board ADC resolution
  localparam int DAC_W     = 16;   // RF board DAC resolution
  localparam int COEF_W    = 16;   // fading coefficient width
  localparam int COEF_FRAC = 14;   // fractional bits of a fading coefficient
  localparam int PROD_W    = ADC_W + COEF_W + 1;  // one tap's complex product
  localparam int CFG_AW    = 16;
  localparam int CFG_DW    = 32;

  // Field codes
  localparam logic [5:0] F_DELAY    = 6'd0;
  localparam logic [5:0] F_GAIN     = 6'd1;
  localparam logic [5:0] F_INC_I    = 6'd16;
  localparam logic [5:0] F_INC_Q    = 6'd24;
  localparam logic [5:0] F_PHASE_I  = 6'd32;
  localparam logic [5:0] F_PHASE_Q  = 6'd40;

  localparam logic [5:0] O_ATTEN    = 6'd0;
  localparam logic [5:0] O_GAIN_I   = 6'd1;
  localparam logic [5:0] O_GAIN_Q   = 6'd2;
  localparam logic [5:0] O_PHASE    = 6'd3;
  localparam logic [5:0] O_DC_I     = 6'd4;
  localparam logic [5:0] O_DC_Q     = 6'd5;
  localparam logic [5:0] O_TX_ATT   = 6'd6;

  localparam logic [2:0] SITE_SEL   = 3'd7;  // addr[15:13] of site registers
  localparam logic [2:0] OUT_REGS   = 3'd7;  // addr[12:10] of output registers

  localparam int ATTEN_MAX   = 690;  // 69 dB in 0.1 dB steps
  localparam int DSA_MAX     = 64;   // input step attenuator, 1 dB steps
  localparam int TX_ATT_MAX  = 28;   // output attenuator, 1 dB steps

  typedef struct packed {
    logic signed [ADC_W-1:0] i;
    logic signed [ADC_W-1:0] q;
  } adc_iq_t;

  typedef struct packed {
    logic signed [DAC_W-1:0] i;
    logic signed [DAC_W-1:0] q;
  } dac_iq_t;

  typedef struct packed {
    logic signed [COEF_W-1:0] i;
    logic signed [COEF_W-1:0] q;
  } coef_t;

  typedef struct packed {
    logic signed [PROD_W-1:0] i;
    logic signed [PROD_W-1:0] q;
  } prod_t;

  // One register write from the site processor
  typedef struct packed {
    logic              we;
    logic [CFG_AW-1:0] addr;
    logic [CFG_DW-1:0] data;
  } cfg_wr_t;

  // Per-output I/Q correction settings
  typedef struct packed {
    logic signed [15:0] gain_i;   // Q2.14, 16384 = 1.0
    logic signed [15:0] gain_q;   // Q2.14
    logic signed [15:0] phase;    // Q2.14, amount of I added to Q
    logic signed [15:0] dc_i;     // DAC LSBs
    logic signed [15:0] dc_q;     // DAC LSBs
  } iqcorr_t;

endpackage
