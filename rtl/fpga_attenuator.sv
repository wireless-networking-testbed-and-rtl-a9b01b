// fpga_attenuator: digital attenuation of one output, 0 to 69 dB in 0.1 dB
// steps, and conversion to the DAC word width.
//
// The attenuation code (0.1 dB units) selects a linear gain from a table
// computed at elaboration, round(2^15 * 10^(-code/200)), unsigned Q1.15. The
// channel sum (COEF_FRAC fractional bits over the 12-bit input scale) is
// multiplied by it and shifted so that 0 dB maps a full-scale 12-bit input
// to a full-scale 16-bit DAC word; the result saturates. The range and step
// are the document's; the table, scaling, truncation and saturation are this
// design's. Codes above 690 act as 690.
//
// Timing: the gain is looked up into a register (one clock after a code
// change); dout is registered, one clock after din.
module fpga_attenuator
  import winetester_pkg::*;
#(
  parameter int IN_W      = PROD_W + 3,
  parameter int ATTEN_STEPS = ATTEN_MAX + 1,
  localparam int LIN_W    = 17
) (
  input  logic                   clk,
  input  logic                   rst_n,
  input  logic signed [IN_W-1:0] din_i,
  input  logic signed [IN_W-1:0] din_q,
  input  logic [9:0]             atten,   // 0.1 dB units
  output dac_iq_t                dout,
  output logic                   sat      // a saturation happened this clock
);
  localparam int SHIFT = COEF_FRAC + 15 - (DAC_W - ADC_W);
  localparam int MUL_W = IN_W + LIN_W + 1;
  typedef logic [LIN_W-1:0] lin_table_t [ATTEN_STEPS];

  function automatic lin_table_t make_table();
    lin_table_t t;
    for (int c = 0; c < ATTEN_STEPS; c++)
      t[c] = LIN_W'($rtoi($floor(32768.0 * $pow(10.0, -real'(c) / 200.0) + 0.5)));
    return t;
  endfunction

  localparam lin_table_t LIN = make_table();

  logic [LIN_W-1:0]        lin;
  logic signed [MUL_W-1:0] mi, mq, si, sq;
  logic                    sat_i, sat_q;
  localparam logic signed [MUL_W-1:0] MAXV = MUL_W'((2 ** (DAC_W - 1)) - 1);
  localparam logic signed [MUL_W-1:0] MINV = -MUL_W'(2 ** (DAC_W - 1));

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) lin <= '0;
    else        lin <= (32'(atten) >= ATTEN_STEPS) ? LIN[ATTEN_STEPS-1] : LIN[atten];
  end

  always_comb begin
    mi = MUL_W'(din_i) * $signed({1'b0, lin});
    mq = MUL_W'(din_q) * $signed({1'b0, lin});
    si = mi >>> SHIFT;
    sq = mq >>> SHIFT;
    sat_i = (si > MAXV) || (si < MINV);
    sat_q = (sq > MAXV) || (sq < MINV);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      dout <= '0;
      sat  <= 1'b0;
    end else begin
      dout.i <= (si > MAXV) ? MAXV[DAC_W-1:0] : (si < MINV) ? MINV[DAC_W-1:0] : si[DAC_W-1:0];
      dout.q <= (sq > MAXV) ? MAXV[DAC_W-1:0] : (sq < MINV) ? MINV[DAC_W-1:0] : sq[DAC_W-1:0];
      sat    <= sat_i || sat_q;
    end
  end
endmodule
