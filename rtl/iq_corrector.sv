// iq_corrector: pre-correction of one up-conversion chain's I/Q mismatch.
//
// A quadrature modulator whose I and Q paths differ in DC offset, gain or
// phase leaks LO and produces an image sideband. The document states that gain
// and phase are adjusted in the FPGA; this block applies
//
//   out.i = gain_i*in.i / 2^14 + dc_i
//   out.q = (gain_q*in.q + phase*in.i) / 2^14 + dc_q
//
// with Q2.14 coefficients, the phase term adding a fraction of I into Q to
// skew the axes, and the result saturated to the DAC width. The formula and
// number formats are this design's; the calibration values come from
// software. Timing: registered, one clock after din.
module iq_corrector
  import winetester_pkg::*;
(
  input  logic    clk,
  input  logic    rst_n,
  input  dac_iq_t din,
  input  iqcorr_t corr,
  output dac_iq_t dout,
  output logic    sat
);
  localparam int W = 2 * DAC_W + 3;
  localparam logic signed [W-1:0] MAXV = W'((2 ** (DAC_W - 1)) - 1);
  localparam logic signed [W-1:0] MINV = -W'(2 ** (DAC_W - 1));

  logic signed [W-1:0] vi, vq;

  always_comb begin
    vi = ((W'(corr.gain_i) * W'(din.i)) >>> 14) + W'(corr.dc_i);
    vq = ((W'(corr.gain_q) * W'(din.q) + W'(corr.phase) * W'(din.i)) >>> 14) + W'(corr.dc_q);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      dout <= '0;
      sat  <= 1'b0;
    end else begin
      dout.i <= (vi > MAXV) ? MAXV[DAC_W-1:0] : (vi < MINV) ? MINV[DAC_W-1:0] : vi[DAC_W-1:0];
      dout.q <= (vq > MAXV) ? MAXV[DAC_W-1:0] : (vq < MINV) ? MINV[DAC_W-1:0] : vq[DAC_W-1:0];
      sat    <= (vi > MAXV) || (vi < MINV) || (vq > MAXV) || (vq < MINV);
    end
  end
endmodule
