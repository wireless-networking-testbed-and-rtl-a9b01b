// complex_tap_mult: scales one delayed I/Q sample by its tap's complex fading
// coefficient (the multiplier that follows each delay unit).
//
//   y.i = x.i*h.i - x.q*h.q,   y.q = x.i*h.q + x.q*h.i
//
// The product is kept at full precision (COEF_FRAC fractional bits relative to
// the input sample); rounding is left to the output stage. Widths and the
// single register stage are this design's choice.
// Timing: y is registered, one clock after x and h.
module complex_tap_mult
  import winetester_pkg::*;
(
  input  logic    clk,
  input  logic    rst_n,
  input  adc_iq_t x,
  input  coef_t   h,
  output prod_t   y
);
  logic signed [ADC_W+COEF_W-1:0] ii, qq, iq, qi;

  always_comb begin
    ii = x.i * h.i;
    qq = x.q * h.q;
    iq = x.i * h.q;
    qi = x.q * h.i;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      y <= '0;
    end else begin
      y.i <= PROD_W'(ii) - PROD_W'(qq);
      y.q <= PROD_W'(iq) + PROD_W'(qi);
    end
  end
endmodule
