// tb_complex_tap_mult: random samples and coefficients, including the extreme
// values, against the complex product computed here with 64-bit integers,
// one clock later.
module tb_complex_tap_mult;
  import winetester_pkg::*;
  logic clk = 0, rst_n = 0;
  adc_iq_t x;
  coef_t   h;
  prod_t   y;
  int checks = 0, failures = 0;

  complex_tap_mult dut (.clk(clk), .rst_n(rst_n), .x(x), .h(h), .y(y));

  always #5 clk = ~clk;

  initial begin
    #200000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    longint xi, xq, hi, hq, ei, eq;
    x = '0; h = '0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int k = 0; k < 2000; k++) begin
      if (k == 0) begin
        x.i = -12'sd2048; x.q = -12'sd2048; h.i = -16'sd32768; h.q = -16'sd32768;
      end else if (k == 1) begin
        x.i = 12'sd2047; x.q = -12'sd2048; h.i = 16'sd32767; h.q = -16'sd32768;
      end else begin
        x = adc_iq_t'($urandom); h = coef_t'($urandom);
      end
      xi = x.i; xq = x.q; hi = h.i; hq = h.q;
      ei = xi * hi - xq * hq;
      eq = xi * hq + xq * hi;
      @(negedge clk);
      checks++;
      if (longint'(y.i) != ei || longint'(y.q) != eq) begin
        failures++;
        if (failures < 10) $display("k=%0d got %0d,%0d expected %0d,%0d", k, y.i, y.q, ei, eq);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
