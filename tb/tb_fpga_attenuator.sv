// tb_fpga_attenuator: for codes 0 .. 690 (and beyond, which must act as 690)
// checks the attenuated 16-bit output of random channel sums against
// gain = round(2^15 * 10^(-code/200)) and out = sat16(x*gain >> 25)
// computed here. Also checks that 0 dB maps a full-scale 12-bit input to a
// full-scale DAC word and that large sums saturate.
module tb_fpga_attenuator;
  import winetester_pkg::*;
  localparam int IN_W = PROD_W + 3;
  logic clk = 0, rst_n = 0;
  logic signed [IN_W-1:0] din_i, din_q;
  logic [9:0] atten;
  dac_iq_t dout;
  logic sat;
  int checks = 0, failures = 0, n_sat = 0;

  fpga_attenuator dut (.clk(clk), .rst_n(rst_n), .din_i(din_i), .din_q(din_q),
                       .atten(atten), .dout(dout), .sat(sat));

  always #5 clk = ~clk;

  function automatic longint s16(longint v);
    return v > 32767 ? 32767 : v < -32768 ? -32768 : v;
  endfunction

  function automatic longint lin(int code);
    int c = code > 690 ? 690 : code;
    return $rtoi($floor(32768.0 * (10.0 ** (-c / 200.0)) + 0.5));
  endfunction

  initial begin
    #2000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(longint xi, longint xq, int code);
    longint ei, eq, g;
    bit esat;
    g = lin(code);
    ei = (xi * g) >>> 25;
    eq = (xq * g) >>> 25;
    esat = (ei != s16(ei)) || (eq != s16(eq));
    din_i = IN_W'(xi); din_q = IN_W'(xq);
    @(negedge clk);
    checks++;
    if (longint'(dout.i) != s16(ei) || longint'(dout.q) != s16(eq) || sat != esat) begin
      failures++;
      if (failures < 10) $display("code %0d x=%0d,%0d got %0d,%0d expected %0d,%0d",
                                  code, xi, xq, dout.i, dout.q, s16(ei), s16(eq));
    end
    if (sat) n_sat++;
  endtask

  initial begin
    din_i = 0; din_q = 0; atten = 0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    // 0 dB: full-scale 12-bit input with a unit coefficient -> full-scale DAC
    atten = 0; @(negedge clk);
    check(2047 * 16384, -2048 * 16384, 0);
    checks++;
    if (dout.i != 16'sd32752 || dout.q != -16'sd32768) failures++;
    for (int code = 0; code < 1024; code += 1) begin
      atten = 10'(code);
      @(negedge clk);             // gain register follows the code
      for (int k = 0; k < 4; k++)
        check(longint'($signed($urandom)) >>> 3, longint'($signed($urandom)) >>> 3, code);
    end
    // saturation at 0 dB
    atten = 0; @(negedge clk);
    check(longint'(8) * 2047 * 16384, -longint'(8) * 2047 * 16384, 0);
    checks++;
    if (n_sat == 0) begin failures++; $display("saturation never exercised"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
