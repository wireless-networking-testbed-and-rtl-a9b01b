// tb_iq_corrector: identity setting, random corrections and saturating
// cases against the formula computed here, one clock after the input.
module tb_iq_corrector;
  import winetester_pkg::*;
  logic clk = 0, rst_n = 0;
  dac_iq_t din, dout;
  iqcorr_t corr;
  logic sat;
  int checks = 0, failures = 0, n_sat = 0;

  iq_corrector dut (.clk(clk), .rst_n(rst_n), .din(din), .corr(corr), .dout(dout), .sat(sat));

  always #5 clk = ~clk;

  function automatic longint s16(longint v);
    return v > 32767 ? 32767 : v < -32768 ? -32768 : v;
  endfunction

  initial begin
    #500000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    longint ei, eq, vi, vq;
    bit esat;
    din = '0;
    corr = '{gain_i: 16384, gain_q: 16384, phase: 0, dc_i: 0, dc_q: 0};
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int k = 0; k < 3000; k++) begin
      din = dac_iq_t'($urandom);
      if (k >= 200) begin
        corr.gain_i = 16'(14000 + $urandom_range(0, 5000));
        corr.gain_q = 16'(14000 + $urandom_range(0, 5000));
        corr.phase  = 16'($signed($urandom_range(0, 2000)) - 1000);
        corr.dc_i   = 16'($signed($urandom_range(0, 400)) - 200);
        corr.dc_q   = 16'($signed($urandom_range(0, 400)) - 200);
      end
      vi = ((longint'(corr.gain_i) * longint'(din.i)) >>> 14) + longint'(corr.dc_i);
      vq = ((longint'(corr.gain_q) * longint'(din.q) + longint'(corr.phase) * longint'(din.i)) >>> 14)
           + longint'(corr.dc_q);
      ei = s16(vi); eq = s16(vq);
      esat = (ei != vi) || (eq != vq);
      @(negedge clk);
      checks++;
      if (longint'(dout.i) != ei || longint'(dout.q) != eq || sat != esat) begin
        failures++;
        if (failures < 10) $display("k=%0d got %0d,%0d,%0b expected %0d,%0d,%0b",
                                    k, dout.i, dout.q, sat, ei, eq, esat);
      end
      if (sat) n_sat++;
    end
    checks++;
    if (n_sat == 0) begin failures++; $display("saturation never exercised"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
