// tb_site_regs: checks the reset values, every output and site register of
// every output and input (including clamping of out-of-range values), that
// tap writes raise only the addressed output's strobe with the right tap,
// field and data, and that output-register writes raise no tap strobe.
module tb_site_regs;
  import winetester_pkg::*;
  localparam int NI = 2, NO = 6;
  logic clk = 0, rst_n = 0;
  cfg_wr_t cfg;
  logic [NO-1:0] tap_we;
  logic [2:0] tap_idx;
  logic [5:0] tap_field;
  logic [31:0] tap_data;
  logic [9:0] atten [NO];
  iqcorr_t corr [NO];
  logic [4:0] tx_att [NO];
  logic [6:0] dsa [NI];
  int checks = 0, failures = 0;

  site_regs #(.N_IN(NI), .N_OUT(NO)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic chk(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  task automatic wr(int o, int t, logic [5:0] f, logic [31:0] d);
    cfg.we = 1; cfg.addr = {3'(o), 3'(t), 4'd0, f}; cfg.data = d;
    #1;
    if (t != 7 && o < NO) begin
      chk(tap_we == NO'(1) << o, "tap strobe");
      chk(tap_idx == 3'(t) && tap_field == f && tap_data == d, "tap fields");
    end else begin
      chk(tap_we == '0, "no tap strobe");
    end
    @(negedge clk);
    cfg.we = 0;
  endtask

  initial begin
    int v;
    cfg = '0;
    repeat (2) @(negedge clk);
    for (int o = 0; o < NO; o++) begin
      chk(atten[o] == 10'd690 && tx_att[o] == 5'd28, "reset attenuation");
      chk(corr[o].gain_i == 16384 && corr[o].gain_q == 16384 && corr[o].phase == 0 &&
          corr[o].dc_i == 0 && corr[o].dc_q == 0, "reset correction");
    end
    for (int k = 0; k < NI; k++) chk(dsa[k] == 7'd64, "reset dsa");
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int o = 0; o < NO; o++) begin
      for (int t = 0; t < 7; t++) wr(o, t, 6'($urandom_range(0, 47)), $urandom);
      v = $urandom_range(0, 690);
      wr(o, 7, O_ATTEN, 32'(v));       chk(atten[o] == 10'(v), "atten");
      wr(o, 7, O_ATTEN, 32'd5000);     chk(atten[o] == 10'd690, "atten clamp");
      wr(o, 7, O_ATTEN, 32'(v));
      wr(o, 7, O_TX_ATT, 32'd13);      chk(tx_att[o] == 5'd13, "tx att");
      wr(o, 7, O_TX_ATT, 32'd40);      chk(tx_att[o] == 5'd28, "tx att clamp");
      wr(o, 7, O_GAIN_I, 32'(o + 100)); chk(corr[o].gain_i == 16'(o + 100), "gain i");
      wr(o, 7, O_GAIN_Q, 32'(o + 200)); chk(corr[o].gain_q == 16'(o + 200), "gain q");
      wr(o, 7, O_PHASE, 32'(-o - 5));   chk(corr[o].phase == 16'(-o - 5), "phase");
      wr(o, 7, O_DC_I, 32'(o + 300));   chk(corr[o].dc_i == 16'(o + 300), "dc i");
      wr(o, 7, O_DC_Q, 32'(o + 400));   chk(corr[o].dc_q == 16'(o + 400), "dc q");
    end
    // other outputs were not disturbed
    for (int o = 0; o < NO; o++) chk(corr[o].gain_i == 16'(o + 100) && corr[o].dc_q == 16'(o + 400), "isolation");
    wr(7, 0, 6'd0, 32'd17);  chk(dsa[0] == 7'd17 && dsa[1] == 7'd64, "dsa 0");
    wr(7, 0, 6'd1, 32'd99);  chk(dsa[1] == 7'd64 && dsa[0] == 7'd17, "dsa 1 clamp");
    wr(7, 0, 6'd1, 32'd5);   chk(dsa[1] == 7'd5, "dsa 1");
    wr(6, 0, F_DELAY, 32'd3); // address of a missing output: ignored
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
