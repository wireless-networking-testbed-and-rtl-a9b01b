// site_regs: register file through which the site processor controls the FPGA
// and the RF boards.
//
// Decodes each register write (address map in winetester_pkg). Writes to a tap
// of an output are steered to that output's channel as a strobe with tap
// index, field and data. Output registers hold the FPGA attenuation, the I/Q
// correction and the control word of the output's analog step attenuator;
// site registers hold the input step attenuator (DSA) code of each RF board.
// Values above a control's range are clamped (690 tenths of a dB, 28 dB,
// 64 dB). The ranges are the document's; the address map, clamping and reset
// values are this design's. At reset every attenuator is at its maximum, so no
// signal passes until software opens a path, and the I/Q correction is the
// identity.
//
// Timing: output, site and I/Q registers update one clock after the write;
// the tap write strobe is combinational, the same clock as the write.
module site_regs
  import winetester_pkg::*;
#(
  parameter int N_IN  = 2,
  parameter int N_OUT = 6
) (
  input  logic        clk,
  input  logic        rst_n,
  input  cfg_wr_t     cfg,
  output logic [N_OUT-1:0] tap_we,
  output logic [2:0]  tap_idx,
  output logic [5:0]  tap_field,
  output logic [31:0] tap_data,
  output logic [9:0]  atten  [N_OUT],
  output iqcorr_t     corr   [N_OUT],
  output logic [4:0]  tx_att [N_OUT],
  output logic [6:0]  dsa    [N_IN]
);
  logic [2:0] sel_out, sel_tap;
  logic [5:0] field;

  always_comb begin
    sel_out   = cfg.addr[15:13];
    sel_tap   = cfg.addr[12:10];
    field     = cfg.addr[5:0];
    tap_idx   = sel_tap;
    tap_field = field;
    tap_data  = cfg.data;
    for (int o = 0; o < N_OUT; o++)
      tap_we[o] = cfg.we && (32'(sel_out) == o) && (sel_tap != OUT_REGS);
  end

  function automatic logic [31:0] clamp(input logic [31:0] v, input int unsigned mx);
    return (v > mx) ? mx : v;
  endfunction

  for (genvar o = 0; o < N_OUT; o++) begin : g_out
    logic out_we;
    assign out_we = cfg.we && (32'(sel_out) == o) && (sel_tap == OUT_REGS);

    always_ff @(posedge clk or negedge rst_n) begin
      if (!rst_n) begin
        atten[o] <= 10'(ATTEN_MAX);
        tx_att[o] <= 5'(TX_ATT_MAX);
        corr[o]  <= '{gain_i: 16'sd16384, gain_q: 16'sd16384, phase: '0, dc_i: '0, dc_q: '0};
      end else if (out_we) begin
        case (field)
          O_ATTEN:  atten[o]       <= 10'(clamp(cfg.data, ATTEN_MAX));
          O_GAIN_I: corr[o].gain_i <= cfg.data[15:0];
          O_GAIN_Q: corr[o].gain_q <= cfg.data[15:0];
          O_PHASE:  corr[o].phase  <= cfg.data[15:0];
          O_DC_I:   corr[o].dc_i   <= cfg.data[15:0];
          O_DC_Q:   corr[o].dc_q   <= cfg.data[15:0];
          O_TX_ATT: tx_att[o]      <= 5'(clamp(cfg.data, TX_ATT_MAX));
          default: ;
        endcase
      end
    end
  end

  for (genvar k = 0; k < N_IN; k++) begin : g_in
    always_ff @(posedge clk or negedge rst_n) begin
      if (!rst_n)
        dsa[k] <= 7'(DSA_MAX);
      else if (cfg.we && sel_out == SITE_SEL && 32'(field) == k)
        dsa[k] <= 7'(clamp(cfg.data, DSA_MAX));
    end
  end

  initial assert (N_OUT <= 7 && N_IN <= 64) else $fatal(1, "address map supports 7 outputs");
endmodule
