// sos_fading_gen: complex fading coefficient rho(t)phi(t) of one tap, made as a
// sum of sinusoids.
//
//   h.i = g * sum_n sin(theta_I[n]),   h.q = g * sum_n sin(theta_Q[n])
//
// Each of the 2*N_SIN sinusoids has a phase accumulator theta advanced by its
// own increment once per update, so its frequency is
// inc / 2^PHASE_W * f_clk / UPDATE_DIV. The site processor writes the
// increments and initial phases; giving every sinusoid a small random offset in
// frequency and initial phase (the phase-frequency-dithered sum of sinusoids)
// makes the coefficients of different taps and outputs statistically
// independent. Choosing those values is left to software.
//
// The document says only that the coefficient is generated by a sum of
// sinusoids with one block RAM per Rayleigh channel at an optimized bit width
// and update rate. This design's own choices: the sinusoids are evaluated one
// per clock through a single shared sine table (sine_rom), a new coefficient
// is produced every UPDATE_DIV clocks and held in between, and the tap gain g
// (unsigned Q0.16, carrying both the tap's path gain and the 1/sqrt(N)
// normalisation) is applied here.
//
// Configuration: cfg_we with cfg_field (see winetester_pkg) and cfg_data.
// A phase write takes effect at once and has priority over the advance.
// Timing: h changes, and h_upd pulses for one clock, every UPDATE_DIV clocks;
// the value uses the phases as they were at the start of that update period.
module sos_fading_gen
  import winetester_pkg::*;
#(
  parameter int N_SIN      = 8,     // sinusoids per quadrature component
  parameter int PHASE_W    = 32,
  parameter int ROM_AW     = 10,
  parameter int UPDATE_DIV = 32     // clocks per coefficient update
) (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        cfg_we,
  input  logic [5:0]  cfg_field,
  input  logic [31:0] cfg_data,
  output coef_t       h,
  output logic        h_upd
);
  localparam int NS     = 2 * N_SIN;
  localparam int ROM_DW = 16;
  localparam int ACC_W  = ROM_DW + $clog2(N_SIN) + 1;
  localparam int CW     = $clog2(UPDATE_DIV);
  localparam int SHIFT  = (ROM_DW - 1) + 16 - COEF_FRAC;
  localparam int MUL_W  = ACC_W + 17;

  logic [PHASE_W-1:0] phase [NS];
  logic [PHASE_W-1:0] inc   [NS];
  logic [15:0]        gain;
  logic [CW-1:0]      cnt;
  logic [ROM_AW-1:0]  rom_addr;
  logic signed [ROM_DW-1:0] rom_data;
  logic               rd_v, rd_q;
  logic signed [ACC_W-1:0]  acc_i, acc_q;
  logic signed [MUL_W-1:0]  mul_i, mul_q;

  sine_rom #(.ADDR_W(ROM_AW), .DATA_W(ROM_DW)) u_rom (
    .clk (clk), .addr(rom_addr), .data(rom_data)
  );

  function automatic logic signed [COEF_W-1:0] sat_coef(input logic signed [MUL_W-1:0] v);
    logic signed [MUL_W-1:0] s;
    s = v >>> SHIFT;
    if (s > MUL_W'((2 ** (COEF_W - 1)) - 1))  return {1'b0, {(COEF_W-1){1'b1}}};
    if (s < -MUL_W'(2 ** (COEF_W - 1)))       return {1'b1, {(COEF_W-1){1'b0}}};
    return s[COEF_W-1:0];
  endfunction

  always_comb begin
    rom_addr = '0;
    if (32'(cnt) < NS) rom_addr = phase[cnt[$clog2(NS)-1:0]][PHASE_W-1 -: ROM_AW];
    mul_i = MUL_W'(acc_i) * $signed({1'b0, gain});
    mul_q = MUL_W'(acc_q) * $signed({1'b0, gain});
  end

  // Update sequencer
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      cnt   <= '0;
      rd_v  <= 1'b0;
      rd_q  <= 1'b0;
      acc_i <= '0;
      acc_q <= '0;
      h     <= '0;
      h_upd <= 1'b0;
    end else begin
      cnt   <= (32'(cnt) == UPDATE_DIV - 1) ? '0 : cnt + CW'(1);
      rd_v  <= 32'(cnt) < NS;
      rd_q  <= 32'(cnt) >= N_SIN;
      h_upd <= 1'b0;
      if (cnt == '0) begin
        acc_i <= '0;
        acc_q <= '0;
      end else if (rd_v) begin
        if (rd_q) acc_q <= acc_q + ACC_W'(rom_data);
        else      acc_i <= acc_i + ACC_W'(rom_data);
      end
      if (32'(cnt) == NS + 1) begin
        h.i   <= sat_coef(mul_i);
        h.q   <= sat_coef(mul_q);
        h_upd <= 1'b1;
      end
    end
  end

  // Sinusoid state: configuration writes, then the per-update advance
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int n = 0; n < NS; n++) begin
        phase[n] <= '0;
        inc[n]   <= '0;
      end
      gain <= '0;
    end else begin
      for (int n = 0; n < NS; n++) begin
        if (cfg_we && 32'(cfg_field) == 32'(F_PHASE_I) + (n < N_SIN ? n : n - N_SIN + 8))
          phase[n] <= PHASE_W'(cfg_data);
        else if (32'(cnt) == n)
          phase[n] <= phase[n] + inc[n];
        if (cfg_we && 32'(cfg_field) == 32'(F_INC_I) + (n < N_SIN ? n : n - N_SIN + 8))
          inc[n] <= PHASE_W'(cfg_data);
      end
      if (cfg_we && cfg_field == F_GAIN) gain <= cfg_data[15:0];
    end
  end

  initial begin
    assert (N_SIN >= 1 && N_SIN <= 8) else $fatal(1, "N_SIN must be 1..8 for the field map");
    assert (UPDATE_DIV >= NS + 2) else $fatal(1, "UPDATE_DIV too small for N_SIN");
  end
endmodule
