// sine_rom: one-period sine table with a registered read port.
//
// Holds round((2^(DATA_W-1)-1) * sin(2*pi*k / 2^ADDR_W)) for k = 0 .. 2^ADDR_W-1.
// At the default 1024 x 16 bits it is 16 Kbit, one 18 Kbit block RAM: the
// fading generator that owns it uses this single memory for all of its
// sinusoids, which is how one Rayleigh channel costs one block RAM. The table
// size and word width are this design's choice.
//
// Timing: data for addr appears on data one clock later.
module sine_rom #(
  parameter int ADDR_W = 10,
  parameter int DATA_W = 16
) (
  input  logic                     clk,
  input  logic [ADDR_W-1:0]        addr,
  output logic signed [DATA_W-1:0] data
);
  localparam int DEPTH = 2 ** ADDR_W;
  typedef logic signed [DATA_W-1:0] table_t [DEPTH];

  function automatic table_t make_table();
    table_t t;
    real amp, ang;
    amp = real'((2 ** (DATA_W - 1)) - 1);
    for (int k = 0; k < DEPTH; k++) begin
      ang  = 2.0 * 3.14159265358979323846 * real'(k) / real'(DEPTH);
      t[k] = DATA_W'($rtoi($floor(amp * $sin(ang) + 0.5)));
    end
    return t;
  endfunction

  localparam table_t TABLE = make_table();

  always_ff @(posedge clk) data <= TABLE[addr];
endmodule
