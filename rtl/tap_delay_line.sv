// tap_delay_line: programmable sample delay of one tap, built on a dual-port RAM.
//
// One sample is written every clock at the write address; the read address
// always leads the write address by one, and each address returns to zero after
// it reaches the programmed delay L'. The RAM therefore acts as a circular
// buffer of L'+1 words and the word read is the one written L' clocks earlier.
// This addressing is the document's; the registered read port (one clock of
// fixed latency, common to every tap) and the bypass for L' = 0 are this
// design's. Locations are not cleared: after reset or a delay change, the first
// L'+1 outputs are stale RAM contents.
//
// Interface: din every clock, delay = L' in 0 .. MAX_DELAY-1.
// Timing: dout(t) = din(t - 1 - L').
module tap_delay_line #(
  parameter int DATA_W    = 24,
  parameter int MAX_DELAY = 1024,                 // RAM depth L
  localparam int AW       = $clog2(MAX_DELAY)
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic [DATA_W-1:0] din,
  input  logic [AW-1:0]     delay,
  output logic [DATA_W-1:0] dout
);
  logic [DATA_W-1:0] ram [MAX_DELAY];
  logic [AW-1:0]     wr_addr, rd_addr, wr_next;

  // Both addresses restart from zero once they reach L'.
  always_comb begin
    wr_next = (wr_addr >= delay) ? '0 : wr_addr + AW'(1);
    rd_addr = wr_next;                            // read leads write by one
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) wr_addr <= '0;
    else        wr_addr <= wr_next;
  end

  always_ff @(posedge clk) begin
    ram[wr_addr] <= din;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)             dout <= '0;
    else if (delay == '0)   dout <= din;
    else                    dout <= ram[rd_addr];
  end
endmodule
