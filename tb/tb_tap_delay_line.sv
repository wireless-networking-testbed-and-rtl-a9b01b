// tb_tap_delay_line: drives a random sample every clock and checks that the
// output equals the input of 1 + L' clocks earlier, for several delays
// including 0 (bypass), 1, a delay that does not divide the RAM and the
// largest, L' = 1023 (1024 clocks in all). Also shortens the delay while
// running and checks the output after the buffer has refilled.
module tb_tap_delay_line;
  localparam int MAXD = 1024;
  logic clk = 0, rst_n = 0;
  logic [23:0] din, dout;
  logic [9:0]  delay;
  int checks = 0, failures = 0;
  logic [23:0] hist [$];

  tap_delay_line dut (.clk(clk), .rst_n(rst_n), .din(din), .delay(delay), .dout(dout));

  always #5 clk = ~clk;

  initial begin
    #2000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // history: hist[0] is the sample driven in the previous clock
  always @(posedge clk) begin
    hist.push_front(din);
    if (hist.size() > MAXD + 8) void'(hist.pop_back());
  end

  task automatic run_delay(int d, int n_check);
    delay = 10'(d);
    repeat (d + 4) begin
      @(negedge clk); din = 24'($urandom);
    end
    for (int k = 0; k < n_check; k++) begin
      @(negedge clk);
      // dout now = din of 1+d clocks ago = hist[d] (hist[0] = one clock ago)
      checks++;
      if (dout != hist[d]) begin
        failures++;
        if (failures < 10) $display("delay %0d: got %h expected %h", d, dout, hist[d]);
      end
      din = 24'($urandom);
    end
  endtask

  initial begin
    din = 0; delay = 0;
    repeat (3) @(negedge clk);
    rst_n = 1;
    run_delay(0, 50);
    run_delay(1, 50);
    run_delay(6, 50);
    run_delay(310, 400);
    run_delay(1023, 2100);
    run_delay(31, 100);      // shorter than the running write address
    run_delay(2, 20);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
