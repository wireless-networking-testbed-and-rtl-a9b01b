// tb_sine_rom: reads every word of the sine table and compares it with
// round(32767*sin(2*pi*k/1024)) computed here; checks the one-clock read
// latency by comparing each word on the clock after its address.
module tb_sine_rom;
  logic clk = 0;
  logic [9:0] addr;
  logic signed [15:0] data;
  int checks = 0, failures = 0;

  sine_rom dut (.clk(clk), .addr(addr), .data(data));

  always #5 clk = ~clk;

  function automatic int ref_sin(int k);
    return $rtoi($floor(32767.0 * $sin(2.0 * 3.14159265358979323846 * k / 1024.0) + 0.5));
  endfunction

  initial begin
    #200000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    addr = 0;
    @(negedge clk);
    for (int k = 0; k < 1024; k++) begin
      addr = 10'(k);
      @(negedge clk);
      checks++;
      if (int'(data) != ref_sin(k)) begin
        failures++;
        if (failures < 10) $display("addr %0d: got %0d expected %0d", k, data, ref_sin(k));
      end
    end
    // spot values
    addr = 10'd256; @(negedge clk); checks++; if (data != 16'sd32767) failures++;
    addr = 10'd768; @(negedge clk); checks++; if (data != -16'sd32767) failures++;
    addr = 10'd0;   @(negedge clk); checks++; if (data != 16'sd0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
