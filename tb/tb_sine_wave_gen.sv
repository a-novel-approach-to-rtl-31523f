// tb_sine_wave_gen: end-to-end test of the sine wave generator at its default
// size (32 points, full scale 255, 8-bit output, 10 ns clock).
//
// After reset the output must run through the 32-sample reference table,
// starting at 128, one sample per clock, and repeat. The test measures the
// time between period starts (320 ns expected, i.e. 3.125 MHz) and checks
// that a reset in the middle of a period holds the output at mid scale and
// restarts the sequence at sample 0. Mechanisms counted: period wrap-arounds
// (the counter returning to address 0) and mid-period resets; each must occur.
`timescale 1ns/1ps
module tb_sine_wave_gen;

  localparam realtime TCLK = 10ns;
  localparam int      N    = 32;

  localparam int REF32 [N] = '{
    128, 152, 176, 198, 218, 234, 245, 253,
    255, 253, 245, 234, 218, 198, 176, 152,
    128, 103,  79,  57,  37,  21,  10,   2,
      0,   2,  10,  21,  37,  57,  79, 103 };

  logic       clk = 1'b0;
  logic       rst = 1'b1;
  logic [7:0] sine_out;
  always #(TCLK / 2) clk = ~clk;

  sine_wave_gen dut (.clk(clk), .rst(rst), .sine_out(sine_out));

  int checks = 0, failures = 0;
  int n_wraps = 0, n_resets = 0;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL @%0t: %s", $time, what);
    end
  endtask

  initial begin
    repeat (1000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Follow the output for `cycles` clocks, expecting sample index `idx` on
  // the first one. Records the time of each period start (sample 0).
  realtime starts[$];
  int idx;
  task automatic follow(input int cycles);
    for (int c = 0; c < cycles; c++) begin
      @(posedge clk); #1;
      check(sine_out == 8'(REF32[idx]),
            $sformatf("sample %0d = %0d, expected %0d", idx, sine_out, REF32[idx]));
      if (idx == 0) starts.push_back($realtime);
      if (idx == N - 1) n_wraps++;
      idx = (idx + 1) % N;
    end
  endtask

  initial begin
    rst = 1'b1;
    repeat (3) @(posedge clk);
    #1 check(sine_out == 8'd128, "output at mid scale during reset");
    @(negedge clk) rst = 1'b0;
    idx = 0;
    follow(4 * N);
    // Period and frequency from the recorded period starts.
    check(starts.size() == 4, $sformatf("%0d period starts seen", starts.size()));
    for (int i = 1; i < starts.size(); i++) begin
      realtime per;
      per = starts[i] - starts[i - 1];
      check(per == 320ns, $sformatf("period %0t, expected 320 ns", per));
      check(1.0e3 / (per / 1ns) == 3.125, $sformatf("frequency %f MHz", 1.0e3 / (per / 1ns)));
    end
    // Mid-period reset: output goes to mid scale, then restarts at sample 0.
    follow(11);
    @(negedge clk) rst = 1'b1;
    n_resets++;
    repeat (2) @(posedge clk);
    #1 check(sine_out == 8'd128, "output at mid scale after mid-period reset");
    @(negedge clk) rst = 1'b0;
    idx = 0;
    starts.delete();
    follow(2 * N + 5);
    check(starts.size() == 3, "period restarts after mid-period reset");
    check(n_wraps > 0, $sformatf("period wrap-around happened %0d times", n_wraps));
    check(n_resets > 0, $sformatf("mid-period reset happened %0d times", n_resets));
    $display("period wraps=%0d mid-period resets=%0d", n_wraps, n_resets);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
