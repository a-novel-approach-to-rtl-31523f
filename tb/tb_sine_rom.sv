// tb_sine_rom: self-checking test of the sine table ROM.
//
// The default ROM (32 points, full scale 255) is read at every address in
// order and then at random addresses and compared, one clock after the
// address, against the published 32-point reference table typed in below.
// A second ROM with 100 points and full scale 300 (9-bit words) is checked
// against round((300/2)(1 + sin(2*pi*i/100))) worked out here with real
// arithmetic, and against its symmetry (sample i + sample i+50 = 300 within
// rounding).
`timescale 1ns/1ps
module tb_sine_rom;

  localparam int unsigned N2 = 100;
  localparam int unsigned A2 = 300;

  localparam int REF32 [32] = '{
    128, 152, 176, 198, 218, 234, 245, 253,
    255, 253, 245, 234, 218, 198, 176, 152,
    128, 103,  79,  57,  37,  21,  10,   2,
      0,   2,  10,  21,  37,  57,  79, 103 };

  logic clk = 1'b0;
  always #5 clk = ~clk;

  logic [4:0] addr1;
  logic [7:0] data1;
  logic [6:0] addr2;
  logic [8:0] data2;

  sine_rom dut1 (.clk(clk), .addr(addr1), .data(data1));
  sine_rom #(.NUM_POINTS(N2), .MAX_AMP(A2)) dut2 (.clk(clk), .addr(addr2), .data(data2));

  int checks = 0, failures = 0;

  function automatic int ref2(int i);
    real r;
    r = 150.0 * (1.0 + $sin(6.283185307179586 * i / 100.0));
    return $rtoi(r + 0.5);
  endfunction

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL @%0t: %s", $time, what);
    end
  endtask

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  int a1, a2;
  initial begin
    // In-order sweep, then 200 random reads, of both ROMs.
    for (int k = 0; k < 32 + 200; k++) begin
      a1 = (k < 32) ? k : int'($urandom_range(31, 0));
      a2 = (k < N2) ? k : int'($urandom_range(N2 - 1, 0));
      @(negedge clk);
      addr1 = 5'(a1);
      addr2 = 7'(a2);
      @(posedge clk); #1;
      check(data1 == 8'(REF32[a1]), $sformatf("rom32[%0d]=%0d exp %0d", a1, data1, REF32[a1]));
      check(data2 == 9'(ref2(a2)), $sformatf("rom100[%0d]=%0d exp %0d", a2, data2, ref2(a2)));
    end
    // Full sweep of the 100-point ROM with a symmetry check.
    for (int i = 0; i < 50; i++) begin
      int s0, s1;
      @(negedge clk); addr2 = 7'(i);
      @(posedge clk); #1; s0 = int'(data2);
      @(negedge clk); addr2 = 7'(i + 50);
      @(posedge clk); #1; s1 = int'(data2);
      check((s0 + s1 >= 299) && (s0 + s1 <= 301),
            $sformatf("rom100[%0d]+rom100[%0d]=%0d", i, i + 50, s0 + s1));
    end
    // Peak and trough of the 100-point table.
    @(negedge clk); addr2 = 7'd25;
    @(posedge clk); #1; check(data2 == 9'd300, "rom100 peak");
    @(negedge clk); addr2 = 7'd75;
    @(posedge clk); #1; check(data2 == 9'd0, "rom100 trough");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
