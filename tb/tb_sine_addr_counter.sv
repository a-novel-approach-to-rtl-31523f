// tb_sine_addr_counter: self-checking test of the ROM address counter.
//
// Two counters run side by side: the default 32-point one and a 10-point one
// (not a power of two, so the wrap has to come from the compare and not from
// the counter width). After reset each must count 0..N-1 and wrap, with
// `wrap` high exactly on address N-1, for several periods; a reset in the
// middle of a period must return it to 0. A reference counter in the
// testbench gives the expected address.
`timescale 1ns/1ps
module tb_sine_addr_counter;

  localparam int unsigned N_A = 32;
  localparam int unsigned N_B = 10;

  logic clk = 1'b0;
  logic rst = 1'b1;
  always #5 clk = ~clk;

  logic [4:0] addr_a;
  logic       wrap_a;
  logic [3:0] addr_b;
  logic       wrap_b;

  sine_addr_counter dut_a (.clk(clk), .rst(rst), .addr(addr_a), .wrap(wrap_a));
  sine_addr_counter #(.NUM_POINTS(N_B)) dut_b (.clk(clk), .rst(rst), .addr(addr_b), .wrap(wrap_b));

  int checks = 0, failures = 0;
  int exp_a = 0, exp_b = 0;
  int wraps_a = 0, wraps_b = 0;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL @%0t: %s", $time, what);
    end
  endtask

  // Watchdog.
  initial begin
    repeat (2000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic step_and_check();
    @(posedge clk);
    // Reference model advances on the same edge.
    if (rst) begin exp_a = 0; exp_b = 0; end
    else begin
      exp_a = (exp_a == N_A - 1) ? 0 : exp_a + 1;
      exp_b = (exp_b == N_B - 1) ? 0 : exp_b + 1;
    end
    #1;
    check(addr_a == 5'(exp_a), $sformatf("addr_a=%0d exp=%0d", addr_a, exp_a));
    check(addr_b == 4'(exp_b), $sformatf("addr_b=%0d exp=%0d", addr_b, exp_b));
    check(wrap_a == (exp_a == N_A - 1), $sformatf("wrap_a=%0b at addr %0d", wrap_a, exp_a));
    check(wrap_b == (exp_b == N_B - 1), $sformatf("wrap_b=%0b at addr %0d", wrap_b, exp_b));
    if (wrap_a) wraps_a++;
    if (wrap_b) wraps_b++;
  endtask

  initial begin
    rst = 1'b1;
    repeat (2) step_and_check();
    rst = 1'b0;
    repeat (3 * N_A + 7) step_and_check();
    // Reset in the middle of a period.
    rst = 1'b1;
    step_and_check();
    rst = 1'b0;
    repeat (2 * N_A) step_and_check();
    check(wraps_a >= 4, $sformatf("32-point counter wrapped %0d times", wraps_a));
    check(wraps_b >= 15, $sformatf("10-point counter wrapped %0d times", wraps_b));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
