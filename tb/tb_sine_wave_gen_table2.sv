// tb_sine_wave_gen_table2: runs the sine wave generator in the five
// frequency / amplitude configurations of its reference frequency table.
//
//   row  points  full scale  clock   output period = points x clock
//    1     100      300      10 ns   1000 ns  ->   1 MHz
//    2     200     1500       1 ns    200 ns  ->   5 MHz
//    3    1000      500       1 ns   1000 ns  ->   1 MHz (the table lists 10 MHz)
//    4      20     1000       1 ns     20 ns  ->  50 MHz
//    5      10     2000       1 ns     10 ns  -> 100 MHz
//
// Each configuration is its own generator instance with its own clock. For
// two full periods every sample is compared with
// round((A/2)(1 + sin(2*pi*i/N))) worked out here, the crest and trough must be
// reached (or, for 10 points, lie symmetric about mid scale), and the measured period (time between period starts) must equal
// N x clock period. Row 3 is checked against that product, which gives 1 MHz.
`timescale 1ns/1ps
module tb_sine_wave_gen_table2;

  localparam int NCFG = 5;
  localparam int        PTS  [NCFG] = '{100, 200, 1000, 20, 10};
  localparam int        AMP  [NCFG] = '{300, 1500, 500, 1000, 2000};
  localparam realtime   TCK  [NCFG] = '{10ns, 1ns, 1ns, 1ns, 1ns};

  int checks = 0, failures = 0;
  logic rst = 1'b1;
  bit   done [NCFG];

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL @%0t: %s", $time, what);
    end
  endtask

  function automatic int ref_sample(int i, int n, int a);
    real r;
    r = (a / 2.0) * (1.0 + $sin(2.0 * 3.141592653589793 * i / n));
    return $rtoi(r + 0.5);
  endfunction

  for (genvar g = 0; g < NCFG; g++) begin : g_cfg
    localparam int N = PTS[g];
    localparam int A = AMP[g];
    localparam int W = $clog2(A + 1);

    logic         clk = 1'b0;
    logic [W-1:0] sine_out;
    always #(TCK[g] / 2) clk = ~clk;

    sine_wave_gen #(.NUM_POINTS(N), .MAX_AMP(A)) dut (
      .clk(clk), .rst(rst), .sine_out(sine_out));

    initial begin
      realtime t_start [2];
      int      mx, mn;
      mx = 0; mn = A;
      // rst falls between clock edges; the next rising edge shows sample 0.
      wait (rst == 1'b0);
      for (int c = 0; c < 2 * N + 1; c++) begin
        @(posedge clk); #(TCK[g] / 4);
        check(int'(sine_out) == ref_sample(c % N, N, A),
              $sformatf("row %0d sample %0d = %0d, expected %0d",
                        g + 1, c % N, sine_out, ref_sample(c % N, N, A)));
        if (c == 0) t_start[0] = $realtime;
        if (c == N) t_start[1] = $realtime;
        if (int'(sine_out) > mx) mx = int'(sine_out);
        if (int'(sine_out) < mn) mn = int'(sine_out);
      end
      check(t_start[1] - t_start[0] == N * TCK[g],
            $sformatf("row %0d period %0t", g + 1, t_start[1] - t_start[0]));
      // The crest and trough are samples only when N is a multiple of 4;
      // otherwise the range must still be symmetric about mid scale.
      if (N % 4 == 0)
        check(mx == A && mn == 0, $sformatf("row %0d range %0d..%0d", g + 1, mn, mx));
      else
        check(mx + mn == A && mx > A * 9 / 10, $sformatf("row %0d range %0d..%0d", g + 1, mn, mx));
      $display("row %0d: %0d points, full scale %0d, period %0t -> %f MHz",
               g + 1, N, A, t_start[1] - t_start[0],
               1.0e3 / ((t_start[1] - t_start[0]) / 1ns));
      done[g] = 1'b1;
    end
  end

  initial begin
    #50.3ns rst = 1'b0;
    wait (done[0] && done[1] && done[2] && done[3] && done[4]);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #100us;
    failures++;
    $display("FAIL: watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
