// sine_wave_gen: look-up-table sine wave generator (top level).
//
// A free-running address counter (sine_addr_counter) sweeps a ROM that holds
// one sampled sine period (sine_rom); the ROM's registered output is the
// sample stream. One sample leaves per clock, so the output frequency is
//   f_out = f_clk / NUM_POINTS,
// e.g. 32 points at a 10 ns clock give a 320 ns period, 3.125 MHz. Other
// frequencies and amplitudes come from other NUM_POINTS / MAX_AMP values.
//
// Registers: the counter (ADDR_W bits) and the sample register (DATA_W bits),
// 5 + 8 = 13 flip-flops at the defaults.
//
// Timing: the ROM's registered output drives sine_out directly. While rst is
// high the counter is held at address 0, so from the second clock of reset on
// sine_out holds sample 0 (mid scale, 128 at the defaults). The first rising
// edge after rst falls presents sample 0 again as the start of a period;
// sample i follows i clocks later and the sequence repeats every NUM_POINTS
// clocks.
//
// The counter-plus-ROM structure, the 32-point / 255 full-scale table and the
// 8-bit output follow the design being documented. The synchronous reset
// input (one pin beyond the clock and the eight data pins) is this design's
// own choice.
module sine_wave_gen
  import sine_pkg::*;
#(
  parameter int unsigned NUM_POINTS = DEF_NUM_POINTS,
  parameter int unsigned MAX_AMP    = DEF_MAX_AMP,
  parameter int unsigned DATA_W     = amp_width(MAX_AMP)
) (
  input  logic              clk,
  input  logic              rst,
  output logic [DATA_W-1:0] sine_out
);

  localparam int unsigned ADDR_W = (NUM_POINTS > 1) ? $clog2(NUM_POINTS) : 1;

  logic [ADDR_W-1:0] addr;

  sine_addr_counter #(
    .NUM_POINTS (NUM_POINTS),
    .ADDR_W     (ADDR_W)
  ) u_counter (   // wrap is not needed here: the counter wraps on its own
    .clk  (clk),
    .rst  (rst),
    .addr (addr),
    .wrap ()
  );

  sine_rom #(
    .NUM_POINTS (NUM_POINTS),
    .MAX_AMP    (MAX_AMP),
    .DATA_W     (DATA_W),
    .ADDR_W     (ADDR_W)
  ) u_rom (
    .clk  (clk),
    .addr (addr),
    .data (sine_out)
  );

endmodule
