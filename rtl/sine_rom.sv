// sine_rom: one period of a sine wave held in a synchronous read-only memory.
//
// The table has NUM_POINTS words of DATA_W bits, word i holding
// sine_pkg::sine_sample(i, NUM_POINTS, MAX_AMP), i.e.
// round((MAX_AMP/2) * (1 + sin(2*pi*i/NUM_POINTS))). The contents are computed
// at elaboration time from that formula instead of being pasted in, so other
// point counts and amplitudes need only new parameter values. The array is
// padded to a power of two; addresses at NUM_POINTS and above read 0.
//
// The read is registered: `data` shows the word at `addr` one clock after
// `addr` is presented. The registered output is this design's choice for a
// clean, glitch-free sample stream; the ROM-plus-counter structure, 32 points
// and the 0..255 scaling follow the design being documented.
module sine_rom
  import sine_pkg::*;
#(
  parameter int unsigned NUM_POINTS = DEF_NUM_POINTS,
  parameter int unsigned MAX_AMP    = DEF_MAX_AMP,
  parameter int unsigned DATA_W     = amp_width(MAX_AMP),
  parameter int unsigned ADDR_W     = (NUM_POINTS > 1) ? $clog2(NUM_POINTS) : 1
) (
  input  logic              clk,
  input  logic [ADDR_W-1:0] addr,
  output logic [DATA_W-1:0] data
);

  localparam int unsigned DEPTH = 2 ** ADDR_W;

  typedef logic [DATA_W-1:0] table_t [DEPTH];

  function automatic table_t build_table();
    table_t t;
    for (int unsigned i = 0; i < DEPTH; i++)
      t[i] = (i < NUM_POINTS) ? DATA_W'(sine_sample(i, NUM_POINTS, MAX_AMP)) : '0;
    return t;
  endfunction

  localparam table_t TABLE = build_table();

  always_ff @(posedge clk)
    data <= TABLE[addr];

endmodule
