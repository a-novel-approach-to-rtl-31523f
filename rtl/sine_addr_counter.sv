// sine_addr_counter: free-running ROM address counter of the sine generator.
//
// Counts 0, 1, ..., NUM_POINTS-1 and wraps back to 0, one step per rising clock
// edge, so the ROM it addresses is swept once every NUM_POINTS cycles. `wrap`
// is high during the cycle in which the address is NUM_POINTS-1, i.e. the last
// sample of a period is being addressed.
//
// The counter itself and its wrap after NUM_POINTS values follow the design
// being documented; the address width is the smallest that holds NUM_POINTS-1
// (5 bits for the default 32 points). The synchronous active-high reset to
// address 0 is this design's own addition so that simulation and hardware
// start at a known phase.
//
// Interface: clk, rst (synchronous, active high), addr (registered), wrap
// (combinational decode of addr).
module sine_addr_counter
  import sine_pkg::DEF_NUM_POINTS;
#(
  parameter int unsigned NUM_POINTS = DEF_NUM_POINTS,
  parameter int unsigned ADDR_W     = (NUM_POINTS > 1) ? $clog2(NUM_POINTS) : 1
) (
  input  logic              clk,
  input  logic              rst,
  output logic [ADDR_W-1:0] addr,
  output logic              wrap
);

  localparam logic [ADDR_W-1:0] LAST = ADDR_W'(NUM_POINTS - 1);

  assign wrap = (addr == LAST);

  always_ff @(posedge clk) begin
    if (rst)       addr <= '0;
    else if (wrap) addr <= '0;
    else           addr <= addr + 1'b1;
  end

endmodule
