// Clock divider: turns the fast board clock into the slow timing tick that
// paces the traffic light state machine.
//
// A free-running counter counts DIV cycles of clk; `tick` is high for exactly
// one clk cycle out of every DIV, on the cycle in which the counter holds
// DIV-1. With DIV = 1 the tick is high on every cycle, which reproduces the
// published simulation, where the controller advances on every clock edge.
//
// The tick is a clock enable, not a derived clock: everything stays in the
// clk domain. That, the reset to zero and the default of 100 000 000 (a
// 100 MHz board clock, one tick per second) are this design's choices; the
// source only says that a divider derives the timing intervals from the 50 or
// 100 MHz board clock.
//
// Interface: clk, rst (asynchronous, active high), tick (output).
// Timing: the first tick comes DIV cycles after reset is released.
module tlc_clk_div #(
  parameter int unsigned DIV = 100_000_000
) (
  input  logic clk,
  input  logic rst,
  output logic tick
);

  localparam int unsigned CW = (DIV > 1) ? $clog2(DIV) : 1;
  localparam logic [CW-1:0] LAST = CW'(DIV - 1);

  logic [CW-1:0] cnt;

  always_ff @(posedge clk or posedge rst) begin
    if (rst)              cnt <= '0;
    else if (cnt == LAST) cnt <= '0;
    else                  cnt <= cnt + 1'b1;
  end

  assign tick = (cnt == LAST);

  initial assert (DIV >= 1) else $error("tlc_clk_div: DIV must be at least 1");

endmodule
