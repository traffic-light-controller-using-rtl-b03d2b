// Traffic light controller for a T-junction.
//
// A main road (two through directions, M1 and M2, plus a turning movement MT)
// meets a side road S. The controller is time driven: a clock divider makes a
// slow timing tick from the board clock, a six-state Moore machine counts
// ticks and steps through a fixed ring of phases, and a decoder turns the
// present state into the lamp codes of the four signal heads (1 green,
// 2 yellow, 4 red). The main road gets most of the cycle (17 of 27 ticks by
// default); the side road gets a green of 4 ticks. Every green ends in a
// yellow, and the side road is green only while all main-road heads are red.
//
//   clk -> tlc_clk_div -> tick -> tlc_fsm -> state -> tlc_light_decode -> lights
//
// Interface: clk, rst (asynchronous, active high; resets to state 0, main
// road green), and the four 3-bit light outputs. All outputs are decoded from
// registers only, so they change only after a clock edge on which the state
// changes.
//
// The state ring, dwell times, light codes, port names and reset follow the
// published design. TICK_DIV is this design's choice: 100 000 000 gives one
// tick per second from a 100 MHz clock; TICK_DIV = 1 steps on every clock as
// in the published simulation.
module tlc_top
  import tlc_pkg::*;
#(
  parameter int unsigned TICK_DIV = 100_000_000
) (
  input  logic       clk,
  input  logic       rst,
  output logic [2:0] light_M1,
  output logic [2:0] light_S,
  output logic [2:0] light_M2,
  output logic [2:0] light_MT
);

  logic               tick;
  state_t             state;
  logic [COUNT_W-1:0] count;
  lights_t            lights;

  tlc_clk_div #(.DIV(TICK_DIV)) u_clk_div (
    .clk  (clk),
    .rst  (rst),
    .tick (tick)
  );

  tlc_fsm u_fsm (
    .clk   (clk),
    .rst   (rst),
    .tick  (tick),
    .state (state),
    .count (count)
  );

  tlc_light_decode u_decode (
    .state  (state),
    .lights (lights)
  );

  assign light_M1 = lights.m1;
  assign light_S  = lights.s;
  assign light_M2 = lights.m2;
  assign light_MT = lights.mt;

endmodule
