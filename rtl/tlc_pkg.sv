// Shared types and constants of the T-junction traffic light controller.
//
// The controller is a Moore machine of six states. Each state holds for a
// fixed number of timing ticks and drives one fixed combination of the four
// signal heads: M1 and M2 (the two directions of the main road), MT (the
// turning movement off the main road) and S (the side road).
//
// Following the published waveforms, a signal head is a three-bit one-hot
// code: 1 = green, 2 = yellow, 4 = red. The state numbers 0..5 and the dwell
// times (8, 3, 6, 3, 4 and 3 ticks, i.e. terminal counts 7, 2, 5, 2, 3, 2)
// are also read from those waveforms. The state names are this design's own.
package tlc_pkg;

  // Signal-head code, one bit per lamp.
  typedef enum logic [2:0] {
    LIGHT_GREEN  = 3'b001,
    LIGHT_YELLOW = 3'b010,
    LIGHT_RED    = 3'b100
  } light_t;

  // Controller state; encodings match the state numbers 0..5 of the design.
  typedef enum logic [2:0] {
    ST_MAIN_GO     = 3'd0,  // M1 and M2 green
    ST_M2_YELLOW   = 3'd1,  // M2 clears, M1 stays green
    ST_TURN_GO     = 3'd2,  // M1 and the main-road turn MT green
    ST_MAIN_YELLOW = 3'd3,  // M1 and MT clear
    ST_SIDE_GO     = 3'd4,  // side road green
    ST_SIDE_YELLOW = 3'd5   // side road clears
  } state_t;

  // Width of the dwell counter (count[3:0] of the design).
  localparam int unsigned COUNT_W = 4;

  // Terminal count of each state: the state is left on the tick that finds
  // the counter equal to this value, so the state lasts TC + 1 ticks.
  localparam logic [COUNT_W-1:0] TC_MAIN_GO     = 4'd7;
  localparam logic [COUNT_W-1:0] TC_M2_YELLOW   = 4'd2;
  localparam logic [COUNT_W-1:0] TC_TURN_GO     = 4'd5;
  localparam logic [COUNT_W-1:0] TC_MAIN_YELLOW = 4'd2;
  localparam logic [COUNT_W-1:0] TC_SIDE_GO     = 4'd3;
  localparam logic [COUNT_W-1:0] TC_SIDE_YELLOW = 4'd2;

  // The four signal heads together.
  typedef struct packed {
    light_t m1;
    light_t s;
    light_t m2;
    light_t mt;
  } lights_t;

endpackage
