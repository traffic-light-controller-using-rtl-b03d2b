// State machine and dwell timer of the traffic light controller.
//
// Six states run in a fixed ring: main road green (M1, M2), M2 yellow, turn
// green (M1, MT), main road yellow (M1, MT), side road green, side road
// yellow, and back. A 4-bit counter measures how long the present state has
// lasted. On each timing tick the counter is compared with the state's
// terminal count: while it is smaller the counter increments; once equal the
// machine moves to the next state and the counter returns to zero. A state
// therefore lasts TC + 1 ticks; with the default terminal counts a full cycle
// is 8 + 3 + 6 + 3 + 4 + 3 = 27 ticks.
//
// Ring order, the 3-bit state register, the 4-bit counter, the terminal
// counts and the asynchronous active-high reset to state 0 with count 0 are
// those of the published design. The `tick` enable (to let a clock divider
// pace the machine) is this design's addition; tying it high gives one step
// per clock, as in the published waveforms.
//
// Interface: clk, rst, tick in; state and count out, both registered.
module tlc_fsm
  import tlc_pkg::*;
#(
  parameter logic [COUNT_W-1:0] TC_S0 = TC_MAIN_GO,
  parameter logic [COUNT_W-1:0] TC_S1 = TC_M2_YELLOW,
  parameter logic [COUNT_W-1:0] TC_S2 = TC_TURN_GO,
  parameter logic [COUNT_W-1:0] TC_S3 = TC_MAIN_YELLOW,
  parameter logic [COUNT_W-1:0] TC_S4 = TC_SIDE_GO,
  parameter logic [COUNT_W-1:0] TC_S5 = TC_SIDE_YELLOW
) (
  input  logic               clk,
  input  logic               rst,
  input  logic               tick,
  output state_t             state,
  output logic [COUNT_W-1:0] count
);

  state_t             next_state;
  logic [COUNT_W-1:0] tc;

  // Terminal count and successor of the present state.
  always_comb begin
    unique case (state)
      ST_MAIN_GO:     begin tc = TC_S0; next_state = ST_M2_YELLOW;   end
      ST_M2_YELLOW:   begin tc = TC_S1; next_state = ST_TURN_GO;     end
      ST_TURN_GO:     begin tc = TC_S2; next_state = ST_MAIN_YELLOW; end
      ST_MAIN_YELLOW: begin tc = TC_S3; next_state = ST_SIDE_GO;     end
      ST_SIDE_GO:     begin tc = TC_S4; next_state = ST_SIDE_YELLOW; end
      ST_SIDE_YELLOW: begin tc = TC_S5; next_state = ST_MAIN_GO;     end
      default:        begin tc = '0;    next_state = ST_MAIN_GO;     end
    endcase
  end

  always_ff @(posedge clk or posedge rst) begin
    if (rst) begin
      state <= ST_MAIN_GO;
      count <= '0;
    end else if (tick) begin
      if (count < tc) begin
        count <= count + 1'b1;
      end else begin
        state <= next_state;
        count <= '0;
      end
    end
  end

  // The counter never passes the terminal count of its state.
  a_count_bounded: assert property (@(posedge clk) disable iff (rst) count <= tc);
  // Only the six defined states are ever reached.
  a_state_legal: assert property (@(posedge clk) disable iff (rst)
                                  state inside {[ST_MAIN_GO:ST_SIDE_YELLOW]});

endmodule
