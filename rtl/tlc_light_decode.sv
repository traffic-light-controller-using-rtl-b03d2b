// Output logic of the traffic light controller: a Moore decoder from the
// present state to the code shown on each of the four signal heads.
//
//   state            M1      M2      MT      S
//   0 main go        green   green   red     red
//   1 M2 yellow      green   yellow  red     red
//   2 turn go        green   red     green   red
//   3 main yellow    yellow  red     yellow  red
//   4 side go        red     red     red     green
//   5 side yellow    red     red     red     yellow
//
// The table is the one the published waveforms show (codes 1 green,
// 2 yellow, 4 red). It is purely combinational; since its only input is the
// registered state, the lights change only at state changes. An unused state
// code shows red on every head, which is this design's choice.
//
// Two main-road heads may be green together (M1 with M2, M1 with MT), as in
// the published waveforms; the rule that only one road is released at a time
// is checked by the assertion below: the side road is never green or yellow
// while a main-road head is.
//
// Interface: state in; lights (struct of m1, s, m2, mt) out.
module tlc_light_decode
  import tlc_pkg::*;
(
  input  state_t  state,
  output lights_t lights
);

  always_comb begin
    lights = '{m1: LIGHT_RED, s: LIGHT_RED, m2: LIGHT_RED, mt: LIGHT_RED};
    unique case (state)
      ST_MAIN_GO:     begin lights.m1 = LIGHT_GREEN;  lights.m2 = LIGHT_GREEN;  end
      ST_M2_YELLOW:   begin lights.m1 = LIGHT_GREEN;  lights.m2 = LIGHT_YELLOW; end
      ST_TURN_GO:     begin lights.m1 = LIGHT_GREEN;  lights.mt = LIGHT_GREEN;  end
      ST_MAIN_YELLOW: begin lights.m1 = LIGHT_YELLOW; lights.mt = LIGHT_YELLOW; end
      ST_SIDE_GO:     lights.s = LIGHT_GREEN;
      ST_SIDE_YELLOW: lights.s = LIGHT_YELLOW;
      default:        ;
    endcase
  end

  // The side road never shows green or yellow while a main-road head does.
  always_comb begin
    if (lights.s != LIGHT_RED)
      a_side_exclusive: assert (lights.m1 == LIGHT_RED && lights.m2 == LIGHT_RED
                                && lights.mt == LIGHT_RED);
  end

endmodule
