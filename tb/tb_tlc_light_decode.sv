// Self-checking testbench of tlc_light_decode. Applies every state code,
// including the two unused ones, and compares the four signal heads with the
// table of the published waveforms (1 green, 2 yellow, 4 red). Also checks
// that the side road is never released while a main-road head is.
module tb_tlc_light_decode;
  import tlc_pkg::*;

  state_t  state;
  lights_t lights;
  int      checks = 0, failures = 0;

  tlc_light_decode dut (.state(state), .lights(lights));

  // Expected {M1, S, M2, MT} per state code 0..7.
  localparam logic [2:0] EXP [8][4] = '{
    '{3'd1, 3'd4, 3'd1, 3'd4},
    '{3'd1, 3'd4, 3'd2, 3'd4},
    '{3'd1, 3'd4, 3'd4, 3'd1},
    '{3'd2, 3'd4, 3'd4, 3'd2},
    '{3'd4, 3'd1, 3'd4, 3'd4},
    '{3'd4, 3'd2, 3'd4, 3'd4},
    '{3'd4, 3'd4, 3'd4, 3'd4},
    '{3'd4, 3'd4, 3'd4, 3'd4}
  };

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s state=%0d lights=%h", what, state, lights);
    end
  endtask

  initial begin
    for (int s = 0; s < 8; s++) begin
      state = state_t'(s[2:0]);
      #1;
      check(lights.m1 == EXP[s][0], "M1");
      check(lights.s  == EXP[s][1], "S");
      check(lights.m2 == EXP[s][2], "M2");
      check(lights.mt == EXP[s][3], "MT");
      check(lights.s == LIGHT_RED ||
            (lights.m1 == LIGHT_RED && lights.m2 == LIGHT_RED && lights.mt == LIGHT_RED),
            "side exclusive");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #1000;
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
