// End-to-end testbench of tlc_top at a reduced tick divider (TICK_DIV = 3,
// so the run stays short). A cycle-level reference model (divider, dwell
// timer and the published light table) predicts the four light outputs on
// every clock. It counts how often each mechanism happens and fails a
// mechanism that never did: every one of the six phases, a divider cycle
// without a tick (the machine holds), a dwell that ends in a state change,
// the exclusive side-road green, a yellow clearance (every head goes green ->
// yellow -> red, never green -> red), and an asynchronous reset in mid-cycle.
// A full ring must take 27 ticks, i.e. 27 * TICK_DIV clocks.
module tb_tlc_top;

  localparam int unsigned DIV = 3;

  logic       clk = 1'b0;
  logic       rst;
  logic [2:0] light_M1, light_S, light_M2, light_MT;
  int         checks = 0, failures = 0;

  tlc_top #(.TICK_DIV(DIV)) dut (
    .clk(clk), .rst(rst),
    .light_M1(light_M1), .light_S(light_S), .light_M2(light_M2), .light_MT(light_MT)
  );

  always #5 clk = ~clk;

  localparam int DWELL [6] = '{8, 3, 6, 3, 4, 3};
  // Expected {M1, S, M2, MT} per phase: 1 green, 2 yellow, 4 red.
  localparam logic [2:0] EXP [6][4] = '{
    '{3'd1, 3'd4, 3'd1, 3'd4},
    '{3'd1, 3'd4, 3'd2, 3'd4},
    '{3'd1, 3'd4, 3'd4, 3'd1},
    '{3'd2, 3'd4, 3'd4, 3'd2},
    '{3'd4, 3'd1, 3'd4, 3'd4},
    '{3'd4, 3'd2, 3'd4, 3'd4}
  };

  int m_div, m_state, m_count;
  int phase_seen [6];
  int n_idle, n_advance, n_side_excl, n_reset, n_rings, n_yellow_exit;
  logic [2:0] prev [4];
  bit         prev_valid;
  int cyc, ring_start;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s at %0t: M1=%0d S=%0d M2=%0d MT=%0d expected phase %0d",
               what, $time, light_M1, light_S, light_M2, light_MT, m_state);
    end
  endtask

  task automatic model_reset();
    m_div = 0; m_state = 0; m_count = 0;
  endtask

  // One clock edge of the reference model.
  task automatic model_clock();
    if (m_div == DIV - 1) begin
      m_div = 0;
      if (m_count + 1 < DWELL[m_state]) m_count++;
      else begin
        m_count = 0;
        m_state = (m_state + 1) % 6;
        n_advance++;
      end
    end else begin
      m_div++;
      n_idle++;
    end
  endtask

  task automatic compare();
    check(light_M1 == EXP[m_state][0] && light_S == EXP[m_state][1] &&
          light_M2 == EXP[m_state][2] && light_MT == EXP[m_state][3], "lights");
    phase_seen[m_state]++;
    // A head may leave green only for yellow, and must leave yellow for red.
    if (prev_valid) begin
      automatic logic [2:0] cur [4] = '{light_M1, light_S, light_M2, light_MT};
      for (int h = 0; h < 4; h++) begin
        if (prev[h] == 3'd1 && cur[h] != 3'd1)
          check(cur[h] == 3'd2, $sformatf("head %0d green not followed by yellow", h));
        if (prev[h] == 3'd2 && cur[h] != 3'd2) begin
          check(cur[h] == 3'd4, $sformatf("head %0d yellow not followed by red", h));
          n_yellow_exit++;
        end
      end
    end
    prev = '{light_M1, light_S, light_M2, light_MT};
    prev_valid = 1'b1;
    if (light_S != 3'd4) begin
      n_side_excl++;
      check(light_M1 == 3'd4 && light_M2 == 3'd4 && light_MT == 3'd4, "side exclusive");
    end
  endtask

  task automatic run_clocks(input int n);
    repeat (n) begin
      @(posedge clk); #1;
      model_clock();
      cyc++;
      compare();
      if (m_state == 0 && m_count == 0 && m_div == 0) begin
        check(cyc - ring_start == 27 * DIV, "ring length");
        ring_start = cyc;
        n_rings++;
      end
    end
  endtask

  initial begin
    rst = 1'b1;
    repeat (2) @(posedge clk);
    #1 model_reset();
    compare();
    @(negedge clk) rst = 1'b0;
    cyc = 0; ring_start = 0;
    run_clocks(2 * 27 * DIV + 5);
    // Asynchronous reset in mid-cycle, between clock edges.
    #2 rst = 1'b1;
    #1 model_reset();
    n_reset++;
    prev_valid = 1'b0;
    compare();
    @(negedge clk) rst = 1'b0;
    cyc = 0; ring_start = 0;
    run_clocks(27 * DIV + 1);

    for (int p = 0; p < 6; p++)
      check(phase_seen[p] > 0, $sformatf("phase %0d seen", p));
    check(n_idle > 0, "divider hold seen");
    check(n_advance > 0, "state advance seen");
    check(n_side_excl > 0, "side green seen");
    check(n_reset > 0, "mid-cycle reset seen");
    check(n_rings >= 3, "complete rings");
    check(n_yellow_exit > 0, "yellow clearance seen");
    $display("mechanisms: phases %0d %0d %0d %0d %0d %0d, holds %0d, advances %0d, side-open %0d, resets %0d, rings %0d, yellow clearances %0d",
             phase_seen[0], phase_seen[1], phase_seen[2], phase_seen[3], phase_seen[4],
             phase_seen[5], n_idle, n_advance, n_side_excl, n_reset, n_rings, n_yellow_exit);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
