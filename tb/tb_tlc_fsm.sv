// Self-checking testbench of tlc_fsm. A reference model, written from the
// published waveform (dwell of 8, 3, 6, 3, 4 and 3 ticks in states 0..5),
// predicts state and count on every clock. The tick is first held high (one
// step per clock, where a full ring must take 27 clocks), then driven at
// random to check that the machine only moves on a tick. A mid-cycle reset is
// also checked.
module tb_tlc_fsm;
  import tlc_pkg::*;

  logic               clk = 1'b0;
  logic               rst;
  logic               tick;
  state_t             state;
  logic [COUNT_W-1:0] count;
  int                 checks = 0, failures = 0;

  tlc_fsm dut (.clk(clk), .rst(rst), .tick(tick), .state(state), .count(count));

  always #5 clk = ~clk;

  localparam int DWELL [6] = '{8, 3, 6, 3, 4, 3};

  int exp_state, exp_count;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s at %0t: state=%0d count=%0d expected %0d/%0d",
               what, $time, state, count, exp_state, exp_count);
    end
  endtask

  // Advance the reference model by one tick.
  task automatic model_step();
    if (exp_count + 1 < DWELL[exp_state]) exp_count++;
    else begin
      exp_count = 0;
      exp_state = (exp_state + 1) % 6;
    end
  endtask

  int ring_start, cyc, rings;

  initial begin
    rst  = 1'b1;
    tick = 1'b1;
    repeat (2) @(posedge clk);
    #1;
    check(state == ST_MAIN_GO && count == 0, "reset values");
    @(negedge clk) rst = 1'b0;
    exp_state = 0; exp_count = 0;
    // Phase 1: tick always high, three full rings.
    cyc = 0; ring_start = 0; rings = 0;
    while (rings < 3) begin
      @(posedge clk); #1;
      cyc++;
      model_step();
      check(int'(state) == exp_state && int'(count) == exp_count, "tick=1 step");
      if (exp_state == 0 && exp_count == 0) begin
        check(cyc - ring_start == 27, "ring length 27 clocks");
        ring_start = cyc;
        rings++;
      end
    end
    // Phase 2: random ticks.
    repeat (400) begin
      @(negedge clk) tick = ($urandom_range(0, 2) == 0);
      @(posedge clk); #1;
      if (tick) model_step();
      check(int'(state) == exp_state && int'(count) == exp_count, "random tick step");
    end
    // Phase 3: asynchronous reset in the middle of a state.
    @(negedge clk) tick = 1'b1;
    while (state != ST_TURN_GO || count != 3) @(negedge clk);
    #2 rst = 1'b1;
    #1;
    exp_state = 0; exp_count = 0;
    check(state == ST_MAIN_GO && count == 0, "async reset");
    @(negedge clk) rst = 1'b0;
    repeat (30) begin
      @(posedge clk); #1;
      model_step();
      check(int'(state) == exp_state && int'(count) == exp_count, "after reset");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
