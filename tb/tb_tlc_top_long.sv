// Long-run testbench of tlc_top with a large tick divider
// (TICK_DIV = 10 000 000, one tick every 0.1 s of a 100 MHz clock). It takes
// the controller through one complete ring of six phases (27 ticks,
// 2.7e8 clocks) and checks each phase's lamp codes and its duration in
// clocks, measured from simulation time (10 time units per clock). The
// default divider of 100 000 000 works the same way but takes ten times as
// long to simulate.
module tb_tlc_top_long;

  localparam longint unsigned DIV = 10_000_000;

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
  localparam logic [11:0] EXP [7] = '{   // {M1, S, M2, MT}
    {3'd1, 3'd4, 3'd1, 3'd4},
    {3'd1, 3'd4, 3'd2, 3'd4},
    {3'd1, 3'd4, 3'd4, 3'd1},
    {3'd2, 3'd4, 3'd4, 3'd2},
    {3'd4, 3'd1, 3'd4, 3'd4},
    {3'd4, 3'd2, 3'd4, 3'd4},
    {3'd1, 3'd4, 3'd1, 3'd4}
  };

  wire [11:0] lights = {light_M1, light_S, light_M2, light_MT};

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s at %0t: lights=%h", what, $time, lights);
    end
  endtask

  time t_prev, t_now;

  initial begin
    rst = 1'b1;
    repeat (2) @(posedge clk);
    #1 check(lights == EXP[0], "reset phase");
    @(negedge clk) rst = 1'b0;
    // Reset is released at a falling edge. A phase of N ticks ends on the
    // rising edge N * DIV clocks after the rising edge half a period earlier.
    t_prev = $time - 5;
    for (int p = 0; p < 6; p++) begin
      @(lights);
      t_now = $time;
      check(lights == EXP[p + 1], $sformatf("lights after phase %0d", p));
      check((t_now - t_prev) == 10 * DIV * longint'(DWELL[p]),
            $sformatf("duration of phase %0d", p));
      $display("phase %0d lasted %0d clocks", p, (t_now - t_prev) / 10);
      t_prev = t_now;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #(10 * DIV * 28);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
