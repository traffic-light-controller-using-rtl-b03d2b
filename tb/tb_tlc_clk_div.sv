// Self-checking testbench of tlc_clk_div. Runs the divider at a small
// ratio and at DIV = 1, and checks that the tick is high on exactly one clock
// out of DIV, first DIV cycles after reset, and that reset restarts the count.
module tb_tlc_clk_div;

  localparam int unsigned DIV_A = 5;

  logic clk = 1'b0;
  logic rst;
  logic tick_a, tick_1;
  int   checks = 0, failures = 0;

  tlc_clk_div #(.DIV(DIV_A)) dut_a (.clk(clk), .rst(rst), .tick(tick_a));
  tlc_clk_div #(.DIV(1))     dut_1 (.clk(clk), .rst(rst), .tick(tick_1));

  always #5 clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s at %0t", what, $time);
    end
  endtask

  // Expected tick of the DIV_A divider, from a cycle count kept here.
  int unsigned cyc;

  initial begin
    rst = 1'b1;
    repeat (3) @(posedge clk);
    @(negedge clk) rst = 1'b0;
    cyc = 0;
    repeat (4 * DIV_A + 2) begin
      // Before edge: counter has seen `cyc` edges since release.
      check(tick_a == ((cyc % DIV_A) == DIV_A - 1), "tick_a position");
      check(tick_1 == 1'b1, "tick_1 always high");
      @(negedge clk);
      cyc++;
    end
    // Reset in the middle of a period restarts the count.
    rst = 1'b1;
    @(negedge clk);
    check(tick_a == 1'b0, "tick_a low in reset");
    rst = 1'b0;
    cyc = 0;
    repeat (2 * DIV_A) begin
      check(tick_a == ((cyc % DIV_A) == DIV_A - 1), "tick_a after re-reset");
      @(negedge clk);
      cyc++;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (1000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
