// turn_signal_full_tb: the turn-signal controller at its full size.
//
// The top is instantiated with its default parameters: a 50 MHz board clock
// (20 ns period) divided by 5,000,000 to the 10 Hz state clock. Both switches
// are held, which runs the hazard cycle: left and right lamps, then the
// hazard lamp, then all off, then left and right again. The switches are
// released during that second left-and-right step; the hazard lamp and idle
// follow and the lamps must then stay off. The testbench times each lamp
// pattern from change to change and checks that each lasts exactly 5,000,000
// board clocks (100 ms). The first step is not timed: the divider counts
// from zero at power-up, so its first period is one board clock short.
`timescale 1ns/1ps
module turn_signal_full_tb;

  localparam longint unsigned STEP_NS = 5_000_000 * 20;  // 100 ms

  logic clk_in = 1'b0;
  logic l = 1'b1, r = 1'b1;
  logic ro, lo, ho;
  int checks = 0, failures = 0;

  turn_signal dut (.clk_in(clk_in), .l(l), .r(r), .ro(ro), .lo(lo), .ho(ho));

  always #10 clk_in = ~clk_in;

  task automatic expect_lamps(logic [2:0] want, string what);
    checks++;
    if ({lo, ho, ro} !== want) begin
      failures++;
      $display("FAIL %s: lamps lo,ho,ro=%b%b%b expected %b at %0t", what, lo, ho, ro, want, $time);
    end
  endtask

  initial begin
    realtime t0, t1;
    // Power-up in idle.
    #1 expect_lamps(3'b000, "power-up");
    // First divided edge: left and right lamps.
    @(lo or ho or ro);
    expect_lamps(3'b101, "first step");
    t0 = $realtime;
    @(lo or ho or ro);
    expect_lamps(3'b010, "second step");
    t0 = $realtime;
    @(lo or ho or ro);
    expect_lamps(3'b000, "third step");
    t1 = $realtime;
    checks++;
    if (t1 - t0 != STEP_NS) begin
      failures++;
      $display("FAIL sh lasted %0t, expected %0d ns", t1 - t0, STEP_NS);
    end
    t0 = t1;
    @(lo or ho or ro);
    expect_lamps(3'b101, "fourth step");
    t1 = $realtime;
    checks++;
    if (t1 - t0 != STEP_NS) begin
      failures++;
      $display("FAIL idle lasted %0t, expected %0d ns", t1 - t0, STEP_NS);
    end
    t0 = t1;
    // Release the switches mid-step: sh and idle follow, then the lamps stay
    // off.
    #(STEP_NS / 2);
    l = 0;
    r = 0;
    @(lo or ho or ro);
    expect_lamps(3'b010, "fifth step");
    t1 = $realtime;
    checks++;
    if (t1 - t0 != STEP_NS) begin
      failures++;
      $display("FAIL slr lasted %0t, expected %0d ns", t1 - t0, STEP_NS);
    end else
      $display("hazard cycle: each step %0d ns (10 Hz state clock)", STEP_NS);
    #(STEP_NS + STEP_NS / 2);
    expect_lamps(3'b000, "after release");
    #(STEP_NS);
    expect_lamps(3'b000, "stays idle");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Watchdog: eight divided periods.
  initial begin
    repeat (8 * 5_000_000) @(posedge clk_in);
    failures++;
    $display("FAIL watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
