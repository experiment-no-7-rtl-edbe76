// turn_signal: top of the turn-signal controller.
//
// The board clock clk_in (50 MHz) goes through selectable_clock, whose rate
// select is tied by parameters to s1 s0 = 1 0, i.e. 10 Hz. The divided clock
// is the state clock of turn_signal_fsm, so every lamp step lasts 100 ms:
// a held switch blinks its lamp at 5 Hz, and both switches held cycle
// left+right, hazard, off every 300 ms. The switches l and r are sampled
// only on the divided clock's rising edge, so a press shorter than one
// divided period can be missed.
//
// Interface: clk_in, the two switches l and r, the three lamps ro, lo, ho.
// All outputs come straight from the state register and change on the rising
// edge of the divided clock, which follows clk_in's rising edge.
//
// The structure (a divided clock driving the state register directly) and
// the fixed 10 Hz selection follow the original design. The divisor
// parameters are passed down so that a simulation can shorten the divided
// period; their defaults are the original 50 MHz values.
module turn_signal #(
  parameter bit          SEL_S0    = 1'b0,
  parameter bit          SEL_S1    = 1'b1,
  parameter int unsigned DIV_0P1HZ = 500_000_000,
  parameter int unsigned DIV_1HZ   =  50_000_000,
  parameter int unsigned DIV_10HZ  =   5_000_000,
  parameter int unsigned DIV_1KHZ  =      50_000
) (
  input  logic clk_in,
  input  logic l,
  input  logic r,
  output logic ro,
  output logic lo,
  output logic ho
);

  logic clk;  // divided state clock

  selectable_clock #(
    .DIV_0P1HZ(DIV_0P1HZ),
    .DIV_1HZ  (DIV_1HZ),
    .DIV_10HZ (DIV_10HZ),
    .DIV_1KHZ (DIV_1KHZ)
  ) u_clk (
    .clk    (clk_in),
    .s0     (SEL_S0),
    .s1     (SEL_S1),
    .out_clk(clk)
  );

  turn_signal_fsm u_fsm (
    .clk(clk),
    .l  (l),
    .r  (r),
    .ro (ro),
    .lo (lo),
    .ho (ho)
  );

endmodule
