// turn_signal_fsm: the turn-signal Moore machine.
//
// Five states: idle, sl (left lamp), sr (right lamp), slr (both lamps) and
// sh (hazard lamp). In idle the switches are sampled on each rising clock
// edge: l alone goes to sl, r alone to sr, both to slr, neither stays in
// idle. sl and sr last one clock and return to idle; slr is always followed
// by one clock of sh, then idle. So holding a switch makes its lamp blink at
// half the clock rate, and holding both alternates the side lamps with the
// hazard lamp over a three-clock cycle (slr, sh, idle).
//
// The outputs depend on the state only (Moore) and, because the state
// encoding (turn_signal_pkg) puts one lamp on each state bit, they come
// straight from the state register with no decode logic: every lamp changes
// on the rising clock edge, glitch-free.
//
// Interface: clk is the state clock (the divided clock in the full design),
// l and r the switches, lo/ro/ho the left, right and hazard lamps.
//
// Reset: like the original, there is no reset pin; the state register powers
// up in idle through its initial value, which FPGA configuration loads. The
// state-table, outputs and power-up state follow the original design; the
// bit encoding is this design's own choice. The PROCASSINIT lint
// warning on the state register stands for this reason: the declaration
// initialiser is the power-up value, not a reset.
module turn_signal_fsm
  import turn_signal_pkg::*;
(
  input  logic clk,
  input  logic l,
  input  logic r,
  output logic ro,
  output logic lo,
  output logic ho
);

  state_t state = ST_IDLE;  // power-up value
  state_t state_next;
  lamps_t lamps;

  // Next-state logic.
  always_comb begin
    unique case (state)
      ST_IDLE: begin
        unique case ({l, r})
          2'b00:   state_next = ST_IDLE;
          2'b10:   state_next = ST_SL;
          2'b01:   state_next = ST_SR;
          default: state_next = ST_SLR;
        endcase
      end
      ST_SLR:  state_next = ST_SH;
      default: state_next = ST_IDLE;  // sl, sr, sh and unused codes
    endcase
  end

  always_ff @(posedge clk) state <= state_next;

  // Output decode: the state bits are the lamps.
  assign lamps = lamps_t'(state);
  assign lo    = lamps.lo;
  assign ho    = lamps.ho;
  assign ro    = lamps.ro;

  // The register only ever holds one of the five state codes, so the hazard
  // lamp is never lit together with a side lamp.
  a_legal_state: assert property (@(posedge clk) state inside {ST_IDLE, ST_SL, ST_SR, ST_SLR, ST_SH})
    else $error("turn_signal_fsm: illegal state %b", state);

endmodule
