// turn_signal_pkg: types shared by the turn-signal controller.
//
// The state of the turn-signal Moore machine is encoded so that its three
// bits are the three lamps: bit 2 is the left lamp, bit 1 the hazard lamp and
// bit 0 the right lamp. With this encoding the next-state equations reduce to
// the published flip-flop equations
//   D0 = R & idle,  D1 = Q2 & ~Q1 & Q0 (state slr),  D2 = L & idle
// and the output decoder is a plain wire. The five state names are the
// original ones; the bit values are this design's choice, made so that the
// equations above hold.
package turn_signal_pkg;

  typedef enum logic [2:0] {
    ST_IDLE = 3'b000,  // all lamps off
    ST_SL   = 3'b100,  // left lamp
    ST_SR   = 3'b001,  // right lamp
    ST_SLR  = 3'b101,  // left and right lamps
    ST_SH   = 3'b010   // hazard lamp
  } state_t;

  // Lamp outputs as a struct, so the decoder can be written as one assignment.
  typedef struct packed {
    logic lo;  // left lamp
    logic ho;  // hazard lamp
    logic ro;  // right lamp
  } lamps_t;

endpackage
