// turn_signal_tb: end-to-end testbench of the turn-signal controller.
//
// The top is built with short divisors (10 Hz setting: 10 board clocks per
// divided clock) so that thousands of lamp steps fit in a short run. The
// testbench keeps its own reference of the divider (a counter that wraps at
// the divisor, output high for counts up to N/2) and of the Moore machine,
// steps the machine model on each rising edge of the reference divided clock
// and compares the three lamps with it after every board clock. It checks
// that the divided clock of the top runs at the selected rate (lamps change
// only on divided edges, 10 board clocks apart) and counts how often each
// mechanism happened: each lamp state, a switch ignored outside idle, a
// switch press shorter than a divided period that the machine did not see,
// and held switches blinking. A mechanism that never happened is a failure.
`timescale 1ns/1ps
module turn_signal_tb;

  localparam int unsigned D00 = 40, D01 = 20, D10 = 10, D11 = 4;

  typedef enum int {M_IDLE, M_SL, M_SR, M_SLR, M_SH} mstate_t;

  logic clk_in = 1'b0;
  logic l = 1'b0, r = 1'b0;
  logic ro, lo, ho;
  int checks = 0, failures = 0;

  turn_signal #(.DIV_0P1HZ(D00), .DIV_1HZ(D01), .DIV_10HZ(D10), .DIV_1KHZ(D11)) dut (
    .clk_in(clk_in), .l(l), .r(r), .ro(ro), .lo(lo), .ho(ho)
  );

  always #10 clk_in = ~clk_in;

  function automatic logic [2:0] lamps_of(mstate_t s);
    case (s)
      M_SL:    return 3'b100;
      M_SR:    return 3'b001;
      M_SLR:   return 3'b101;
      M_SH:    return 3'b010;
      default: return 3'b000;
    endcase
  endfunction

  function automatic mstate_t next_of(mstate_t s, logic li, logic ri);
    if (s == M_IDLE) begin
      if (!li && !ri) return M_IDLE;
      if (li && !ri)  return M_SL;
      if (!li && ri)  return M_SR;
      return M_SLR;
    end
    if (s == M_SLR) return M_SH;
    return M_IDLE;
  endfunction

  // Reference divider and machine. The divided clock's power-up level is
  // unknown, so the model is synchronised at the first wrap of the counter
  // (a rising edge of the divided clock in any case); before that only the
  // idle lamps are expected.
  int unsigned ref_count = 0;
  bit ref_out = 1'b1;
  bit synced = 1'b0;
  mstate_t m = M_IDLE;
  int unsigned edges = 0;
  int unsigned last_edge_cycle = 0, cycle = 0;
  int unsigned visits[5] = '{default: 0};
  int unsigned ignored = 0, missed = 0, blinks = 0;
  bit pressed_since_edge = 1'b0;
  mstate_t prev_m = M_IDLE;

  always @(posedge clk_in) begin
    int unsigned c;
    bit rise;
    cycle++;
    c = ref_count + 1;
    if (c >= D10) c = 0;
    rise = (c <= D10 / 2) && !ref_out;
    if (c == 0) synced = 1'b1;
    ref_count = c;
    ref_out   = (c <= D10 / 2);
    if (synced && rise) begin
      if (edges > 0) begin
        checks++;
        if (cycle - last_edge_cycle != D10) begin
          failures++;
          $display("FAIL divided period %0d board clocks, expected %0d", cycle - last_edge_cycle,
                   D10);
        end
      end
      last_edge_cycle = cycle;
      edges++;
      if (m != M_IDLE && (l || r)) ignored++;
      if (m == M_IDLE && !l && !r && pressed_since_edge) missed++;
      prev_m = m;
      m = next_of(m, l, r);
      if (m == M_IDLE && prev_m != M_IDLE && (l || r)) blinks++;
      visits[m]++;
      pressed_since_edge = 1'b0;
    end
  end

  always @(negedge clk_in) begin
    if (l || r) pressed_since_edge = 1'b1;
    checks++;
    if ({lo, ho, ro} !== lamps_of(m)) begin
      failures++;
      $display("FAIL cycle %0d: lamps lo,ho,ro=%b%b%b expected %b (state %s)", cycle, lo, ho, ro,
               lamps_of(m), m.name());
    end
  end

  initial begin
    // Power-up: idle, switches off, until the divider has wrapped once.
    wait (synced);
    repeat (3 * D10) @(negedge clk_in);
    // Held left, held right, held both.
    l = 1; repeat (8 * D10) @(negedge clk_in); l = 0;
    repeat (2 * D10) @(negedge clk_in);
    r = 1; repeat (8 * D10) @(negedge clk_in); r = 0;
    repeat (2 * D10) @(negedge clk_in);
    l = 1; r = 1; repeat (12 * D10) @(negedge clk_in); l = 0; r = 0;
    repeat (2 * D10) @(negedge clk_in);
    // A short press that falls between divided edges is not seen.
    repeat (2) @(negedge clk_in);
    l = 1; @(negedge clk_in); l = 0;
    repeat (3 * D10) @(negedge clk_in);
    // Random switches, changing at random board clocks.
    repeat (3000) begin
      l = 1'($urandom);
      r = 1'($urandom);
      repeat ($urandom_range(1, 3 * D10)) @(negedge clk_in);
    end
    l = 0; r = 0;
    repeat (3 * D10) @(negedge clk_in);

    $display("divided edges=%0d  idle=%0d sl=%0d sr=%0d slr=%0d sh=%0d", edges, visits[M_IDLE],
             visits[M_SL], visits[M_SR], visits[M_SLR], visits[M_SH]);
    $display("switch ignored outside idle=%0d  short press missed=%0d  blink-off while held=%0d",
             ignored, missed, blinks);
    checks++;
    if (edges < 100) begin
      failures++;
      $display("FAIL too few divided clock edges");
    end
    foreach (visits[i]) begin
      checks++;
      if (visits[i] == 0) begin
        failures++;
        $display("FAIL state %0d never reached", i);
      end
    end
    checks += 3;
    if (ignored == 0) begin failures++; $display("FAIL no switch ignored outside idle"); end
    if (missed == 0)  begin failures++; $display("FAIL no short press missed"); end
    if (blinks == 0)  begin failures++; $display("FAIL no blink while a switch was held"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Watchdog.
  initial begin
    repeat (300_000) @(posedge clk_in);
    failures++;
    $display("FAIL watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
