// turn_signal_fsm_tb: self-checking testbench for the turn-signal Moore
// machine.
//
// The machine is clocked directly (10 ns period). A reference model, written
// here as a table of lamp patterns per state and a transition rule, is
// stepped in lockstep: directed sequences cover each switch combination from
// idle and a held both-switches input (slr, sh, idle, slr ...), then 2000
// random switch values follow. After every rising edge the three lamps are
// compared with the model. The testbench also checks that the lamps do not
// depend on the inputs between edges (Moore outputs) and that each of the
// five states was visited.
`timescale 1ns/1ps
module turn_signal_fsm_tb;

  typedef enum int {M_IDLE, M_SL, M_SR, M_SLR, M_SH} mstate_t;

  logic clk = 1'b0;
  logic l = 1'b0, r = 1'b0;
  logic ro, lo, ho;
  int checks = 0, failures = 0;
  mstate_t m = M_IDLE;
  int visits[5] = '{default: 0};

  turn_signal_fsm dut (.clk(clk), .l(l), .r(r), .ro(ro), .lo(lo), .ho(ho));

  always #5 clk = ~clk;

  // Expected {lo, ho, ro} of a model state.
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

  task automatic check_lamps(string what);
    checks++;
    if ({lo, ho, ro} !== lamps_of(m)) begin
      failures++;
      $display("FAIL %s: state %s lamps lo,ho,ro=%b%b%b expected %b", what, m.name(), lo, ho, ro,
               lamps_of(m));
    end
  endtask

  // Called while the clock is low: apply switches, step the model at the
  // rising edge, check at the next falling edge.
  task automatic step(logic li, logic ri);
    logic [2:0] held;
    l = li;
    r = ri;
    #1;
    held = {lo, ho, ro};
    checks++;
    if (held !== lamps_of(m)) begin
      failures++;
      $display("FAIL lamps changed with inputs between edges");
    end
    @(posedge clk);
    m = next_of(m, li, ri);
    visits[m]++;
    @(negedge clk);
    check_lamps("after edge");
  endtask

  initial begin
    // Power-up state is idle.
    #1 check_lamps("power-up");
    // Directed: each switch combination from idle.
    step(0, 0);
    step(1, 0);  // -> sl
    step(0, 0);  // -> idle
    step(0, 1);  // -> sr
    step(1, 1);  // -> idle, inputs ignored outside idle
    step(1, 1);  // -> slr
    step(0, 0);  // -> sh, inputs ignored
    step(1, 0);  // -> idle, inputs ignored
    // Held switches: left blinks at half rate, both run slr, sh, idle.
    repeat (6) step(1, 0);
    repeat (9) step(1, 1);
    repeat (6) step(0, 1);
    // Random.
    repeat (2000) step(1'($urandom), 1'($urandom));
    foreach (visits[i]) begin
      checks++;
      if (visits[i] == 0) begin
        failures++;
        $display("FAIL state %0d never visited", i);
      end
    end
    $display("visits idle=%0d sl=%0d sr=%0d slr=%0d sh=%0d", visits[M_IDLE], visits[M_SL],
             visits[M_SR], visits[M_SLR], visits[M_SH]);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Watchdog.
  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("FAIL watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
