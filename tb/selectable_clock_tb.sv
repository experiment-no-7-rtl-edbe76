// selectable_clock_tb: self-checking testbench for the selectable clock
// divider.
//
// Two instances are driven by a 50 MHz clock (20 ns period). The first has
// short divisors (0.1 Hz: 20, 1 Hz: 14, 10 Hz: 9, 1 kHz: 6) and is checked
// cycle by cycle against a reference counter kept in the testbench, in all
// four settings and across setting changes, including a change to a smaller
// divisor while the count is past it. For every setting the testbench also
// measures the period of out_clk and its high time and compares them with
// N and N/2+1. The second instance keeps the full 50 MHz divisors and is
// run in the 1 kHz setting (s1 s0 = 11): its period must be 50,000 clocks,
// i.e. 1 ms, and its high time 25,001 clocks.
`timescale 1ns/1ps
module selectable_clock_tb;

  localparam int unsigned D00 = 20, D01 = 14, D10 = 9, D11 = 6;

  logic clk = 1'b0;
  logic s0 = 1'b0, s1 = 1'b0;
  logic out_small, out_full;
  int checks = 0, failures = 0;

  selectable_clock #(.DIV_0P1HZ(D00), .DIV_1HZ(D01), .DIV_10HZ(D10), .DIV_1KHZ(D11)) dut_small (
    .clk(clk), .s0(s0), .s1(s1), .out_clk(out_small)
  );

  selectable_clock dut_full (.clk(clk), .s0(1'b1), .s1(1'b1), .out_clk(out_full));

  always #10 clk = ~clk;

  function automatic int unsigned div_of(logic a1, logic a0);
    case ({a1, a0})
      2'b00:   return D00;
      2'b01:   return D01;
      2'b10:   return D10;
      default: return D11;
    endcase
  endfunction

  // Reference: count wraps to 0 when count+1 reaches N; output high while
  // the new count is at most N/2. Both start from count 0.
  int unsigned ref_count = 0;
  bit ref_out;
  bit ref_valid = 0;
  bit check_on = 0;

  always @(posedge clk) begin
    int unsigned n, c;
    n = div_of(s1, s0);
    c = ref_count + 1;
    if (c >= n) c = 0;
    ref_count <= c;
    ref_out   <= (c <= n / 2);
    ref_valid <= 1'b1;
  end

  always @(negedge clk) begin
    if (check_on && ref_valid) begin
      checks++;
      if (out_small !== ref_out) begin
        failures++;
        $display("FAIL t=%0t sel=%b%b out_clk=%b expected %b", $time, s1, s0, out_small, ref_out);
      end
    end
  end

  // Measure one full period of out_clk (rising edge to rising edge, sampled
  // at falling clk edges) and the number of clocks it is high.
  task automatic measure(bit full, output int unsigned period, output int unsigned high);
    logic prev, cur;
    period = 0;
    high   = 0;
    prev   = full ? out_full : out_small;
    // Find a rising edge.
    forever begin
      @(negedge clk);
      cur = full ? out_full : out_small;
      if (cur && !prev) break;
      prev = cur;
    end
    // Count until the next rising edge.
    prev = cur;
    forever begin
      period++;
      if (cur) high++;
      @(negedge clk);
      cur = full ? out_full : out_small;
      if (cur && !prev) break;
      prev = cur;
    end
  endtask

  initial begin
    int unsigned p, h;
    @(negedge clk);
    check_on = 1;
    for (int sel = 0; sel < 4; sel++) begin
      {s1, s0} = 2'(sel);
      repeat (50) @(negedge clk);
      measure(0, p, h);
      checks++;
      if (p != div_of(s1, s0) || h != div_of(s1, s0) / 2 + 1) begin
        failures++;
        $display("FAIL sel=%b%b period=%0d high=%0d expected %0d/%0d", s1, s0, p, h,
                 div_of(s1, s0), div_of(s1, s0) / 2 + 1);
      end else
        $display("sel=%b%b period=%0d clocks high=%0d clocks", s1, s0, p, h);
    end
    // Switch from the longest divisor to the shortest while past it.
    {s1, s0} = 2'b00;
    repeat (15) @(negedge clk);
    {s1, s0} = 2'b11;
    repeat (30) @(negedge clk);
    // Random setting changes.
    repeat (100) begin
      {s1, s0} = 2'($urandom);
      repeat ($urandom_range(1, 40)) @(negedge clk);
    end
    check_on = 0;
    // Full-size divisor, 1 kHz setting: 50,000 clocks per period.
    measure(1, p, h);
    checks++;
    if (p != 50_000 || h != 25_001) begin
      failures++;
      $display("FAIL full-size 1 kHz period=%0d high=%0d expected 50000/25001", p, h);
    end else
      $display("full-size 1 kHz: period=%0d clocks = %0d ns", p, p * 20);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Watchdog.
  initial begin
    repeat (200_000) @(posedge clk);
    failures++;
    $display("FAIL watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
