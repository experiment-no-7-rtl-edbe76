// selectable_clock: clock divider with four selectable output rates.
//
// A free-running counter advances on every rising edge of clk and wraps to
// zero when its incremented value reaches the divisor N of the selected
// rate, so it steps through 0 .. N-1 and out_clk has a period of exactly N
// input clocks. out_clk is registered and is high while the (new) count is at
// most N/2, so each period is N/2+1 clocks high and N/2-1 clocks low.
// With the 50 MHz board clock and the default divisors the rates are:
//   s1 s0 = 0 0 : N = 500,000,000  -> 0.1 Hz
//   s1 s0 = 0 1 : N =  50,000,000  -> 1 Hz
//   s1 s0 = 1 0 : N =   5,000,000  -> 10 Hz
//   s1 s0 = 1 1 : N =      50,000  -> 1 kHz
// When the selection changes to a smaller divisor while the count is already
// past it, the counter wraps on the next edge, so the first period after a
// switch may be short.
//
// Interface: clk in, s0/s1 rate select (sampled every clk edge), out_clk out.
// Timing: out_clk changes one clk edge after the count crosses 0 or N/2+1.
//
// The divisors, the wrap rule and the high/low split follow the original
// design. The counter is as wide as the largest divisor needs (29 bits by
// default) instead of a 32-bit integer; it powers up at zero, as in the
// original, and there is no reset pin. out_clk has no power-up value in the
// original and is given none here: it is defined from the first clk edge on.
// The PROCASSINIT lint warning on the counter stands for this
// reason: the declaration initialiser is the power-up value, not a reset.
module selectable_clock #(
  parameter int unsigned DIV_0P1HZ = 500_000_000,  // s1 s0 = 00
  parameter int unsigned DIV_1HZ   =  50_000_000,  // s1 s0 = 01
  parameter int unsigned DIV_10HZ  =   5_000_000,  // s1 s0 = 10
  parameter int unsigned DIV_1KHZ  =      50_000   // s1 s0 = 11
) (
  input  logic clk,
  input  logic s0,
  input  logic s1,
  output logic out_clk
);

  function automatic longint unsigned max2(longint unsigned a, longint unsigned b);
    return (a > b) ? a : b;
  endfunction

  localparam longint unsigned DIV_MAX =
      max2(max2(64'(DIV_0P1HZ), 64'(DIV_1HZ)), max2(64'(DIV_10HZ), 64'(DIV_1KHZ)));
  localparam int CW = $clog2(DIV_MAX + 64'd1);  // wide enough to hold the divisor

  logic [CW-1:0] count = '0;  // power-up value
  logic [CW-1:0] count_inc;
  logic [CW-1:0] count_next;
  logic [CW-1:0] divisor;

  // Divisor of the selected rate.
  always_comb begin
    unique case ({s1, s0})
      2'b00:   divisor = CW'(DIV_0P1HZ);
      2'b01:   divisor = CW'(DIV_1HZ);
      2'b10:   divisor = CW'(DIV_10HZ);
      default: divisor = CW'(DIV_1KHZ);
    endcase
  end

  assign count_inc  = count + 1'b1;
  assign count_next = (count_inc >= divisor) ? '0 : count_inc;

  always_ff @(posedge clk) begin
    count   <= count_next;
    out_clk <= (count_next <= (divisor >> 1));
  end

endmodule
