// freq_divider: free-running divide-by-M counter.
//
// The counter runs from M-1 down to 0 and reloads M-1 on the clock after it
// reads 0, so it passes through M states per cycle. `zero` is high during
// the one clock of each cycle on which the count is 0; the speaker register
// toggles on those clocks, so M is half the tone period in clocks. The
// counter never stops: it runs whether or not a tone is being played. The
// count sequence follows the specification; reading M as half the period
// (the specification asks for a toggle every half period) and rounding it
// to the nearest clock are this design's choices.
//
// Interface: clk, synchronous active-high rst (sets the count to M-1), count
// and zero. Timing: after reset `zero` is high on every M-th clock, first
// M-1 clocks after reset is released.
module freq_divider #(
  parameter int unsigned WIDTH = tone_pkg::TONE_W_DEFAULT,
  parameter int unsigned M     = tone_pkg::half_period_clks(
                                   tone_pkg::CLK_HZ_DEFAULT,
                                   tone_pkg::tone_hz(tone_pkg::D0_DEFAULT))
) (
  input  logic             clk,
  input  logic             rst,
  output logic [WIDTH-1:0] count,
  output logic             zero
);

  localparam logic [WIDTH-1:0] TOP = WIDTH'(M - 1);

  assign zero = (count == '0);

  always_ff @(posedge clk) begin
    if (rst || zero) count <= TOP;
    else             count <= count - 1'b1;
  end

  initial assert (M >= 2 && (64'(M) - 1) < (64'd1 << WIDTH))
    else $error("freq_divider: M-1 must fit in WIDTH bits and M must be at least 2");

endmodule
