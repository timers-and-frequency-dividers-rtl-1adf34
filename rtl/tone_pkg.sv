// tone_pkg: constants and helper functions shared by the keypad tone
// generator.
//
// The generator runs from a 50 MHz board clock. The tone lasts one second
// (N = 50,000,000 clocks) and its frequency is f = 500 + 100*d0 Hz, where d0
// is a digit chosen per build (0..9). The speaker pin toggles once every
// half period, so the divider counts CLK_HZ / (2*f) clocks between toggles,
// rounded to the nearest whole clock. The counter widths (26 bits for the
// timer, 20 bits for the divider) are those of the reference schematic; the
// functions below let a build derive the timing from d0 and the clock rate.
package tone_pkg;

  localparam int unsigned CLK_HZ_DEFAULT   = 50_000_000;  // board clock
  localparam int unsigned D0_DEFAULT       = 7;           // digit in f = 500 + 100*d0
  localparam int unsigned TIMER_W_DEFAULT  = 26;          // timercnt[25:0]
  localparam int unsigned TONE_W_DEFAULT   = 20;          // tonecnt[19:0]

  // Tone frequency in Hz for digit d0.
  function automatic int unsigned tone_hz(input int unsigned d0);
    return 500 + 100 * d0;
  endfunction

  // Clocks between speaker toggles (half a tone period), rounded.
  function automatic int unsigned half_period_clks(input int unsigned clk_hz,
                                                   input int unsigned f_hz);
    return (clk_hz + f_hz) / (2 * f_hz);
  endfunction

endpackage
