// tone_monitor: checker shared by the tone generator's end-to-end tests.
//
// Watches the speaker pin and the timer state of the tone generator, one
// sample per clock (at the falling edge), and checks, independently of the
// design's internals:
//   - the speaker is low on every clock that follows a clock with the timer
//     off;
//   - while the timer stays on, consecutive speaker toggles are exactly M
//     clocks apart;
//   - each tone keeps the timer on for exactly N-1 clocks, and the number of
//     toggles in it is floor((N-1)/M) or one more.
// It counts tones, toggles and the times the speaker was forced low because
// the timer ran out while the level was high.
module tone_monitor #(
  parameter int unsigned N = 10,
  parameter int unsigned M = 3
) (
  input  logic clk,
  input  logic active,
  input  logic spkr,
  input  logic timer_on
);
  int checks = 0, failures = 0;
  int tones = 0, toggles = 0, forced_low = 0;
  int on_len = 0, tone_toggles = 0, since_toggle = -1;
  logic prev_spkr = 1'b0, prev_on = 1'b0;

  // A sample is taken after each rising edge, so the speaker level in one
  // sample follows from the timer state in the sample before it.
  always @(negedge clk) if (active) begin
    if (!prev_on) begin
      checks++;
      if (spkr) begin failures++; $display("%0t: speaker high after a timer-off clock", $time); end
      if (prev_spkr && !spkr) forced_low++;
    end
    if (timer_on && !prev_on) begin
      on_len = 0; tone_toggles = 0; since_toggle = -1;
    end
    if (timer_on) on_len++;
    if (prev_on && spkr != prev_spkr) begin   // toggle caused by the divider
      toggles++; tone_toggles++;
      if (since_toggle >= 0) begin
        checks++;
        if (since_toggle != int'(M)) begin
          failures++; $display("%0t: toggles %0d clocks apart", $time, since_toggle);
        end
      end
      since_toggle = 0;
    end
    if (since_toggle >= 0) since_toggle++;
    if (!timer_on && prev_on) begin           // last clock a toggle can happen
      tones++;
      checks++;
      if (on_len != int'(N) - 1) begin
        failures++; $display("%0t: timer on for %0d clocks", $time, on_len);
      end
      checks++;
      if (tone_toggles < int'((N - 1) / M) || tone_toggles > int'((N - 1) / M) + 1) begin
        failures++; $display("%0t: %0d toggles in a tone", $time, tone_toggles);
      end
    end
    prev_spkr = spkr;
    prev_on   = timer_on;
  end
endmodule
