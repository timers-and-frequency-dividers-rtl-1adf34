// spkr_toggle: the speaker output register.
//
// A two-state machine whose state is the level on the speaker pin, L or H.
// While the timer is on, the level is inverted on every clock on which the
// frequency divider reads zero, giving a square wave whose half period is
// the divider's length. While the timer is off the level is forced low on
// the next clock, whatever the divider is doing, so the pin rests low
// between tones. Both rules follow the specification; the enum encoding and
// the synchronous reset to L are this design's choices.
//
// Interface: clk, synchronous active-high rst (level low), div_zero from the
// divider, timer_on from the timer, spkr (registered, to the pin).
// Timing: spkr changes one clock after the inputs that cause the change.
module spkr_toggle (
  input  logic clk,
  input  logic rst,
  input  logic div_zero,
  input  logic timer_on,
  output logic spkr
);

  typedef enum logic {L = 1'b0, H = 1'b1} level_e;

  level_e state, state_next;

  always_comb begin
    if (!timer_on)     state_next = L;
    else if (div_zero) state_next = (state == L) ? H : L;
    else               state_next = state;
  end

  always_ff @(posedge clk) begin
    if (rst) state <= L;
    else     state <= state_next;
  end

  assign spkr = (state == H);

endmodule
