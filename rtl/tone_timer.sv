// tone_timer: one-shot timer that sets the length of the tone.
//
// A two-state machine, off and on, whose state is held in the counter
// itself: the timer is on while the count is non-zero. A `start` pulse while
// off loads N-1 (as specified; a reference schematic loads N instead);
// the count then falls by one on every clock until it reaches zero, where
// it stays. A `start` that arrives while the timer is on is
// ignored, so the tone lasts the same time however long or however often the
// key is pressed; ignoring re-triggers is this design's reading of the
// off/on state diagram (the only way from on back to off is the count
// running out).
//
// Interface: clk, synchronous active-high rst (clears the count), start
// (one-clock pulse), count (current value) and on (count != 0).
// Timing: with start high at clock edge k, count is N-1 after edge k and
// reaches 0 after edge k+N-1, so `on` is high for N-1 clocks; the speaker
// register that samples it stays active for N clocks.
module tone_timer #(
  parameter int unsigned WIDTH = tone_pkg::TIMER_W_DEFAULT,
  parameter int unsigned N     = tone_pkg::CLK_HZ_DEFAULT   // 1 s of clocks
) (
  input  logic             clk,
  input  logic             rst,
  input  logic             start,
  output logic [WIDTH-1:0] count,
  output logic             on
);

  localparam logic [WIDTH-1:0] LOAD = WIDTH'(N - 1);

  logic [WIDTH-1:0] count_next;

  assign on = (count != '0);

  always_comb begin
    if (!on && start)   count_next = LOAD;
    else if (on)        count_next = count - 1'b1;
    else                count_next = count;
  end

  always_ff @(posedge clk) begin
    if (rst) count <= '0;
    else     count <= count_next;
  end

  initial assert (N >= 2 && (64'(N) - 1) < (64'd1 << WIDTH))
    else $error("tone_timer: N-1 must fit in WIDTH bits and N must be at least 2");

endmodule
