// lab4: keypad-triggered tone generator.
//
// Pressing key 1 of a 4x4 matrix keypad plays a square-wave tone of
// f = 500 + 100*d0 Hz on a speaker for one second, however long the key is
// held. Four blocks make it up:
//   - key_edge_detect turns the falling edge of keypad column 3 into a
//     one-clock `press` pulse;
//   - tone_timer loads N-1 on that pulse (if idle) and counts down to 0,
//     and is "on" while non-zero;
//   - freq_divider counts M-1 down to 0 continuously, flagging the zero;
//   - spkr_toggle inverts the speaker level on each divider zero while the
//     timer is on, and holds it low otherwise.
// The keypad is scanned by a constant: only row 3 is driven low (row =
// 4'b0111), which puts key 1 on column 3 with the keypad wiring this design
// is used with. Columns have pull-ups and read low while a key in the driven
// row is pressed; only column 3 is used.
//
// Ports: clk50 (50 MHz), rst (synchronous, active high; this design's own
// addition: the board has no reset pin, so tie it low there; the counters
// then clear themselves within 2^26 clocks of power-up), row[3:0] (to the
// keypad), col[3:0] (from the keypad), spkr (to the speaker), plus the timer
// and divider counts and the timer state brought out for observation.
// Timing: the tone starts about four clocks after column 3 falls and lasts N
// clocks; the speaker toggles every M clocks.
// Defaults: CLK_HZ = 50 MHz and N = CLK_HZ (one second), counter widths 26
// and 20 bits as in the reference schematic, D0 = 7 (1200 Hz, M = 20833).
module lab4
  import tone_pkg::*;
#(
  parameter int unsigned CLK_HZ  = CLK_HZ_DEFAULT,
  parameter int unsigned D0      = D0_DEFAULT,
  parameter int unsigned N       = CLK_HZ,
  parameter int unsigned M       = half_period_clks(CLK_HZ, tone_hz(D0)),
  parameter int unsigned TIMER_W = TIMER_W_DEFAULT,
  parameter int unsigned TONE_W  = TONE_W_DEFAULT
) (
  input  logic               clk50,
  input  logic               rst,
  output logic [3:0]         row,
  input  logic [3:0]         col,
  output logic               spkr,
  output logic [TIMER_W-1:0] timercnt,
  output logic [TONE_W-1:0]  tonecnt,
  output logic               timer_on
);

  localparam logic [3:0] ROW_DRIVE = 4'b0111;  // drive row 3 low
  localparam int unsigned KEY_COL  = 3;        // key 1 reads on column 3

  logic press;
  logic div_zero;

  assign row = ROW_DRIVE;

  key_edge_detect u_key (
    .clk   (clk50),
    .rst   (rst),
    .col_n (col[KEY_COL]),
    .press (press)
  );

  tone_timer #(.WIDTH(TIMER_W), .N(N)) u_timer (
    .clk   (clk50),
    .rst   (rst),
    .start (press),
    .count (timercnt),
    .on    (timer_on)
  );

  freq_divider #(.WIDTH(TONE_W), .M(M)) u_div (
    .clk   (clk50),
    .rst   (rst),
    .count (tonecnt),
    .zero  (div_zero)
  );

  spkr_toggle u_spkr (
    .clk      (clk50),
    .rst      (rst),
    .div_zero (div_zero),
    .timer_on (timer_on),
    .spkr     (spkr)
  );

  initial assert (D0 <= 9)
    else $error("lab4: D0 must be a single decimal digit");

endmodule
