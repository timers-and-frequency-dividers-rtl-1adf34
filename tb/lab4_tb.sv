// lab4_tb: end-to-end test of the keypad tone generator at a reduced size.
//
// The tone lasts N = 300 clocks and the speaker toggles every M = 7 clocks,
// so a tone has about 43 toggles. A keypad model sits between the row and
// column ports; key 1 is the key on row 3, column 3. tone_monitor checks the
// speaker against the timer state on every clock. The test exercises, and
// counts, each behaviour of the design:
//   - a short press plays one tone (presses);
//   - contact bounce at the press starts only one tone (bounce_ignored);
//   - a second press during a tone does not extend it (retrigger_ignored);
//   - a key held longer than the tone gives one tone (long_hold);
//   - a tone ending with the speaker high forces it low (forced_low);
//   - keys on undriven rows play nothing (other_key_ignored).
// It also checks the row drive and the delay from key press to timer start
// (three clocks: two synchroniser stages and the timer load).
module lab4_tb;
  localparam int unsigned N = 300;
  localparam int unsigned M = 7;

  logic clk = 1'b0;
  logic rst;
  logic [3:0] row, col;
  logic [3:0][3:0] key;
  logic spkr, timer_on;
  logic [25:0] timercnt;
  logic [19:0] tonecnt;
  logic active = 1'b0;
  int checks = 0, failures = 0;
  int presses = 0, bounce_ignored = 0, retrigger_ignored = 0, long_hold = 0;
  int other_key_ignored = 0;
  int tones_before, lat;

  lab4 #(.N(N), .M(M)) dut (
    .clk50(clk), .rst(rst), .row(row), .col(col), .spkr(spkr),
    .timercnt(timercnt), .tonecnt(tonecnt), .timer_on(timer_on)
  );
  keypad_model u_keys (.row(row), .key(key), .col(col));
  tone_monitor #(.N(N), .M(M)) u_mon (.clk(clk), .active(active), .spkr(spkr), .timer_on(timer_on));

  always #5 clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("%0t: FAIL %s", $time, what); end
  endtask

  task automatic wait_idle();
    while (timer_on) @(negedge clk);
    repeat ($urandom_range(3, 20)) @(negedge clk);
  endtask

  // press key 1 and measure the clocks until the timer turns on
  task automatic press_key1(output int latency);
    key[3][3] = 1'b1;
    latency = 0;
    while (!timer_on && latency < 10) begin @(negedge clk); latency++; end
  endtask

  initial begin
    #(10 * 40 * N);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    key = '0;
    rst = 1'b1;
    repeat (3) @(negedge clk);
    rst = 1'b0;
    active = 1'b1;
    check(row == 4'b0111, "row drive");
    repeat (5) @(negedge clk);
    check(!timer_on && !spkr, "idle after reset");

    // several short presses with varying gaps, so tones end at various
    // divider phases
    repeat (6) begin
      tones_before = u_mon.tones;
      press_key1(lat);
      check(lat == 3, $sformatf("press-to-timer latency %0d", lat));
      repeat (5) @(negedge clk);
      key[3][3] = 1'b0;
      wait_idle();
      check(u_mon.tones == tones_before + 1, "short press plays one tone");
      presses++;
    end

    // bounce: the contact opens and closes a few times at the press
    tones_before = u_mon.tones;
    for (int i = 0; i < 6; i++) begin
      key[3][3] = i[0] ? 1'b0 : 1'b1;
      repeat ($urandom_range(1, 4)) @(negedge clk);
    end
    key[3][3] = 1'b1;
    repeat (20) @(negedge clk);
    key[3][3] = 1'b0;
    wait_idle();
    check(u_mon.tones == tones_before + 1, "bounced press plays one tone");
    if (u_mon.tones == tones_before + 1) bounce_ignored++;

    // second press in the middle of a tone
    tones_before = u_mon.tones;
    press_key1(lat);
    repeat (10) @(negedge clk);
    key[3][3] = 1'b0;
    repeat (N / 2) @(negedge clk);
    check(timer_on, "tone still on at mid-point");
    key[3][3] = 1'b1;
    repeat (10) @(negedge clk);
    key[3][3] = 1'b0;
    wait_idle();
    check(u_mon.tones == tones_before + 1, "second press does not add a tone");
    if (u_mon.tones == tones_before + 1) retrigger_ignored++;

    // key held for three tone lengths
    tones_before = u_mon.tones;
    press_key1(lat);
    repeat (3 * N) @(negedge clk);
    check(!timer_on && !spkr, "tone over while key still held");
    key[3][3] = 1'b0;
    wait_idle();
    check(u_mon.tones == tones_before + 1, "long hold plays one tone");
    if (u_mon.tones == tones_before + 1) long_hold++;

    // keys on rows that are not driven, and key 1's neighbours on row 3
    tones_before = u_mon.tones;
    key[0][3] = 1'b1; key[1][0] = 1'b1; key[2][3] = 1'b1; key[3][0] = 1'b1;
    repeat (50) @(negedge clk);
    key = '0;
    repeat (50) @(negedge clk);
    check(u_mon.tones == tones_before && !timer_on, "other keys play nothing");
    if (u_mon.tones == tones_before && !timer_on) other_key_ignored++;

    active = 1'b0;
    checks   += u_mon.checks;
    failures += u_mon.failures;
    $display("tones=%0d toggles=%0d presses=%0d bounce_ignored=%0d retrigger_ignored=%0d long_hold=%0d forced_low=%0d other_key_ignored=%0d",
             u_mon.tones, u_mon.toggles, presses, bounce_ignored, retrigger_ignored,
             long_hold, u_mon.forced_low, other_key_ignored);
    check(u_mon.tones > 0 && u_mon.toggles > 0, "tone mechanism seen");
    check(presses > 0,            "short press seen");
    check(bounce_ignored > 0,     "bounce ignored seen");
    check(retrigger_ignored > 0,  "retrigger ignored seen");
    check(long_hold > 0,          "long hold seen");
    check(u_mon.forced_low > 0,   "forced low at timer end seen");
    check(other_key_ignored > 0,  "other keys ignored seen");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
