// lab4_full_tb: one complete operation of the tone generator at its default
// size: 50 MHz clock, one-second tone, d0 = 7 (1200 Hz).
//
// Key 1 is pressed for 1 ms and released; the test then runs until the tone
// is over (a little more than 50,000,000 clocks). tone_monitor checks every
// clock: the speaker toggles every M = 20,833 clocks while the timer is on
// and is low otherwise, and the timer stays on for N-1 = 49,999,999 clocks.
// The test then checks the tone as a listener would hear it: its frequency,
// from the toggle spacing, lies within 0.1 % of 500 + 100*7 = 1200 Hz, and
// its length, from the first to the last clock the speaker was driven by
// the tone, is one second to within one tone period.
module lab4_full_tb;
  localparam real CLK_HZ = 50.0e6;
  localparam real F_HZ   = 1200.0;
  localparam int unsigned N = 50_000_000;
  localparam int unsigned M = 20_833;

  logic clk = 1'b0;
  logic rst;
  logic [3:0] row, col;
  logic [3:0][3:0] key;
  logic spkr, timer_on;
  logic [25:0] timercnt;
  logic [19:0] tonecnt;
  logic active = 1'b0;
  int checks = 0, failures = 0;
  longint cyc = 0, first_toggle = -1, last_toggle = -1, on_start = -1, on_end = -1;
  logic prev_spkr = 1'b0, prev_on = 1'b0;
  real f_meas, dur_s;

  lab4 dut (
    .clk50(clk), .rst(rst), .row(row), .col(col), .spkr(spkr),
    .timercnt(timercnt), .tonecnt(tonecnt), .timer_on(timer_on)
  );
  keypad_model u_keys (.row(row), .key(key), .col(col));
  tone_monitor #(.N(N), .M(M)) u_mon (.clk(clk), .active(active), .spkr(spkr), .timer_on(timer_on));

  always #10 clk = ~clk;   // 20 ns period

  always @(negedge clk) if (active) begin
    cyc++;
    if (timer_on && !prev_on) on_start = cyc;
    if (!timer_on && prev_on) on_end = cyc;
    if (spkr != prev_spkr) begin
      if (first_toggle < 0) first_toggle = cyc;
      last_toggle = cyc;
    end
    prev_spkr = spkr;
    prev_on   = timer_on;
  end

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  initial begin
    #(64'd20 * 64'd52_000_000);
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
    repeat (100) @(negedge clk);
    key[3][3] = 1'b1;                 // press key 1 for 1 ms
    repeat (50_000) @(negedge clk);
    key[3][3] = 1'b0;
    wait (on_end > 0);
    repeat (2 * M) @(negedge clk);
    active = 1'b0;

    check(u_mon.tones == 1, $sformatf("%0d tones", u_mon.tones));
    check(on_end - on_start == longint'(N) - 1,
          $sformatf("timer on for %0d clocks", on_end - on_start));
    f_meas = CLK_HZ * (u_mon.toggles - 1) / (2.0 * real'(last_toggle - first_toggle));
    check(f_meas > F_HZ * 0.999 && f_meas < F_HZ * 1.001,
          $sformatf("tone frequency %f Hz", f_meas));
    dur_s = real'(on_end - on_start + 1) / CLK_HZ;
    check(dur_s > 1.0 - 1.0 / F_HZ && dur_s < 1.0 + 1.0 / F_HZ,
          $sformatf("tone length %f s", dur_s));
    check(!spkr && !timer_on, "silent after the tone");
    $display("tone: %f Hz, %f s, %0d toggles", f_meas, dur_s, u_mon.toggles);
    checks   += u_mon.checks;
    failures += u_mon.failures;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
