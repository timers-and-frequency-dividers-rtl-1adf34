// lab4_digits_tb: the tone generator built for every digit d0 = 0..9.
//
// Ten copies of the design run side by side from one 50 MHz clock and one
// keypad, each with its own D0 and the divider length it derives from it.
// The tone is shortened to N = 200,000 clocks (4 ms) so that the test is
// quick; the divider is at full size. For each copy the expected divider
// length is worked out here with real arithmetic, 50e6 / (2 * (500 + 100*d0))
// rounded to the nearest integer, and tone_monitor checks that the speaker
// toggles exactly that many clocks apart, so the tone is within a rounding
// step of the required 500 + 100*d0 Hz.
module lab4_digits_tb;
  localparam int unsigned N = 200_000;
  localparam real CLK_HZ = 50.0e6;

  logic clk = 1'b0;
  logic rst;
  logic active = 1'b0;
  logic [3:0][3:0] key;
  int checks = 0, failures = 0;

  always #10 clk = ~clk;

  for (genvar d = 0; d < 10; d++) begin : g_digit
    localparam int unsigned M_EXP = int'(CLK_HZ / (2.0 * (500.0 + 100.0 * d)));  // real to int rounds
    int m_exp = M_EXP;
    logic [3:0] row, col;
    logic spkr, timer_on;
    logic [25:0] timercnt;
    logic [19:0] tonecnt;
    lab4 #(.D0(d), .N(N)) dut (
      .clk50(clk), .rst(rst), .row(row), .col(col), .spkr(spkr),
      .timercnt(timercnt), .tonecnt(tonecnt), .timer_on(timer_on)
    );
    keypad_model u_keys (.row(row), .key(key), .col(col));
    tone_monitor #(.N(N), .M(M_EXP)) u_mon (
      .clk(clk), .active(active), .spkr(spkr), .timer_on(timer_on)
    );
  end

  initial begin
    #(64'd20 * 64'd400_000);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

`define COLLECT(d) \
    checks += g_digit[d].u_mon.checks + 1; \
    failures += g_digit[d].u_mon.failures; \
    if (g_digit[d].u_mon.tones != 1 || g_digit[d].u_mon.toggles < 2) begin \
      failures++; $display("d0=%0d: %0d tones, %0d toggles", d, g_digit[d].u_mon.tones, g_digit[d].u_mon.toggles); \
    end else \
      $display("d0=%0d: toggles every %0d clocks, %0d toggles", d, g_digit[d].m_exp, g_digit[d].u_mon.toggles);

  initial begin
    key = '0;
    rst = 1'b1;
    repeat (3) @(negedge clk);
    rst = 1'b0;
    active = 1'b1;
    repeat (10) @(negedge clk);
    key[3][3] = 1'b1;
    repeat (1000) @(negedge clk);
    key[3][3] = 1'b0;
    repeat (N + 60_000) @(negedge clk);
    active = 1'b0;
    `COLLECT(0) `COLLECT(1) `COLLECT(2) `COLLECT(3) `COLLECT(4)
    `COLLECT(5) `COLLECT(6) `COLLECT(7) `COLLECT(8) `COLLECT(9)
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
