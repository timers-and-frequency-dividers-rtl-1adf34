// tone_timer_tb: self-checking test of the one-shot tone timer.
//
// Uses N = 10 in a 5-bit counter. A directed part checks that a start pulse
// loads N-1, that the timer is on for exactly N-1 clocks, that a start while
// on is ignored and that the count holds at zero. A random part drives start
// pulses and compares count and `on` each clock with a cycle model.
module tone_timer_tb;
  localparam int unsigned N = 10;
  localparam int unsigned W = 5;
  logic clk = 1'b0;
  logic rst, start;
  logic [W-1:0] count;
  logic on;
  int checks = 0, failures = 0;
  int model, on_clocks, ignored;

  tone_timer #(.WIDTH(W), .N(N)) dut (.clk(clk), .rst(rst), .start(start), .count(count), .on(on));

  always #5 clk = ~clk;

  always @(posedge clk) begin
    if (rst)                      model <= 0;
    else if (model == 0 && start) model <= N - 1;
    else if (model > 0)           model <= model - 1;
    if (!rst && model > 0 && start) ignored <= ignored + 1;
  end

  always @(negedge clk) if (!rst) begin
    checks++;
    if (int'(count) != model || on !== (model != 0)) begin
      failures++;
      $display("mismatch at %0t: count=%0d on=%b expected %0d", $time, count, on, model);
    end
  end

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    ignored = 0;
    rst = 1'b1; start = 1'b0;
    repeat (2) @(negedge clk);
    rst = 1'b0;
    @(negedge clk);
    // one pulse: on for exactly N-1 clocks
    start = 1'b1; @(negedge clk); start = 1'b0;
    checks++; if (count !== W'(N - 1)) begin failures++; $display("load value %0d", count); end
    on_clocks = 0;
    while (on) begin on_clocks++; @(negedge clk); end
    checks++; if (on_clocks != N - 1) begin failures++; $display("on for %0d clocks", on_clocks); end
    repeat (5) @(negedge clk);
    checks++; if (count !== '0) begin failures++; $display("count did not stay at zero"); end
    // retrigger while on is ignored
    start = 1'b1; @(negedge clk); start = 1'b0;
    repeat (3) @(negedge clk);
    start = 1'b1; @(negedge clk); start = 1'b0;
    checks++; if (count !== W'(N - 5)) begin failures++; $display("retrigger changed count to %0d", count); end
    // random start pulses
    repeat (3000) begin
      start = ($urandom_range(0, 7) == 0);
      @(negedge clk);
    end
    start = 1'b0;
    checks++;
    if (ignored == 0) begin failures++; $display("no ignored start seen"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
