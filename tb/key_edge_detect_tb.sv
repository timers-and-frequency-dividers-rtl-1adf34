// key_edge_detect_tb: self-checking test of the key press edge detector.
//
// Drives the column with held levels and random toggles and compares `press`
// on every clock with a reference computed from the history of sampled
// inputs: with two synchroniser stages, after clock edge k the output must
// equal x[k-2] & ~x[k-1], where x[j] is the column level sampled at edge j
// (1 before reset is released). Also checks that a long press gives exactly
// one pulse and that a key held through reset counts as one press.
module key_edge_detect_tb;
  logic clk = 1'b0;
  logic rst;
  logic col_n;
  logic press;
  int   checks = 0, failures = 0;
  logic x0, x1, x2;    // x[k], x[k-1], x[k-2] of the reference
  int   pulses;

  key_edge_detect #(.SYNC_STAGES(2)) dut (.clk(clk), .rst(rst), .col_n(col_n), .press(press));

  always #5 clk = ~clk;

  // reference history, sampled at the same edges as the DUT
  always @(posedge clk) begin
    if (rst) begin x0 <= 1'b1; x1 <= 1'b1; x2 <= 1'b1; end
    else     begin x0 <= col_n; x1 <= x0; x2 <= x1; end
  end

  always @(negedge clk) begin
    if (!rst) begin
      checks++;
      if (press !== (x2 & ~x1)) begin
        failures++;
        $display("mismatch at %0t: press=%b expected %b", $time, press, x2 & ~x1);
      end
    end
  end

  always @(posedge clk) if (!rst && press) pulses++;

  initial begin
    #200000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    rst = 1'b1; col_n = 1'b0;          // key held through reset
    pulses = 0;
    repeat (3) @(posedge clk);
    @(negedge clk) rst = 1'b0;
    repeat (10) @(negedge clk);
    checks++;
    if (pulses != 1) begin failures++; $display("key held through reset gave %0d pulses", pulses); end
    // release, then one long press: exactly one pulse, two edges later
    col_n = 1'b1; repeat (5) @(negedge clk);
    pulses = 0;
    col_n = 1'b0;
    @(negedge clk);
    checks++; if (press !== 1'b0) begin failures++; $display("press too early"); end
    @(negedge clk);
    checks++; if (press !== 1'b1) begin failures++; $display("press not after second edge"); end
    @(negedge clk);
    checks++; if (press !== 1'b0) begin failures++; $display("press longer than one clock"); end
    repeat (40) @(negedge clk);
    checks++; if (pulses != 1) begin failures++; $display("long press gave %0d pulses", pulses); end
    // random levels
    repeat (2000) begin
      @(negedge clk);
      col_n = ($urandom_range(0, 3) != 0) ? col_n : ~col_n;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
