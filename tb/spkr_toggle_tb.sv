// spkr_toggle_tb: self-checking test of the speaker output register.
//
// Drives random divider-zero and timer-on inputs and compares the output on
// every clock with a model: low on the clock after timer_on is low, inverted
// on the clock after div_zero with timer_on high, unchanged otherwise. Also
// counts that each kind of transition happened.
module spkr_toggle_tb;
  logic clk = 1'b0;
  logic rst, div_zero, timer_on, spkr;
  logic model;
  int checks = 0, failures = 0;
  int rises, falls_toggle, forced_low;

  spkr_toggle dut (.clk(clk), .rst(rst), .div_zero(div_zero), .timer_on(timer_on), .spkr(spkr));

  always #5 clk = ~clk;

  always @(posedge clk) begin
    if (rst)            model <= 1'b0;
    else if (!timer_on) begin
      if (model) forced_low++;
      model <= 1'b0;
    end else if (div_zero) begin
      if (model) falls_toggle++; else rises++;
      model <= ~model;
    end
  end

  always @(negedge clk) if (!rst) begin
    checks++;
    if (spkr !== model) begin
      failures++;
      $display("mismatch at %0t: spkr=%b expected %b", $time, spkr, model);
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
    rises = 0; falls_toggle = 0; forced_low = 0;
    rst = 1'b1; div_zero = 1'b0; timer_on = 1'b0;
    repeat (2) @(negedge clk);
    rst = 1'b0;
    repeat (4000) begin
      div_zero = ($urandom_range(0, 2) == 0);
      timer_on = ($urandom_range(0, 9) != 0);
      @(negedge clk);
    end
    checks++;
    if (rises == 0 || falls_toggle == 0 || forced_low == 0) begin
      failures++;
      $display("transitions missing: rises=%0d falls=%0d forced=%0d", rises, falls_toggle, forced_low);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
