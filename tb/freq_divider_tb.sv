// freq_divider_tb: self-checking test of the divide-by-M counter.
//
// Two instances: a small one (M = 5, 3 bits) checked against a cycle model
// of the count on every clock, and one at the default size (M = 20833 for a
// 1200 Hz tone from 50 MHz) whose zero flag must recur exactly every M
// clocks, with the first zero M-1 clocks after reset.
module freq_divider_tb;
  localparam int unsigned MS = 5;
  localparam int unsigned MD = 20833;   // 50e6 / (2 * 1200), rounded
  logic clk = 1'b0;
  logic rst;
  logic [2:0]  cnt_s;
  logic        zero_s;
  logic [19:0] cnt_d;
  logic        zero_d;
  int checks = 0, failures = 0;
  int model, since, zeros_d;
  bit seen_d;

  freq_divider #(.WIDTH(3), .M(MS)) dut_s (.clk(clk), .rst(rst), .count(cnt_s), .zero(zero_s));
  freq_divider dut_d (.clk(clk), .rst(rst), .count(cnt_d), .zero(zero_d));

  always #5 clk = ~clk;

  always @(posedge clk) begin
    if (rst)             model <= MS - 1;
    else if (model == 0) model <= MS - 1;
    else                 model <= model - 1;
  end

  always @(negedge clk) if (!rst) begin
    checks++;
    if (int'(cnt_s) != model || zero_s !== (model == 0)) begin
      failures++;
      $display("small: count=%0d zero=%b expected %0d", cnt_s, zero_s, model);
    end
  end

  initial begin
    #(10 * 6 * MD);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    since = 0; seen_d = 1'b0; zeros_d = 0;
    rst = 1'b1;
    repeat (2) @(negedge clk);
    rst = 1'b0;
    repeat (4 * MD + 10) begin
      @(negedge clk);
      since++;
      if (zero_d) begin
        checks++;
        if (since != (seen_d ? MD : MD - 1)) begin
          failures++;
          $display("default: zero after %0d clocks", since);
        end
        seen_d = 1'b1;
        since  = 0;
        zeros_d++;
      end
    end
    checks++;
    if (zeros_d != 4) begin failures++; $display("default: %0d zeros", zeros_d); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
