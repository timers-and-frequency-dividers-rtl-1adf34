// key_edge_detect: detects a key press on an active-low keypad column.
//
// The keypad column is pulled up and reads low while the key in the driven
// row is held, so a press is a falling edge of the column signal. The raw
// column is first passed through SYNC_STAGES flip-flops, because it comes
// from a mechanical switch with no relation to the clock; the synchroniser is
// this design's own addition. A further register holds the previous
// synchronised level, and `press` is high for exactly one clock when that
// level was 1 and the current one is 0.
//
// Interface: clk, synchronous active-high rst, col_n (raw column, active
// low), press (one-clock pulse).
// Timing: `press` is high during the clock that follows the SYNC_STAGES-th
// clock edge at which the column is sampled low. Reset sets every stage to 1
// (key released), so a key held through reset counts as one press when
// reset is released.
module key_edge_detect #(
  parameter int unsigned SYNC_STAGES = 2
) (
  input  logic clk,
  input  logic rst,
  input  logic col_n,
  output logic press
);

  logic [SYNC_STAGES-1:0] sync_q;
  logic                   prev_q;

  always_ff @(posedge clk) begin
    if (rst) begin
      sync_q <= '1;
      prev_q <= 1'b1;
    end else begin
      sync_q <= {sync_q[SYNC_STAGES-2:0], col_n};
      prev_q <= sync_q[SYNC_STAGES-1];
    end
  end

  assign press = prev_q & ~sync_q[SYNC_STAGES-1];

  initial assert (SYNC_STAGES >= 2)
    else $error("key_edge_detect: SYNC_STAGES must be at least 2");

endmodule
