// lock_detector: lock flag of one control loop.
//
// A loop counts as locked while the magnitude of its tracking error has
// stayed at or below thrs for at least wind consecutive error samples. One
// sample outside the threshold, or the loop being disabled, clears the flag
// and restarts the count. wind = 0 behaves like wind = 1.
//
// Timing: locked changes one clock after the in_valid that decides it.
// The controller provides a lock threshold and a lock window register per
// loop and a locked status bit; the rule that combines them is this
// design's choice.
module lock_detector #(
  parameter int W = 16
) (
  input  logic                clock,
  input  logic                reset,
  input  logic                enable,
  input  logic                in_valid,
  input  logic signed [W-1:0] err,
  input  logic [W-1:0]        thrs,
  input  logic [W-1:0]        wind,
  output logic                locked
);

  logic [W-1:0] cnt;
  logic [W-1:0] mag;

  always_comb mag = (err < 0) ? W'(-err) : W'(err);

  always_ff @(posedge clock) begin
    if (reset || !enable) begin
      cnt    <= '0;
      locked <= 1'b0;
    end else if (in_valid) begin
      if (mag > thrs) begin
        cnt    <= '0;
        locked <= 1'b0;
      end else begin
        if (cnt != '1) cnt <= cnt + 1'b1;
        if (cnt + 1'b1 >= wind) locked <= 1'b1;
      end
    end
  end

endmodule
