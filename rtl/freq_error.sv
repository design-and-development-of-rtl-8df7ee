// freq_error: frequency error of a cavity from its phase error.
//
// The discrete instantaneous frequency is the backward difference of the
// phase, f(n) = [phi(n) - phi(n-1)] mod 2*pi. Phases are W-bit binary
// fractions of a turn, so the W-bit subtraction wraps exactly like the
// mod 2*pi. The differences are summed over 2^WIN_EXP samples; the sum,
// proportional to the mean frequency offset over the window, is latched
// into freq_err and the accumulator restarts. The slow tuner software reads
// this value to decide how far to move the cavity tuner.
//
// Timing: out_valid pulses for one clock, one clock after the in_valid that
// completes a window; freq_err holds its value until the next window. The
// first sample after reset only primes phi(n-1).
// The backward difference with wrap-around and its accumulation follow the
// controller's description; the fixed window is this design's choice.
module freq_error #(
  parameter int W       = 16,
  parameter int OUT_W   = 24,
  parameter int WIN_EXP = 8
) (
  input  logic                    clock,
  input  logic                    reset,
  input  logic                    in_valid,
  input  logic signed [W-1:0]     phase,
  output logic signed [OUT_W-1:0] freq_err,
  output logic                    out_valid
);

  logic signed [W-1:0]     prev;
  logic                    primed;
  logic signed [OUT_W-1:0] acc;
  logic [WIN_EXP-1:0]      cnt;

  logic signed [W-1:0]     diff;
  always_comb diff = phase - prev;  // wraps modulo 2*pi

  always_ff @(posedge clock) begin
    if (reset) begin
      prev      <= '0;
      primed    <= 1'b0;
      acc       <= '0;
      cnt       <= '0;
      freq_err  <= '0;
      out_valid <= 1'b0;
    end else begin
      out_valid <= 1'b0;
      if (in_valid) begin
        prev   <= phase;
        primed <= 1'b1;
        if (primed) begin
          cnt <= cnt + 1'b1;
          if (cnt == '1) begin
            freq_err  <= acc + OUT_W'(diff);
            out_valid <= 1'b1;
            acc       <= '0;
          end else begin
            acc <= acc + OUT_W'(diff);
          end
        end
      end
    end
  end

  initial begin
    assert (W + WIN_EXP <= OUT_W) else $error("freq_error: window sum may overflow OUT_W");
  end

endmodule
