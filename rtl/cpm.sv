// cpm: complex phase modulator.
//
// Adds to the input vector V_in = (I, Q) a vector in quadrature to it whose
// length is k times |V_in|: V_out = V_in + j*k*V_in, i.e.
//   I_out = I - k*Q,   Q_out = Q + k*I.
// With k = tan(phi) the output is V_in turned by phi and lengthened by
// 1/cos(phi), the inverse of what a cavity detuned by phi does to the drive;
// fed with the phase loop correction it removes the phase and amplitude
// errors of a detuned cavity together. k is signed fixed point Q1.15
// (k = 1.0 is not representable; 32767 = 0.99997).
//
// Timing: outputs registered, out_valid one clock after in_valid. Outputs
// saturate to W bits.
// The quadrature correction and the 1/cos(phi) gain follow the
// controller's description; the Q1.15 format of k is this design's choice.
module cpm
  import llrf_pkg::*;
#(
  parameter int W = 16
) (
  input  logic                clock,
  input  logic                reset,
  input  logic                in_valid,
  input  logic signed [W-1:0] i_in,
  input  logic signed [W-1:0] q_in,
  input  logic signed [W-1:0] k,
  output logic signed [W-1:0] i_out,
  output logic signed [W-1:0] q_out,
  output logic                out_valid
);

  logic signed [2*W-1:0] kq, ki;
  logic signed [39:0]    i_n, q_n;

  always_comb begin
    kq  = q_in * k;
    ki  = i_in * k;
    i_n = 40'(i_in) - (40'(kq) >>> (W - 1));
    q_n = 40'(q_in) + (40'(ki) >>> (W - 1));
  end

  always_ff @(posedge clock) begin
    if (reset) begin
      i_out     <= '0;
      q_out     <= '0;
      out_valid <= 1'b0;
    end else begin
      out_valid <= in_valid;
      if (in_valid) begin
        i_out <= W'(sat_s(i_n, W));
        q_out <= W'(sat_s(q_n, W));
      end
    end
  end

endmodule
