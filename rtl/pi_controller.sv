// pi_controller: proportional-integral control law for one loop of a cavity
// (field amplitude or phase).
//
// out = err*kp + sum(err*ki), both branches added at the end. Gains are
// unsigned fixed point with GAIN_FRAC fractional bits (gain 1.0 = 2^GAIN_FRAC);
// the integrator keeps those fractional bits so that small gains still
// integrate. The overflow rule depends on what the output drives, selected
// by the saturate input:
//   saturate = 1 (an amplitude, or the CPM factor of a self-excited loop):
//                the integrator and the output clamp to the signed W-bit
//                range (the clamp on the integrator also stops wind-up);
//   saturate = 0 (a drive phase): integrator and output wrap around, as an
//                angle does.
// When enable is low the integrator is cleared and the output is zero
// (loop open).
//
// Timing: out/out_valid follow in_valid by one clock.
// The two branches and the saturate/wrap split follow the controller's
// description; the gain format, the anti-windup clamp and the behaviour when
// disabled are this design's choices.
module pi_controller #(
  parameter int W         = 16,
  parameter int GAIN_FRAC = 8
) (
  input  logic                clock,
  input  logic                reset,
  input  logic                saturate,
  input  logic                enable,
  input  logic                in_valid,
  input  logic signed [W-1:0] err,
  input  logic [W-1:0]        kp,
  input  logic [W-1:0]        ki,
  output logic signed [W-1:0] out,
  output logic                out_valid
);

  localparam int PW = 2 * W + 1;          // product width
  localparam int AW = W + GAIN_FRAC + 2;  // integrator width

  localparam logic signed [AW-1:0] ACC_MAX = AW'(((1 << (W - 1)) - 1)) <<< GAIN_FRAC;
  localparam logic signed [AW-1:0] ACC_MIN = -(AW'(1 << (W - 1)) <<< GAIN_FRAC);

  logic signed [AW-1:0] acc;

  logic signed [PW-1:0] p_prod, i_prod;
  logic signed [PW+1:0] acc_sum;
  logic signed [AW-1:0] acc_next;
  logic signed [PW+1:0] total;
  logic signed [W-1:0]  out_next;

  always_comb begin
    p_prod  = PW'(err) * $signed({1'b0, kp});
    i_prod  = PW'(err) * $signed({1'b0, ki});
    acc_sum = (PW+2)'(acc) + (PW+2)'(i_prod);
    if (saturate) begin
      if (acc_sum > (PW+2)'(ACC_MAX))      acc_next = ACC_MAX;
      else if (acc_sum < (PW+2)'(ACC_MIN)) acc_next = ACC_MIN;
      else                                 acc_next = AW'(acc_sum);
    end else begin
      // keep W integer bits plus the fraction: wrap like an angle
      acc_next = AW'($signed((W + GAIN_FRAC)'(acc_sum)));
    end
    total = ((PW+2)'(p_prod) + (PW+2)'(acc_next)) >>> GAIN_FRAC;
    if (saturate) begin
      if (total > (PW+2)'((1 << (W - 1)) - 1))  out_next = W'((1 << (W - 1)) - 1);
      else if (total < -(PW+2)'(1 << (W - 1)))  out_next = W'(1 << (W - 1));
      else                                       out_next = W'(total);
    end else begin
      out_next = W'(total);
    end
  end

  always_ff @(posedge clock) begin
    if (reset) begin
      acc       <= '0;
      out       <= '0;
      out_valid <= 1'b0;
    end else begin
      out_valid <= in_valid;
      if (!enable) begin
        acc <= '0;
        out <= '0;
      end else if (in_valid) begin
        acc <= acc_next;
        out <= out_next;
      end
    end
  end

endmodule
