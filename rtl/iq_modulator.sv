// iq_modulator: first step of the up-conversion, the inverse of the
// demodulator.
//
// The DAC runs at the ADC sample rate f_s. Every D-th DAC sample carries the
// drive vector's components in the order I, Q, -I, -Q (I, -Q, -I, Q with
// ccw), restoring the alternating signs the demodulator removed; the D-1
// samples in between are zero. The image of this sequence at f_RF is what
// the band-pass filter after the DAC keeps. The drive vector is taken from
// i_in/q_in when in_valid pulses and held until the next update.
// power_en = 0 silences the output.
//
// Timing: dac_data is registered; the slot counter advances once per D
// clocks starting right after reset, in step with the demodulator's.
// The +/-1 multiplication of I and Q and the use of D follow the
// controller's description; the zeros between the D-th samples follow its
// measured DAC waveform (narrow pulses separated by zero output).
module iq_modulator #(
  parameter int W = 16
) (
  input  logic                clock,
  input  logic                reset,
  input  logic signed [W-1:0] i_in,
  input  logic signed [W-1:0] q_in,
  input  logic                in_valid,
  input  logic [5:0]          dec_fact,
  input  logic                ccw,
  input  logic                power_en,
  output logic signed [W-1:0] dac_data
);

  localparam logic signed [W-1:0] MAXV = W'((1 << (W - 1)) - 1);

  logic signed [W-1:0] i_hold, q_hold;
  logic [5:0]          dec_cnt;
  logic [1:0]          slot;

  function automatic logic signed [W-1:0] neg_sat(input logic signed [W-1:0] v);
    return (v == -MAXV - 1) ? MAXV : -v;
  endfunction

  logic signed [W-1:0] slot_val;
  always_comb begin
    unique case (slot)
      2'd0: slot_val = i_hold;
      2'd1: slot_val = ccw ? neg_sat(q_hold) : q_hold;
      2'd2: slot_val = neg_sat(i_hold);
      default: slot_val = ccw ? q_hold : neg_sat(q_hold);
    endcase
  end

  always_ff @(posedge clock) begin
    if (reset) begin
      i_hold   <= '0;
      q_hold   <= '0;
      dec_cnt  <= '0;
      slot     <= '0;
      dac_data <= '0;
    end else begin
      if (in_valid) begin
        i_hold <= i_in;
        q_hold <= q_in;
      end
      dec_cnt <= (dec_cnt + 6'd1 >= dec_fact) ? 6'd0 : dec_cnt + 6'd1;
      if (dec_cnt == 6'd0) begin
        slot     <= slot + 2'd1;
        dac_data <= power_en ? slot_val : '0;
      end else begin
        dac_data <= '0;
      end
    end
  end

endmodule
