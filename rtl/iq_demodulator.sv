// iq_demodulator: extracts the in-phase and quadrature components of an
// undersampled RF signal.
//
// The ADC samples the cavity signal at f_s = D * 4 f_RF / (2N - 1). Every
// D-th sample the RF phase has advanced by a quarter turn, so those samples
// run I, Q, -I, -Q, I, ... The block keeps every D-th sample (decimation),
// removes the alternating sign and pairs each Q with the I before it; a new
// (I, Q) pair appears every 2*D input samples. With ccw set the sequence is
// read as I, -Q, -I, Q instead (the direction depends on N).
//
// With cic_en set, 2^avg_exp consecutive pairs are summed and their mean is
// output once per 2^avg_exp pairs (a first-order CIC filter: moving average
// followed by downsampling), which lowers the white noise of the samples.
// avg_exp is clamped to MAX_AVG_EXP.
//
// The CORDIC that follows accepts positive values only, so the outputs are
// the absolute values |I|, |Q| (saturated to 2^(W-1) - 1) plus sign flags.
//
// Timing: out_valid pulses one clock after the input sample that completes a
// pair (or an averaging window). The decimation, sign removal, averaging and
// absolute value follow the controller's description; pairing after each Q,
// the integrate-and-dump form of the average and the flag encoding are this
// design's choices.
module iq_demodulator
  import llrf_pkg::*;
#(
  parameter int W           = 16,
  parameter int MAX_AVG_EXP = 6
) (
  input  logic                clock,
  input  logic                reset,
  input  logic signed [W-1:0] adc_data,
  input  logic                adc_valid,
  input  logic [5:0]          dec_fact,
  input  logic [4:0]          avg_exp,
  input  logic                cic_en,
  input  logic                ccw,
  output logic [W-1:0]        i_abs,
  output logic [W-1:0]        q_abs,
  output logic                i_neg,
  output logic                q_neg,
  output logic                out_valid
);

  localparam int SW = W + MAX_AVG_EXP + 1;

  logic [5:0]          dec_cnt;
  logic [1:0]          slot;
  logic signed [W:0]   i_cur;          // latest I with sign removed
  logic signed [SW-1:0] i_sum, q_sum;
  logic [MAX_AVG_EXP:0] avg_cnt;

  logic [4:0] exp_eff;
  always_comb exp_eff = !cic_en ? 5'd0 :
                        (avg_exp > 5'(MAX_AVG_EXP)) ? 5'(MAX_AVG_EXP) : avg_exp;

  logic take;
  always_comb take = adc_valid && (dec_cnt == 6'd0);

  // Sample with the slot's sign removed.
  logic signed [W:0] s_corr;
  always_comb begin
    logic neg;
    neg = slot[1] ^ (slot[0] & ccw);
    s_corr = neg ? -(W+1)'(adc_data) : (W+1)'(adc_data);
  end

  // Pair sums including the current Q.
  logic signed [SW-1:0] i_next, q_next;
  always_comb begin
    i_next = i_sum + SW'(i_cur);
    q_next = q_sum + SW'(s_corr);
  end

  function automatic logic [W-1:0] mag(input logic signed [SW-1:0] v);
    logic signed [SW-1:0] a;
    a = (v < 0) ? -v : v;
    return (a > SW'((1 << (W - 1)) - 1)) ? W'((1 << (W - 1)) - 1) : W'(a);
  endfunction

  always_ff @(posedge clock) begin
    if (reset) begin
      dec_cnt   <= '0;
      slot      <= '0;
      i_cur     <= '0;
      i_sum     <= '0;
      q_sum     <= '0;
      avg_cnt   <= '0;
      i_abs     <= '0;
      q_abs     <= '0;
      i_neg     <= 1'b0;
      q_neg     <= 1'b0;
      out_valid <= 1'b0;
    end else begin
      out_valid <= 1'b0;
      if (adc_valid) begin
        dec_cnt <= (dec_cnt + 6'd1 >= dec_fact) ? 6'd0 : dec_cnt + 6'd1;
      end
      if (take) begin
        slot <= slot + 2'd1;
        if (!slot[0]) begin
          i_cur <= s_corr;
        end else begin
          if (avg_cnt + 1 >= (MAX_AVG_EXP + 1)'(1) << exp_eff) begin
            logic signed [SW-1:0] i_avg, q_avg;
            i_avg = i_next >>> exp_eff;
            q_avg = q_next >>> exp_eff;
            i_abs     <= mag(i_avg);
            q_abs     <= mag(q_avg);
            i_neg     <= i_avg < 0;
            q_neg     <= q_avg < 0;
            out_valid <= 1'b1;
            i_sum     <= '0;
            q_sum     <= '0;
            avg_cnt   <= '0;
          end else begin
            i_sum   <= i_next;
            q_sum   <= q_next;
            avg_cnt <= avg_cnt + 1'b1;
          end
        end
      end
    end
  end

endmodule
