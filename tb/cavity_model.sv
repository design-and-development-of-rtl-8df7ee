// cavity_model: behavioural model of an RF cavity with its drive and pick-up
// chain, for the testbenches.
//
// DAC side: the drive arrives as the modulator's zero-stuffed sample stream,
// carrying I, Q, -I, -Q every D-th sample starting one clock after reset;
// the model keeps the latest drive vector Vd = DI + j*DQ. With AUTO_ALIGN
// (a drive that comes through a link of unknown delay) the slot grid is
// instead taken from the first non-zero DAC sample, which only turns the
// drive by a constant angle, as a longer cable would.
// Cavity: a first-order resonator in baseband, once per clock
//   V += alpha * ( g * exp(j*phi_c) * Vd - (1 - j*tan_psi) * V )
// where tan_psi is the detuning (tan of the detuning angle), phi_c the
// phase of the cables and amplifier, g their gain. At steady state the
// field is g*Vd/(1 - j*tan_psi): shifted by psi and reduced by cos(psi).
// In a self-excited loop the field turns at a rate set by tan_psi, which is
// how detuning shows up as a frequency error.
// ADC side: the pick-up signal undersampled at f_s = D*4*f_RF/(2N-1),
// N = 11: x[k] = Re(V) cos(t_k) + Im(V) sin(t_k) + noise,
// t_k = 2*pi*k*(2N-1)/(4D), k counting clocks from reset. adc_data is
// registered, the sample for clock k valid from clock k.
// amp and phase report |V| and arg(V) (in 16-bit fractions of a turn).
module cavity_model #(
  parameter real ALPHA = 1.0 / 128.0,
  parameter real GAIN  = 2.0,
  parameter real PHI_C = 0.5,
  parameter int  NOISE = 4,
  parameter bit  AUTO_ALIGN = 1'b0
) (
  input  logic               clock,
  input  logic               reset,
  input  int                 dec,
  input  real                tan_psi,
  input  logic signed [15:0] dac_data,
  output logic signed [15:0] adc_data,
  output real                amp,
  output real                phase
);
  localparam real PI = 3.14159265358979;

  real vi = 0.0, vq = 0.0, di = 0.0, dq = 0.0;
  int  m = 0;
  int  r = 1;          // DAC slot grid: m = r mod D
  bit  aligned = 1'b0;

  function automatic logic signed [15:0] adc_sample(input int k, input real i, input real q);
    real th, x;
    int  xi;
    th = 2.0 * PI * real'(k % (4 * dec)) * 21.0 / (4.0 * dec);
    x  = i * $cos(th) + q * $sin(th);
    xi = int'(x) + ((NOISE > 0) ? int'($urandom_range(2 * NOISE)) - NOISE : 0);
    if (xi > 32767) xi = 32767;
    if (xi < -32768) xi = -32768;
    return 16'(xi);
  endfunction

  initial begin
    adc_data = '0;
    amp = 0.0;
    phase = 0.0;
  end

  always @(posedge clock) begin
    if (reset) begin
      m = 0;
      r = 1;
      aligned = 1'b0;
      di = 0.0;
      dq = 0.0;
      adc_data <= adc_sample(0, vi, vq);
    end else begin
      real ci, cq, ui, uq;
      if (AUTO_ALIGN && !aligned && dac_data != 0) begin
        aligned = 1'b1;
        r = m;
      end
      if ((!AUTO_ALIGN || aligned) && m >= r && (m - r) % dec == 0) begin
        unique case (((m - r) / dec) % 4)
          0: di = real'(dac_data);
          1: dq = real'(dac_data);
          2: di = -real'(dac_data);
          default: dq = -real'(dac_data);
        endcase
      end
      ci = $cos(PHI_C);
      cq = $sin(PHI_C);
      ui = GAIN * (di * ci - dq * cq) - (vi + tan_psi * vq);
      uq = GAIN * (di * cq + dq * ci) - (vq - tan_psi * vi);
      vi = vi + ALPHA * ui;
      vq = vq + ALPHA * uq;
      m++;
      adc_data <= adc_sample(m, vi, vq);
      amp   <= $sqrt(vi * vi + vq * vq);
      phase <= $atan2(vq, vi) / (2.0 * PI) * 65536.0;
    end
  end
endmodule
