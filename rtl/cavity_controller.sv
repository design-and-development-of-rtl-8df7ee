// cavity_controller: amplitude and phase control of one RF cavity.
//
// Data flow, one pass per demodulated (I, Q) pair:
//   ADC samples -> iq_demodulator (|I|, |Q|, signs)
//   -> cordic, vectoring: amplitude and first-quadrant angle; the signs put
//      the angle back in its quadrant (measured cavity phase)
//   -> tracking errors: phase_err = phase set point - phase (wraps),
//      field_err = field set point - amplitude (saturates)
//   -> two pi_controller loops (field: saturating, phase: wrapping in GDR,
//      saturating in SEL where it is the CPM factor),
//      two lock_detectors, freq_error on the phase error
//   -> drive vector in polar form:
//        amplitude = quiescent power + field correction (saturated)
//        phase     = GDR: phase correction
//                    SEL: measured cavity phase + phase shift
//   -> cordic, rotation: drive I/Q
//   -> cpm with k = phase correction in SEL (0 in GDR)
//   -> iq_modulator -> DAC samples.
// In GDR mode the cavity follows a drive whose phase and amplitude the loops
// set; in SEL mode the cavity's own signal, phase shifted, is sent back to
// it, so the loop oscillates at the cavity's resonance, and the CPM's
// quadrature correction pulls the phase to the set point without disturbing
// the amplitude.
//
// Units: amplitude = CORDIC magnitude / 2 (the CORDIC gain K ~ 1.647 is
// kept), a full-scale ADC sine of amplitude A gives about 0.82*A; angles are
// 16-bit fractions of a turn; the rotation CORDIC output is divided by 4 to
// fit the 16-bit DAC word.
//
// Timing: a pair leaves the demodulator every 2*D*2^avg_exp samples (2*D
// without averaging); from a demodulated pair to the updated DAC drive takes
// 2*(CORDIC_ITER+1) + 5 clocks. The block order, the two loops, the
// quiescent offset, the GDR/SEL phase selection and the CPM follow the
// controller's description; the units, the quadrant handling and the
// rescaling are this design's choices.
module cavity_controller
  import llrf_pkg::*;
#(
  parameter int CORDIC_ITER = 16,
  parameter int GAIN_FRAC   = 8,
  parameter int FREQ_WIN    = 8
) (
  input  logic                    clock,
  input  logic                    reset,
  input  logic signed [ADC_W-1:0] adc_data,
  input  logic                    adc_valid,
  input  cav_cfg_t                cfg,
  output cav_status_t             status,
  output logic signed [DAC_W-1:0] dac_data
);

  localparam int CW = CORDIC_W;
  localparam int LW = LOOP_W;
  localparam int LAT = CORDIC_ITER + 1;

  // ---------------------------------------------------------------- demod
  logic [ADC_W-1:0] i_abs, q_abs;
  logic             i_neg, q_neg, dm_valid;

  iq_demodulator #(.W(ADC_W)) u_demod (
    .clock, .reset,
    .adc_data, .adc_valid,
    .dec_fact (cfg.dec_fact),
    .avg_exp  (cfg.avg_exp),
    .cic_en   (cfg.cic_en),
    .ccw      (cfg.ccw),
    .i_abs, .q_abs, .i_neg, .q_neg,
    .out_valid(dm_valid)
  );

  // ---------------------------------------------------------------- to polar
  logic signed [CW-1:0] v_xo, v_yo, v_ao;
  logic                 v_dov, v_rdy;
  logic [1:0]           sign_pipe [LAT];

  cordic #(.W(CW), .ITER(CORDIC_ITER), .VECTORING(1'b1)) u_vec (
    .clock, .reset,
    .div (dm_valid),
    .xi  (CW'(i_abs)),
    .yi  (CW'(q_abs)),
    .ai  ('0),
    .xo  (v_xo), .yo(v_yo), .ao(v_ao),
    .dov (v_dov), .rdy(v_rdy)
  );

  always_ff @(posedge clock) begin
    sign_pipe[0] <= {i_neg, q_neg};
    for (int s = 1; s < LAT; s++) sign_pipe[s] <= sign_pipe[s-1];
  end

  // Measured field amplitude and cavity phase.
  logic [LW-1:0] field_meas, phase_meas;
  logic          meas_valid;

  always_ff @(posedge clock) begin
    if (reset) begin
      field_meas <= '0;
      phase_meas <= '0;
      meas_valid <= 1'b0;
    end else begin
      meas_valid <= v_dov;
      if (v_dov) begin
        logic [LW-1:0] th;
        logic [CW-1:0] half_mag;
        th       = v_ao[CW-1 -: LW];
        half_mag = CW'(v_xo >>> 1);
        field_meas <= (half_mag > CW'({LW{1'b1}})) ? '1 : LW'(half_mag);
        unique case (sign_pipe[LAT-1])
          2'b00: phase_meas <= th;                           // I >= 0, Q >= 0
          2'b10: phase_meas <= LW'(1 << (LW - 1)) - th;      // I < 0,  Q >= 0
          2'b11: phase_meas <= th + LW'(1 << (LW - 1));      // I < 0,  Q < 0
          default: phase_meas <= -th;                        // I >= 0, Q < 0
        endcase
      end
    end
  end

  // ---------------------------------------------------------------- errors
  logic signed [LW-1:0] phase_err, field_err;
  logic                 err_valid;

  always_ff @(posedge clock) begin
    if (reset) begin
      phase_err <= '0;
      field_err <= '0;
      err_valid <= 1'b0;
    end else begin
      err_valid <= meas_valid;
      if (meas_valid) begin
        phase_err <= cfg.phase_sp - phase_meas;
        field_err <= LW'(sat_s(40'($signed({1'b0, cfg.field_sp})) - 40'($signed({1'b0, field_meas})), LW));
      end
    end
  end

  // ---------------------------------------------------------------- loops
  logic signed [LW-1:0] phase_corr, field_corr;
  logic                 ph_valid, fl_valid;

  pi_controller #(.W(LW), .GAIN_FRAC(GAIN_FRAC)) u_field_pi (
    .clock, .reset,
    .saturate (1'b1),
    .enable   (cfg.field_loop_en),
    .in_valid (err_valid),
    .err      (field_err),
    .kp       (cfg.field_kp),
    .ki       (cfg.field_ki),
    .out      (field_corr),
    .out_valid(fl_valid)
  );

  // The phase correction is a drive angle in GDR (wraps) but the CPM factor
  // in SEL, where wrapping from +1 to -1 would throw the loop off: clamp it.
  pi_controller #(.W(LW), .GAIN_FRAC(GAIN_FRAC)) u_phase_pi (
    .clock, .reset,
    .saturate (cfg.mode == MODE_SEL),
    .enable   (cfg.phase_loop_en),
    .in_valid (err_valid),
    .err      (phase_err),
    .kp       (cfg.phase_kp),
    .ki       (cfg.phase_ki),
    .out      (phase_corr),
    .out_valid(ph_valid)
  );

  logic phase_locked, field_locked;

  lock_detector #(.W(LW)) u_phase_lock (
    .clock, .reset,
    .enable  (cfg.phase_loop_en),
    .in_valid(err_valid),
    .err     (phase_err),
    .thrs    (cfg.phase_lck_thrs),
    .wind    (cfg.phase_lck_wind),
    .locked  (phase_locked)
  );

  lock_detector #(.W(LW)) u_field_lock (
    .clock, .reset,
    .enable  (cfg.field_loop_en),
    .in_valid(err_valid),
    .err     (field_err),
    .thrs    (cfg.field_lck_thrs),
    .wind    (cfg.field_lck_wind),
    .locked  (field_locked)
  );

  logic signed [FREQ_W-1:0] freq_err;
  logic                     fe_valid;

  freq_error #(.W(LW), .OUT_W(FREQ_W), .WIN_EXP(FREQ_WIN)) u_freq (
    .clock, .reset,
    .in_valid (err_valid),
    .phase    (phase_err),
    .freq_err,
    .out_valid(fe_valid)
  );

  // ---------------------------------------------------------------- drive
  logic [LW-1:0]        drive_amp, drive_phase;
  logic signed [LW-1:0] cpm_k;
  logic                 drive_valid;

  always_ff @(posedge clock) begin
    if (reset) begin
      drive_amp   <= '0;
      drive_phase <= '0;
      cpm_k       <= '0;
      drive_valid <= 1'b0;
    end else begin
      drive_valid <= fl_valid;
      if (fl_valid) begin
        logic signed [LW+1:0] a;
        a = (LW+2)'(cfg.quiescent) + (LW+2)'(field_corr);
        drive_amp   <= (a < 0) ? '0 : (a > (LW+2)'({LW{1'b1}})) ? '1 : LW'(a);
        drive_phase <= (cfg.mode == MODE_SEL) ? phase_meas + cfg.phase_shift : phase_corr;
        cpm_k       <= (cfg.mode == MODE_SEL) ? phase_corr : '0;
      end
    end
  end

  // ---------------------------------------------------------------- to I/Q
  logic signed [CW-1:0] r_xo, r_yo, r_ao;
  logic                 r_dov, r_rdy;
  logic signed [LW-1:0] k_pipe [LAT];

  cordic #(.W(CW), .ITER(CORDIC_ITER), .VECTORING(1'b0)) u_rot (
    .clock, .reset,
    .div (drive_valid),
    .xi  (CW'(drive_amp)),
    .yi  ('0),
    .ai  ({drive_phase, {(CW - LW){1'b0}}}),
    .xo  (r_xo), .yo(r_yo), .ao(r_ao),
    .dov (r_dov), .rdy(r_rdy)
  );

  always_ff @(posedge clock) begin
    k_pipe[0] <= cpm_k;
    for (int s = 1; s < LAT; s++) k_pipe[s] <= k_pipe[s-1];
  end

  logic signed [DAC_W-1:0] i_cpm, q_cpm;
  logic                    cpm_valid;

  cpm #(.W(DAC_W)) u_cpm (
    .clock, .reset,
    .in_valid (r_dov),
    .i_in     (DAC_W'(r_xo >>> 2)),
    .q_in     (DAC_W'(r_yo >>> 2)),
    .k        (k_pipe[LAT-1]),
    .i_out    (i_cpm),
    .q_out    (q_cpm),
    .out_valid(cpm_valid)
  );

  iq_modulator #(.W(DAC_W)) u_mod (
    .clock, .reset,
    .i_in     (i_cpm),
    .q_in     (q_cpm),
    .in_valid (cpm_valid),
    .dec_fact (cfg.dec_fact),
    .ccw      (cfg.ccw),
    .power_en (cfg.power_en),
    .dac_data
  );

  // ---------------------------------------------------------------- status
  always_comb begin
    status.phase_locked = phase_locked;
    status.field_locked = field_locked;
    status.phase_err    = phase_err;
    status.field_err    = field_err;
    status.freq_err     = freq_err;
    status.phase_corr   = phase_corr;
    status.field_corr   = field_corr;
  end

endmodule
