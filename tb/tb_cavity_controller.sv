// tb_cavity_controller: closed-loop testbench of one cavity's controller.
//
// The controller drives a behavioural cavity (first-order resonator with
// detuning, cable phase and gain, undersampled pick-up with noise at
// f_s = D*4*f_RF/(2N-1), N = 11). Scenarios, all checked:
//   1. GDR, 80 MHz (D = 8), detuned cavity, both loops closed: the field
//      reaches its set point (measured magnitude = 0.82*|V|) and the cavity
//      phase its set point, both lock detectors lock, the corrections are
//      non-zero, the frequency error is small;
//   2. a phase set point step: the phase follows, the lock drops and
//      returns;
//   3. SEL, phase loop open: the cavity oscillates at its own resonance, so
//      the phase runs away and the frequency error, the rate of change of
//      the phase error, has the opposite sign of the detuning (a cavity
//      above the reference advances its phase; checked for both signs);
//   4. SEL with the phase loop closed: the CPM correction (non-zero) holds
//      the phase at the set point despite the detuning, field still locked;
//   5. 160 MHz (D = 4), GDR: the loops lock again;
//   6. power disabled: the DAC stream is all zero.
// Throughout, the DAC stream may be non-zero only every D-th sample.
module tb_cavity_controller
  import llrf_pkg::*;
;
  logic clock = 1'b0;
  logic reset = 1'b1;
  always #4 clock = ~clock;

  int checks = 0;
  int failures = 0;

  task automatic check(input bit ok, input string msg);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL %s", msg);
    end
  endtask

  cav_cfg_t            cfg;
  cav_status_t         status;
  logic signed [15:0]  adc_data, dac_data;
  int                  dec = 8;
  real                 tan_psi = 0.3;
  real                 amp, phase;

  cavity_controller dut (
    .clock, .reset, .adc_data, .adc_valid(1'b1), .cfg, .status, .dac_data);

  cavity_model u_cav (
    .clock, .reset, .dec, .tan_psi, .dac_data, .adc_data, .amp, .phase);

  // DAC cadence: non-zero samples only at m = 1 mod D after reset
  int m = 0, n_bad_cadence = 0;
  always @(posedge clock) begin
    if (reset) m = 0;
    else begin
      if (dac_data != 0 && (m - 1) % dec != 0) n_bad_cadence++;
      m++;
    end
  end

  function automatic int wrap16(input int v);
    int r;
    r = v & 16'hFFFF;
    return (r >= 32768) ? r - 65536 : r;
  endfunction

  function automatic int absi(input int v);
    return v < 0 ? -v : v;
  endfunction

  task automatic restart(input int d);
    reset <= 1'b1;
    dec = d;
    cfg.dec_fact <= 6'(d);
    repeat (3) @(posedge clock);
    reset <= 1'b0;
  endtask

  task automatic settle_check(input string what, input int clocks);
    int fe, pe;
    repeat (clocks) @(posedge clock);
    fe = int'(signed'(status.field_err));
    pe = int'(signed'(status.phase_err));
    check(absi(fe) < 150, $sformatf("%s: field error %0d", what, fe));
    check(absi(pe) < 200, $sformatf("%s: phase error %0d", what, pe));
    check(absi(int'(0.8235 * amp) - int'(cfg.field_sp)) < 200,
          $sformatf("%s: cavity amplitude %f for set point %0d", what, amp, cfg.field_sp));
    check(absi(wrap16(int'(phase) - int'(cfg.phase_sp))) < 250,
          $sformatf("%s: cavity phase %f for set point %0d", what, phase, cfg.phase_sp));
    check(status.field_locked && status.phase_locked, $sformatf("%s: locked", what));
  endtask

  initial begin
    cfg = '0;
    cfg.dec_fact       = 6'd8;
    cfg.avg_exp        = 5'd0;
    cfg.mode           = MODE_GDR;
    cfg.power_en       = 1'b1;
    cfg.field_loop_en  = 1'b1;
    cfg.phase_loop_en  = 1'b1;
    cfg.quiescent      = 16'd12000;
    cfg.field_sp       = 16'd12000;
    cfg.phase_sp       = 16'h2000;
    cfg.field_kp       = 16'd128;
    cfg.field_ki       = 16'd16;
    cfg.phase_kp       = 16'd128;
    cfg.phase_ki       = 16'd16;
    cfg.field_lck_thrs = 16'd200;
    cfg.phase_lck_thrs = 16'd300;
    cfg.field_lck_wind = 16'd32;
    cfg.phase_lck_wind = 16'd32;

    // 1. GDR
    restart(8);
    settle_check("GDR", 40000);
    check(status.field_corr != 0 && status.phase_corr != 0, "GDR corrections used");
    check(absi(int'(signed'(status.freq_err))) < 2000,
          $sformatf("GDR frequency error %0d", signed'(status.freq_err)));

    // 2. phase step
    cfg.phase_sp <= 16'hA000;
    repeat (200) @(posedge clock);
    check(!status.phase_locked, "phase lock drops after a set point step");
    settle_check("phase step", 40000);

    // 3. SEL, phase loop open
    cfg.mode          <= MODE_SEL;
    cfg.phase_loop_en <= 1'b0;
    cfg.phase_shift   <= 16'(-int'(0.5 / 6.2831853 * 65536.0));  // cancel the cable phase
    tan_psi = 0.4;
    repeat (30000) @(posedge clock);
    check(signed'(status.freq_err) < -24'sd2000,
          $sformatf("SEL positive detuning: frequency error %0d", signed'(status.freq_err)));
    tan_psi = -0.4;
    repeat (30000) @(posedge clock);
    check(signed'(status.freq_err) > 24'sd2000,
          $sformatf("SEL negative detuning: frequency error %0d", signed'(status.freq_err)));

    // 4. SEL, phase loop closed through the CPM
    tan_psi = 0.3;
    cfg.phase_sp      <= 16'h3000;
    cfg.phase_loop_en <= 1'b1;
    settle_check("SEL", 60000);
    check(signed'(status.phase_corr) != 0, "SEL: CPM correction used");

    // 5. 160 MHz cavity
    cfg.mode <= MODE_GDR;
    restart(4);
    settle_check("D=4", 40000);

    // 6. no power
    cfg.power_en <= 1'b0;
    repeat (50) @(posedge clock);
    begin
      int nz;
      nz = 0;
      repeat (200) begin
        @(posedge clock);
        if (dac_data != 0) nz++;
      end
      check(nz == 0, "no drive with power disabled");
    end
    check(n_bad_cadence == 0, $sformatf("%0d DAC samples off the D grid", n_bad_cadence));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #5ms;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
