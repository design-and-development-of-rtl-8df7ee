// tb_ctrl_regs: self-checking testbench of the per-cavity control-loop
// register slave.
//
// Over the IPbus slave bus: after reset the decimation factor reads 8 and
// everything else 0; random values written to registers 0-12 must read back
// (register 0 only in its writable bits) and appear on the matching cfg
// fields; random status values must read back from registers 0 (lock
// bits), 14 (errors), 15 (frequency error, sign extended) and 16-17
// (corrections, sign extended); addresses 18 and above answer err. Every
// transaction must be answered one clock after strobe.
module tb_ctrl_regs
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

  ipb_wbus_t   ipb_in = '0;
  ipb_rbus_t   ipb_out;
  cav_cfg_t    cfg;
  cav_status_t status = '0;

  ctrl_regs dut (.clock, .reset, .ipb_in, .ipb_out, .cfg, .status);

`include "ipb_master_tasks.svh"

  function automatic logic [15:0] cfg_field(input int r);
    case (r)
      1: return cfg.phase_shift;
      2: return cfg.quiescent;
      3: return cfg.phase_sp;
      4: return cfg.field_sp;
      5: return cfg.phase_kp;
      6: return cfg.phase_ki;
      7: return cfg.field_kp;
      8: return cfg.field_ki;
      9: return cfg.phase_lck_thrs;
      10: return cfg.field_lck_thrs;
      11: return cfg.phase_lck_wind;
      default: return cfg.field_lck_wind;
    endcase
  endfunction

  initial begin
    logic [31:0] d, v;
    logic [15:0] shadow [13];
    bit e;
    int c;
    repeat (3) @(posedge clock);
    reset <= 1'b0;
    @(posedge clock);
    ipb_access(32'd0, 1'b0, '0, d, e, c);
    check(!e && d == 32'd8 && c == 1, $sformatf("reset value of register 0: %h, %0d clocks", d, c));
    for (int r = 1; r < 13; r++) begin
      ipb_read(32'(r), d, e);
      check(!e && d == 0, $sformatf("reset value of register %0d", r));
    end
    for (int rep = 0; rep < 20; rep++) begin
      v = $urandom;
      ipb_access(32'd0, 1'b1, v, d, e, c);
      check(!e && c == 1, "write register 0 acknowledged after one clock");
      ipb_read(32'd0, d, e);
      check(d[13:0] == v[13:0] && d[18:16] == v[18:16], "register 0 read back");
      check(cfg.dec_fact == v[5:0] && cfg.avg_exp == v[10:6] && cfg.ccw == v[11] &&
            cfg.phase_loop_en == v[12] && cfg.field_loop_en == v[13] &&
            cfg.mode == cav_mode_e'(v[16]) && cfg.power_en == v[17] && cfg.cic_en == v[18],
            "register 0 fields");
      for (int r = 1; r < 13; r++) begin
        shadow[r] = 16'($urandom);
        ipb_write(32'(r), {16'($urandom), shadow[r]}, e);
        check(!e, "write acknowledged");
      end
      for (int r = 1; r < 13; r++) begin
        ipb_read(32'(r), d, e);
        check(!e && d == {16'd0, shadow[r]}, $sformatf("register %0d read back %h", r, d));
        check(cfg_field(r) == shadow[r], $sformatf("cfg field of register %0d", r));
      end
      status = {$urandom, $urandom, $urandom, $urandom};
      @(posedge clock);
      ipb_read(32'd0, d, e);
      check(d[14] == status.phase_locked && d[15] == status.field_locked, "lock bits");
      ipb_read(32'd14, d, e);
      check(d == {status.field_err, status.phase_err}, "register 14 errors");
      ipb_read(32'd15, d, e);
      check(d == 32'($signed(status.freq_err)), "register 15 frequency error");
      ipb_read(32'd16, d, e);
      check(d == 32'($signed(status.phase_corr)), "register 16 phase correction");
      ipb_read(32'd17, d, e);
      check(d == 32'($signed(status.field_corr)), "register 17 field correction");
      ipb_access(32'(18 + $urandom_range(200)), 1'b0, '0, d, e, c);
      check(e && c == 1, "unmapped address answers err after one clock");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #1ms;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
