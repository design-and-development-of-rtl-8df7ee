// tb_pi_controller: self-checking testbench of the PI controller.
//
// Two instances share the stimulus: one with saturate = 1 (integrator and
// output clamp at the 16-bit range, the field loop) and one with
// saturate = 0 (integrator and output wrap around like an angle, the GDR
// phase loop). A
// bit-exact reference model computes
//   acc += err*ki,  out = (err*kp + acc) >> GAIN_FRAC
// with clamping or wrapping. Random errors and gains, phases with large
// errors that drive the field form into saturation and the phase form past
// +-pi, and enable toggling (clears integrator and output) are applied.
// Checks: every output against the model, out_valid exactly one clock
// after in_valid, and that saturation and wrapping did occur.
module tb_pi_controller;
  localparam int W  = 16;
  localparam int GF = 8;

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

  logic                enable = 1'b0, in_valid = 1'b0;
  logic signed [W-1:0] err = '0;
  logic [W-1:0]        kp = '0, ki = '0;
  logic signed [W-1:0] out_s, out_w;
  logic                ov_s, ov_w;

  pi_controller #(.W(W), .GAIN_FRAC(GF)) u_sat (
    .clock, .reset, .saturate(1'b1), .enable, .in_valid, .err, .kp, .ki, .out(out_s), .out_valid(ov_s));
  pi_controller #(.W(W), .GAIN_FRAC(GF)) u_wrap (
    .clock, .reset, .saturate(1'b0), .enable, .in_valid, .err, .kp, .ki, .out(out_w), .out_valid(ov_w));

  // reference model state
  longint acc_s = 0, acc_w = 0;
  longint exp_s = 0, exp_w = 0;
  bit     pend = 0;
  int     n_sat = 0, n_wrap = 0;

  localparam longint AMAX = longint'(32767) <<< GF;
  localparam longint AMIN = -(longint'(32768) <<< GF);

  function automatic longint wrapn(input longint v, input int n);
    longint m;
    m = v & ((longint'(1) <<< n) - 1);
    if (m >= (longint'(1) <<< (n - 1))) m -= (longint'(1) <<< n);
    return m;
  endfunction

  always @(posedge clock) begin
    if (!reset) begin
      // outputs of the previous input
      if (pend) begin
        check(ov_s && ov_w, "out_valid one clock after in_valid");
        check(longint'(out_s) == exp_s, $sformatf("saturating out %0d expected %0d", out_s, exp_s));
        check(longint'(out_w) == exp_w, $sformatf("wrapping out %0d expected %0d", out_w, exp_w));
      end else begin
        check(!ov_s && !ov_w, "no out_valid without in_valid");
      end
      pend = in_valid;
      if (!enable) begin
        acc_s = 0;
        acc_w = 0;
        exp_s = 0;
        exp_w = 0;
      end else if (in_valid) begin
        longint p, t;
        p = longint'(err) * longint'(kp);
        acc_s = acc_s + longint'(err) * longint'(ki);
        if (acc_s > AMAX) acc_s = AMAX;
        if (acc_s < AMIN) acc_s = AMIN;
        t = (p + acc_s) >>> GF;
        if (t > 32767) begin t = 32767; n_sat++; end
        if (t < -32768) begin t = -32768; n_sat++; end
        exp_s = t;
        acc_w = wrapn(acc_w + longint'(err) * longint'(ki), W + GF);
        t = (p + acc_w) >>> GF;
        if (t > 32767 || t < -32768) n_wrap++;
        exp_w = wrapn(t, W);
      end
    end
  end

  initial begin
    repeat (3) @(posedge clock);
    reset <= 1'b0;
    enable <= 1'b1;
    for (int n = 0; n < 3000; n++) begin
      int big;
      big = (n / 500) % 2;  // alternate small and large error phases
      in_valid <= ($urandom_range(3) != 0);
      err <= big ? W'(int'($urandom_range(40000)) - 10000)
                 : W'(int'($urandom_range(2000)) - 1000);
      kp  <= W'($urandom_range(big ? 2000 : 600));
      ki  <= W'($urandom_range(big ? 400 : 60));
      if (n % 700 == 650) enable <= 1'b0;
      if (n % 700 == 660) enable <= 1'b1;
      @(posedge clock);
    end
    in_valid <= 1'b0;
    repeat (3) @(posedge clock);
    check(n_sat > 0, "field form never saturated");
    check(n_wrap > 0, "phase form never wrapped");
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
