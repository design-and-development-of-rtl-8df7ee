// tb_freq_error: self-checking testbench of the frequency error estimator.
//
// The phase input is a ramp with a random slope (a constant frequency
// offset: the phase advances by the slope every sample, wrapping through
// +-pi) plus small noise. Over each window of 2^8 phase differences the
// estimator must report the sum of the wrapped differences, which equals the
// total phase advance of the window; the reference model computes it from
// the applied samples. Checks: each freq_err value, its sign for positive
// and negative slopes, and that out_valid comes once per 256 valid samples.
module tb_freq_error;
  localparam int W = 16;
  localparam int WIN = 256;
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

  logic                 in_valid = 1'b0;
  logic signed [W-1:0]  phase = '0;
  logic signed [23:0]   freq_err;
  logic                 out_valid;

  freq_error #(.W(W), .OUT_W(24), .WIN_EXP(8)) dut (.clock, .reset, .in_valid, .phase,
                                                    .freq_err, .out_valid);

  int  q_exp[$];
  int  n_valid = 0, last_out = -1, n_out = 0;
  int  win_sum = 0, win_n = 0;
  int  prevp = 0;
  bit  primed = 0;

  always @(posedge clock) begin
    if (!reset) begin
      if (out_valid) begin
        if (q_exp.size() == 0) check(1'b0, "unexpected output");
        else begin
          int e;
          e = q_exp.pop_front();
          check(int'(freq_err) == e, $sformatf("freq_err %0d expected %0d", freq_err, e));
        end
        if (last_out >= 0)
          check(n_valid - last_out == WIN, $sformatf("window %0d samples", n_valid - last_out));
        last_out = n_valid;
        n_out++;
      end
      if (in_valid) begin
        if (primed) begin
          win_sum += int'($signed(W'(phase - W'(prevp))));
          win_n++;
          if (win_n == WIN) begin
            q_exp.push_back(win_sum);
            win_sum = 0;
            win_n = 0;
          end
        end
        primed = 1;
        prevp = int'(phase);
        n_valid++;
      end
    end
  end

  initial begin
    int p;
    repeat (3) @(posedge clock);
    reset <= 1'b0;
    p = 0;
    for (int seg = 0; seg < 6; seg++) begin
      int slope;
      slope = int'($urandom_range(6000)) - 3000;
      if (seg == 0) slope = 2500;
      if (seg == 1) slope = -2500;
      for (int n = 0; n < 2 * WIN; n++) begin
        in_valid <= ($urandom_range(4) != 0);
        p = p + slope;
        phase <= W'(p + int'($urandom_range(20)) - 10);
        @(posedge clock);
        if (!in_valid) p = p - slope;
      end
      if (seg == 0) check(freq_err > 0, "positive frequency offset gives positive error");
      if (seg == 1) check(freq_err < 0, "negative frequency offset gives negative error");
    end
    in_valid <= 1'b0;
    repeat (3) @(posedge clock);
    check(n_out >= 6, $sformatf("only %0d estimates", n_out));
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
