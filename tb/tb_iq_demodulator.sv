// tb_iq_demodulator: self-checking testbench of the undersampling I/Q
// demodulator.
//
// The stimulus is an undersampled RF signal x[k] = I cos(t_k) + Q sin(t_k)
// with t_k = 2*pi*k*(2N-1)/(4D), N = 11, i.e. what the ADC sees at
// f_s = D*4*f_RF/(2N-1); with ccw the carrier turns the other way
// (x = I cos - Q sin). Cases:
//   D = 8 (80 MHz cavity), D = 4 (160 MHz cavity) with ccw, random I and Q,
//   random gaps in adc_valid; averaging over 2^3 pairs with noise added;
//   full-scale negative input (absolute value saturates at 32767).
// Checks: |I|, |Q| and their signs for every output, and that outputs come
// exactly every 2*D (times 2^avg_exp when averaging) valid input samples.
module tb_iq_demodulator;
  localparam int W = 16;
  localparam real PI = 3.14159265358979;

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

  logic signed [W-1:0] adc_data = '0;
  logic                adc_valid = 1'b0;
  logic [5:0]          dec_fact = 6'd8;
  logic [4:0]          avg_exp = '0;
  logic                cic_en = 1'b0, ccw = 1'b0;
  logic [W-1:0]        i_abs, q_abs;
  logic                i_neg, q_neg, out_valid;

  iq_demodulator #(.W(W)) dut (
    .clock, .reset, .adc_data, .adc_valid, .dec_fact, .avg_exp, .cic_en, .ccw,
    .i_abs, .q_abs, .i_neg, .q_neg, .out_valid);

  int n_valid = 0;     // valid samples applied so far in this case
  int last_out = 0;    // n_valid at the previous output
  int n_out = 0;
  int exp_i = 0, exp_q = 0, tol = 0, period = 0;

  always @(posedge clock) begin
    if (out_valid && !reset) begin
      int gi, gq;
      gi = i_neg ? -int'(i_abs) : int'(i_abs);
      gq = q_neg ? -int'(q_abs) : int'(q_abs);
      check((gi - exp_i) <= tol && (exp_i - gi) <= tol,
            $sformatf("I %0d expected %0d", gi, exp_i));
      check((gq - exp_q) <= tol && (exp_q - gq) <= tol,
            $sformatf("Q %0d expected %0d", gq, exp_q));
      if (n_out > 0)
        check(n_valid - last_out == period,
              $sformatf("output interval %0d samples, expected %0d", n_valid - last_out, period));
      last_out = n_valid;
      n_out++;
    end
    // count the samples the DUT takes at this edge
    if (reset) n_valid = 0;
    else if (adc_valid) n_valid++;
  end

  // one case: reset, then nout outputs of the given signal
  task automatic run_case(input int d, input bit c, input bit cic, input int e,
                          input int ii, input int qq, input int noise, input int nout);
    real th;
    reset  <= 1'b1;
    adc_valid <= 1'b0;
    dec_fact <= 6'(d);
    ccw    <= c;
    cic_en <= cic;
    avg_exp <= 5'(e);
    repeat (2) @(posedge clock);
    reset <= 1'b0;
    n_out = 0;
    exp_i = ii;
    exp_q = qq;
    tol = (noise > 0) ? noise : 1;
    period = 2 * d * (cic ? (1 << e) : 1);
    for (int k = 0; n_out < nout; k++) begin
      real v;
      int  x;
      if ($urandom_range(3) == 0) begin
        adc_valid <= 1'b0;
        @(posedge clock);
      end
      th = 2.0 * PI * real'(k) * 21.0 / (4.0 * d);
      v  = real'(ii) * $cos(th) + (c ? -1.0 : 1.0) * real'(qq) * $sin(th);
      x  = int'(v) + ((noise > 0) ? int'($urandom_range(2 * noise)) - noise : 0);
      if (x > 32767) x = 32767;
      if (x < -32768) x = -32768;
      adc_data  <= W'(x);
      adc_valid <= 1'b1;
      @(posedge clock);
      if (k > 100000) begin
        check(1'b0, "no output");
        break;
      end
    end
    adc_valid <= 1'b0;
    @(posedge clock);
  endtask

  initial begin
    for (int r = 0; r < 6; r++)
      run_case(8, 1'b0, 1'b0, 0, int'($urandom_range(60000)) - 30000,
               int'($urandom_range(60000)) - 30000, 0, 6);
    for (int r = 0; r < 6; r++)
      run_case(4, 1'b1, 1'b0, 0, int'($urandom_range(60000)) - 30000,
               int'($urandom_range(60000)) - 30000, 0, 6);
    for (int r = 0; r < 4; r++)
      run_case(8, 1'b0, 1'b1, 3, int'($urandom_range(40000)) - 20000,
               int'($urandom_range(40000)) - 20000, 40, 4);
    run_case(8, 1'b0, 1'b0, 0, -32768, 1000, 0, 3);
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
