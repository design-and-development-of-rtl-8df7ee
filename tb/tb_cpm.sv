// tb_cpm: self-checking testbench of the complex phase modulator.
//
// Random complex inputs and random modulation factors k (Q1.15). The
// reference computes Vout = Vin + j*k*Vin, i.e.
//   i_out = i - (k*q >> 15),  q_out = q + (k*i >> 15)
// saturated to 16 bits. Checks: every output against the reference,
// out_valid one clock after in_valid, the modulus ratio |Vout|/|Vin| =
// sqrt(1 + k^2) (= 1/cos(phi) for phi = atan k) for unsaturated outputs,
// and that saturation occurred at least once.
module tb_cpm;
  localparam int W = 16;
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

  logic                in_valid = 1'b0;
  logic signed [W-1:0] i_in = '0, q_in = '0, k = '0;
  logic signed [W-1:0] i_out, q_out;
  logic                out_valid;

  cpm #(.W(W)) dut (.clock, .reset, .in_valid, .i_in, .q_in, .k, .i_out, .q_out, .out_valid);

  bit     pend = 0;
  longint ei = 0, eq = 0;
  real    ratio = 1.0, vin = 0.0;
  bit     sat = 0;
  int     n_sat = 0;

  function automatic longint satw(input longint v);
    if (v > 32767) return 32767;
    if (v < -32768) return -32768;
    return v;
  endfunction

  always @(posedge clock) begin
    if (!reset) begin
      check(out_valid == pend, "out_valid one clock after in_valid");
      if (pend) begin
        check(longint'(i_out) == ei && longint'(q_out) == eq,
              $sformatf("out (%0d,%0d) expected (%0d,%0d)", i_out, q_out, ei, eq));
        if (!sat && vin > 1000.0) begin
          real vo;
          vo = $sqrt(real'(i_out) * i_out + real'(q_out) * q_out);
          check(vo / vin > ratio - 0.002 && vo / vin < ratio + 0.002,
                $sformatf("modulus ratio %f expected %f", vo / vin, ratio));
        end
      end
      pend = in_valid;
      if (in_valid) begin
        longint ti, tq;
        ti = longint'(i_in) - ((longint'(k) * longint'(q_in)) >>> 15);
        tq = longint'(q_in) + ((longint'(k) * longint'(i_in)) >>> 15);
        sat = (ti != satw(ti)) || (tq != satw(tq));
        if (sat) n_sat++;
        ei = satw(ti);
        eq = satw(tq);
        vin = $sqrt(real'(i_in) * i_in + real'(q_in) * q_in);
        ratio = $sqrt(1.0 + (real'(k) / 32768.0) ** 2);
      end
    end
  end

  initial begin
    repeat (3) @(posedge clock);
    reset <= 1'b0;
    for (int n = 0; n < 3000; n++) begin
      int range;
      range = (n < 2000) ? 20000 : 32767;
      in_valid <= ($urandom_range(3) != 0);
      i_in <= W'(int'($urandom_range(2 * range)) - range);
      q_in <= W'(int'($urandom_range(2 * range)) - range);
      k    <= W'(int'($urandom_range(40000)) - 20000);
      @(posedge clock);
    end
    in_valid <= 1'b0;
    @(posedge clock);
    @(posedge clock);
    check(n_sat > 0, "saturation never exercised");
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
