// tb_cordic: self-checking testbench of the CORDIC in both of its modes.
//
// Two instances at the default width (19 bits) and 16 iterations:
//   vectoring: random (x, y) vectors in all four quadrants, one per clock;
//     checks xo = K*|v| and ao = atan2(y, x) (angle in 2^-19 of a turn)
//   rotation:  random amplitude on x and random angles; checks
//     xo = K*a*cos(theta), yo = K*a*sin(theta)
// K = 1.6468 is the CORDIC gain. Each result must appear exactly ITER+1
// clocks after its input (dov), which is checked against a cycle counter,
// and rdy must be high after reset. Expected values are computed with real
// arithmetic; tolerances allow for the 16-iteration residual angle and
// truncation.
module tb_cordic;
  localparam int W    = 19;
  localparam int ITER = 16;
  localparam int N    = 400;
  localparam real TURN = 524288.0;  // 2^19
  localparam real PI   = 3.14159265358979;
  localparam real KG   = 1.646760258;

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

  logic                div_v = 1'b0, div_r = 1'b0;
  logic signed [W-1:0] xv = '0, yv = '0, av = '0;
  logic signed [W-1:0] xr = '0, yr = '0, ar = '0;
  logic signed [W-1:0] xo_v, yo_v, ao_v, xo_r, yo_r, ao_r;
  logic                dov_v, dov_r, rdy_v, rdy_r;

  cordic #(.W(W), .ITER(ITER), .VECTORING(1'b1)) u_vec (
    .clock, .reset, .div(div_v), .xi(xv), .yi(yv), .ai(av),
    .xo(xo_v), .yo(yo_v), .ao(ao_v), .dov(dov_v), .rdy(rdy_v));

  cordic #(.W(W), .ITER(ITER), .VECTORING(1'b0)) u_rot (
    .clock, .reset, .div(div_r), .xi(xr), .yi(yr), .ai(ar),
    .xo(xo_r), .yo(yo_r), .ao(ao_r), .dov(dov_r), .rdy(rdy_r));

  int cycle = 0;
  always @(posedge clock) cycle <= cycle + 1;

  // expected results, queued with the cycle the input was applied
  real exp_m[$], exp_a[$], exp_x[$], exp_y[$];
  int  t_v[$], t_r[$];
  int  got_v = 0, got_r = 0;

  function automatic real wrap_turn(input real d);
    real r;
    r = d;
    while (r > TURN / 2) r -= TURN;
    while (r < -TURN / 2) r += TURN;
    return r;
  endfunction

  function automatic real absr(input real v);
    return v < 0 ? -v : v;
  endfunction

  always @(posedge clock) begin
    if (dov_v) begin
      if (exp_m.size() == 0) check(1'b0, "vectoring output without input");
      else begin
        real m, a;
        int  t;
        m = exp_m.pop_front();
        a = exp_a.pop_front();
        t = t_v.pop_front();
        check(cycle - t == ITER + 1, $sformatf("vectoring latency %0d", cycle - t));
        check(absr(real'(xo_v) - KG * m) <= 8.0 + m * 0.0005,
              $sformatf("vectoring magnitude %0d expected %f", xo_v, KG * m));
        check(absr(wrap_turn(real'(ao_v) - a)) <= 16.0 + 8.0 * TURN / (2.0 * PI * (m + 1.0)),
              $sformatf("vectoring angle %0d expected %f", ao_v, a));
        check(absr(real'(yo_v)) <= 16.0, $sformatf("vectoring residual y %0d", yo_v));
        got_v++;
      end
    end
    if (dov_r) begin
      if (exp_x.size() == 0) check(1'b0, "rotation output without input");
      else begin
        real ex, ey;
        int  t;
        ex = exp_x.pop_front();
        ey = exp_y.pop_front();
        t = t_r.pop_front();
        check(cycle - t == ITER + 1, $sformatf("rotation latency %0d", cycle - t));
        check(absr(real'(xo_r) - ex) <= 24.0 && absr(real'(yo_r) - ey) <= 24.0,
              $sformatf("rotation (%0d,%0d) expected (%f,%f)", xo_r, yo_r, ex, ey));
        got_r++;
      end
    end
  end

  initial begin
    repeat (4) @(posedge clock);
    reset <= 1'b0;
    repeat (2) @(posedge clock);
    check(rdy_v && rdy_r, "rdy after reset");
    for (int n = 0; n < N; n++) begin
      int x, y, amp, ang;
      x   = int'($urandom_range(200000)) - 100000;
      y   = int'($urandom_range(200000)) - 100000;
      amp = int'($urandom_range(140000));
      ang = int'($urandom_range(524287)) - 262144;
      // a few idle clocks now and then
      if ($urandom_range(7) == 0) begin
        div_v <= 1'b0;
        div_r <= 1'b0;
        @(posedge clock);
      end
      div_v <= 1'b1;
      xv <= W'(x);
      yv <= W'(y);
      av <= '0;
      div_r <= 1'b1;
      xr <= W'(amp);
      yr <= '0;
      ar <= W'(ang);
      exp_m.push_back($sqrt(real'(x) * x + real'(y) * y));
      exp_a.push_back($atan2(real'(y), real'(x)) / (2.0 * PI) * TURN);
      exp_x.push_back(KG * amp * $cos(2.0 * PI * ang / TURN));
      exp_y.push_back(KG * amp * $sin(2.0 * PI * ang / TURN));
      t_v.push_back(cycle + 1);
      t_r.push_back(cycle + 1);
      @(posedge clock);
    end
    div_v <= 1'b0;
    div_r <= 1'b0;
    repeat (ITER + 5) @(posedge clock);
    check(got_v == N, $sformatf("vectoring results %0d of %0d", got_v, N));
    check(got_r == N, $sformatf("rotation results %0d of %0d", got_r, N));
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
