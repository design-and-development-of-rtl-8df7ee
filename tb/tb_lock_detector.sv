// tb_lock_detector: self-checking testbench of the lock detector.
//
// Random error samples, mostly inside the threshold with occasional
// excursions, random thresholds and windows, gaps in in_valid and enable
// toggling. A reference model counts consecutive in-threshold samples and
// declares lock once the count reaches the window; any sample with |err|
// above the threshold unlocks at once. Checks: locked against the model
// every clock (one clock after the sample), and that both locking and
// unlocking occurred.
module tb_lock_detector;
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

  logic                enable = 1'b0, in_valid = 1'b0;
  logic signed [W-1:0] err = '0;
  logic [W-1:0]        thrs = '0, wind = '0;
  logic                locked;

  lock_detector #(.W(W)) dut (.clock, .reset, .enable, .in_valid, .err, .thrs, .wind, .locked);

  int  cnt = 0;
  bit  m_locked = 0;
  int  n_lock = 0, n_unlock = 0;

  always @(posedge clock) begin
    if (!reset) begin
      check(locked == m_locked, $sformatf("locked %0b expected %0b", locked, m_locked));
      if (!enable) begin
        cnt = 0;
        m_locked = 0;
      end else if (in_valid) begin
        int mag;
        mag = (err < 0) ? -int'(err) : int'(err);
        if (mag > int'(thrs)) begin
          if (m_locked) n_unlock++;
          cnt = 0;
          m_locked = 0;
        end else begin
          if (cnt + 1 >= int'(wind) && !m_locked) begin
            m_locked = 1;
            n_lock++;
          end
          cnt++;
        end
      end
    end
  end

  initial begin
    repeat (3) @(posedge clock);
    reset <= 1'b0;
    enable <= 1'b1;
    for (int blk = 0; blk < 20; blk++) begin
      thrs <= W'($urandom_range(500, 50));
      wind <= W'($urandom_range(60, 1));
      for (int n = 0; n < 300; n++) begin
        in_valid <= ($urandom_range(2) != 0);
        if ($urandom_range(99) < 2) err <= W'(int'($urandom_range(20000)) - 10000);
        else err <= W'(int'($urandom_range(80)) - 40);
        if (blk == 7 && n == 100) enable <= 1'b0;
        if (blk == 7 && n == 110) enable <= 1'b1;
        @(posedge clock);
      end
    end
    in_valid <= 1'b0;
    @(posedge clock);
    check(n_lock > 0, "never locked");
    check(n_unlock > 0, "never unlocked");
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
