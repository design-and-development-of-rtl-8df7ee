// tb_iq_modulator: self-checking testbench of the I/Q modulator.
//
// For D = 8 and D = 4, both sequence directions and random (I, Q) pairs the
// DAC stream must carry, every D-th sample, I, Q, -I, -Q (I, -Q, -I, Q with
// ccw) and zero in between; a new pair applied with in_valid takes effect
// from the next slot; -(-32768) saturates to 32767; power_en = 0 gives an
// all-zero stream. Checks every DAC sample against a model that tracks the
// decimation counter and slot from reset, and that the non-zero samples
// come exactly D clocks apart.
module tb_iq_modulator;
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

  logic signed [W-1:0] i_in = '0, q_in = '0;
  logic                in_valid = 1'b0, ccw = 1'b0, power_en = 1'b0;
  logic [5:0]          dec_fact = 6'd8;
  logic signed [W-1:0] dac_data;

  iq_modulator #(.W(W)) dut (.clock, .reset, .i_in, .q_in, .in_valid, .dec_fact, .ccw,
                             .power_en, .dac_data);

  int m_cnt = 0, m_slot = 0;
  int m_i = 0, m_q = 0;
  int expv = 0;
  int last_nz = -1, cyc = 0;
  int n_nz = 0;

  function automatic int negs(input int v);
    return (v == -32768) ? 32767 : -v;
  endfunction

  always @(posedge clock) begin
    cyc++;
    if (reset) begin
      m_cnt = 0;
      m_slot = 0;
      m_i = 0;
      m_q = 0;
      expv = 0;
      last_nz = -1;
    end else begin
      check(int'(dac_data) == expv, $sformatf("dac %0d expected %0d", dac_data, expv));
      if (dac_data != 0) begin
        if (last_nz >= 0 && expv != 0)
          check(cyc - last_nz == int'(dec_fact), $sformatf("slot spacing %0d", cyc - last_nz));
        last_nz = cyc;
        n_nz++;
      end
      // model of the next output
      if (m_cnt == 0) begin
        int v;
        case (m_slot)
          0: v = m_i;
          1: v = ccw ? negs(m_q) : m_q;
          2: v = negs(m_i);
          default: v = ccw ? m_q : negs(m_q);
        endcase
        expv = power_en ? v : 0;
        m_slot = (m_slot + 1) % 4;
      end else begin
        expv = 0;
      end
      m_cnt = (m_cnt + 1 >= int'(dec_fact)) ? 0 : m_cnt + 1;
      if (in_valid) begin
        m_i = int'(i_in);
        m_q = int'(q_in);
      end
    end
  end

  task automatic run_case(input int d, input bit c, input bit pwr, input int cycles);
    reset <= 1'b1;
    dec_fact <= 6'(d);
    ccw <= c;
    power_en <= pwr;
    in_valid <= 1'b0;
    repeat (2) @(posedge clock);
    reset <= 1'b0;
    for (int n = 0; n < cycles; n++) begin
      in_valid <= ($urandom_range(15) == 0);
      i_in <= W'(int'($urandom_range(65535)) - 32768);
      q_in <= W'(int'($urandom_range(65535)) - 32768);
      if (n == 40) begin
        i_in <= -16'sd32768;
        q_in <= -16'sd32768;
        in_valid <= 1'b1;
      end
      @(posedge clock);
    end
  endtask

  initial begin
    run_case(8, 1'b0, 1'b1, 600);
    run_case(8, 1'b1, 1'b1, 600);
    run_case(4, 1'b0, 1'b1, 600);
    run_case(4, 1'b1, 1'b1, 600);
    begin
      int n_before;
      n_before = n_nz;
      run_case(8, 1'b0, 1'b0, 300);
      check(n_nz == n_before, "output while power disabled");
    end
    check(n_nz > 200, "too few drive samples");
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
