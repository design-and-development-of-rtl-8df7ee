// tb_jesd204_tx_lane: self-checking testbench of the JESD204B transmit lane.
//
// A checker decodes the lane's output (two octets per clock with K flags):
//   - K28.5 on both octets while SYNC~ is low and until the next
//     multiframe boundary after it rises;
//   - four ILAS multiframes of K = 32 frames: /R/ (K28.0) opening each,
//     /A/ (K28.3) closing each, /Q/ (K28.4) as second octet of the second
//     multiframe followed by the 14 link configuration octets (lane ID,
//     K-1 and the checksum are checked), a counting pattern elsewhere;
//   - user data: first octet = sample MSB, second octet = sample LSB unless it
//     repeats the previous frame's last octet, in which case it is /A/ at the
//     end of a multiframe and /F/ elsewhere.
// Random samples (with deliberately repeated low octets) are checked one
// clock after they are applied. SYNC~ is dropped and raised again; the new
// ILAS must start a whole number of multiframes after the first one.
module tb_jesd204_tx_lane;
  localparam int K = 32;
  localparam int LANE = 1;
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

  logic        sync = 1'b0;
  logic [15:0] sample = '0;
  logic [15:0] dout;
  logic [1:0]  charisk;
  logic        data_phase;

  jesd204_tx_lane #(.K_FRAMES(K), .LANE_ID(LANE)) dut (
    .clock, .reset, .sync, .sample, .dout, .charisk, .data_phase);

  int cyc = 0;
  int ilas_idx = -1;     // position within the ILAS, -1 outside
  int data_idx = 0;
  int ilas_start[$];
  int n_ilas = 0, n_data = 0, n_f = 0, n_a = 0;
  logic [15:0] ps = '0;  // sample applied at the previous edge
  logic [7:0]  prev_last = 8'h7C;
  logic [7:0]  cfg [14];
  int          cfg_sum;

  always @(posedge clock) begin
    cyc++;
    if (!reset) begin
      logic [7:0] b0, b1;
      b0 = dout[7:0];
      b1 = dout[15:8];
      if (ilas_idx < 0 && !data_phase && charisk[0] && b0 == 8'h1C) begin
        ilas_idx = 0;
        ilas_start.push_back(cyc);
      end
      if (ilas_idx >= 0) begin
        int f, m;
        f = ilas_idx % K;
        m = ilas_idx / K;
        check(!data_phase, "no data during ILAS");
        if (f == 0) check(charisk[0] && b0 == 8'h1C, $sformatf("ILAS /R/ frame 0 mf %0d", m));
        else check(!charisk[0], "ILAS first octet not K");
        if (f == K - 1) check(charisk[1] && b1 == 8'h7C, $sformatf("ILAS /A/ mf %0d", m));
        else if (f == 0 && m == 1) check(charisk[1] && b1 == 8'h9C, "ILAS /Q/");
        else check(!charisk[1], "ILAS second octet not K");
        if (m == 1 && f >= 1 && f <= 7) begin
          cfg[2 * f - 2] = b0;
          cfg[2 * f - 1] = b1;
        end
        if (m == 1 && f == 8) begin
          cfg_sum = 0;
          for (int n = 0; n < 13; n++) cfg_sum += int'(cfg[n]);
          check(cfg[13] == 8'(cfg_sum), "ILAS configuration checksum");
          check(cfg[2] == 8'(LANE), "ILAS lane ID");
          check(cfg[5] == 8'(K - 1), "ILAS K-1");
          check(cfg[4] == 8'd1, "ILAS F-1");
        end
        ilas_idx++;
        if (ilas_idx == 4 * K) begin
          ilas_idx = -1;
          data_idx = 0;
          prev_last = 8'h7C;
          n_ilas++;
        end
      end else if (data_phase) begin
        int f;
        f = data_idx % K;
        check(!charisk[0] && b0 == ps[15:8], "data first octet");
        if (ps[7:0] == prev_last) begin
          check(charisk[1] && b1 == ((f == K - 1) ? 8'h7C : 8'hFC),
                $sformatf("replacement character at frame %0d", f));
          if (f == K - 1) n_a++;
          else n_f++;
        end else begin
          check(!charisk[1] && b1 == ps[7:0], "data second octet");
        end
        prev_last = ps[7:0];
        data_idx++;
        n_data++;
      end else begin
        check(dout == 16'hBCBC && charisk == 2'b11, "K28.5 during code group synchronization");
      end
      ps = sample;
    end
  end

  task automatic run_data(input int n);
    for (int i = 0; i < n; i++) begin
      if ($urandom_range(3) == 0) sample <= {8'($urandom_range(255)), sample[7:0]};
      else sample <= 16'($urandom_range(65535));
      @(posedge clock);
    end
  endtask

  initial begin
    repeat (3) @(posedge clock);
    reset <= 1'b0;
    run_data(37);
    sync <= 1'b1;
    run_data(4 * K + 2 * K + 400);
    check(n_ilas == 1, "first ILAS");
    sync <= 1'b0;
    run_data(23);
    sync <= 1'b1;
    run_data(4 * K + 2 * K + 400);
    check(n_ilas == 2, "second ILAS");
    check(ilas_start.size() == 2 && (ilas_start[1] - ilas_start[0]) % K == 0,
          "ILAS starts on a multiframe boundary");
    check(n_data > 600 && n_f > 50 && n_a > 2,
          $sformatf("data %0d, /F/ %0d, /A/ %0d", n_data, n_f, n_a));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #100us;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
