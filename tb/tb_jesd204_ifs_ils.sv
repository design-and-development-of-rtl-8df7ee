// tb_jesd204_ifs_ils: self-checking testbench of the frame/ILAS stage of a
// JESD204B receive lane.
//
// The stimulus comes from a JESD204B transmit lane (K = 32 frames, F = 2)
// fed with random samples that often repeat their low octet, so that the
// stream holds /F/ and /A/ replacement characters. The testbench can damage
// the stream between the two.
// Checks:
//   - sync_check rises only after a complete, correct ILAS;
//   - an ILAS whose /A/ is missing is rejected (sync_check stays low) until
//     SYNC~ is cycled and a clean ILAS follows;
//   - in user data, every word equals the sample sent (replacement
//     characters restored from the previous frame), two clocks after the
//     sample entered the transmitter, with bof on every frame, bomf exactly
//     every 32 frames and the K flag of restored octets cleared;
//   - an /A/ outside the multiframe end clears sync_check.
module tb_jesd204_ifs_ils;
  localparam int K = 32;
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
  logic [15:0] tx_dout;
  logic [1:0]  tx_k;
  logic        tx_dp;

  jesd204_tx_lane #(.K_FRAMES(K)) u_tx (
    .clock, .reset, .sync, .sample, .dout(tx_dout), .charisk(tx_k), .data_phase(tx_dp));

  // damage between transmitter and receiver
  bit drop_a = 0, fake_a = 0;
  logic [15:0] din;
  logic [1:0]  comma_in;
  always_comb begin
    din = tx_dout;
    comma_in = tx_k;
    if (drop_a && !tx_dp && tx_k[1] && tx_dout[15:8] == 8'h7C) begin
      din[15:8] = 8'h55;
      comma_in[1] = 1'b0;
    end
    if (fake_a && tx_dp) begin
      din[15:8] = 8'h7C;
      comma_in[1] = 1'b1;
    end
  end

  logic [1:0]  comma_out, valid_out;
  logic [15:0] dout;
  logic        bof, bomf, sync_check;

  jesd204_ifs_ils #(.K_FRAMES(K)) dut (
    .clock, .reset, .comma_in, .din, .valid_in(2'b11), .sync,
    .comma_out, .dout, .valid_out, .bof, .bomf, .sync_check);

  logic [15:0] s1 = '0, s2 = '0;  // samples one and two edges ago
  int   n_words = 0, last_bomf = -1, n_bomf = 0, n_restored = 0;
  bit   tx_k1_q = 0, tx_k1_qq = 0;
  bit   checking = 1;

  always @(posedge clock) begin
    if (!reset) begin
      if (bof && checking) begin
        check(valid_out == 2'b11, "valid_out in user data");
        check(dout == {s2[7:0], s2[15:8]},
              $sformatf("data %04h expected %04h", dout, {s2[7:0], s2[15:8]}));
        check(comma_out == 2'b00, "K flags cleared in user data");
        if (tx_k1_qq) n_restored++;
        if (bomf) begin
          if (last_bomf >= 0)
            check(n_words - last_bomf == K, $sformatf("bomf spacing %0d", n_words - last_bomf));
          last_bomf = n_words;
          n_bomf++;
        end
        n_words++;
      end
    end
    tx_k1_qq = tx_k1_q;
    tx_k1_q = tx_k[1] && tx_dp;
    s2 = s1;
    s1 = sample;
  end

  task automatic run_data(input int n);
    for (int i = 0; i < n; i++) begin
      if ($urandom_range(2) == 0) sample <= {8'($urandom_range(255)), sample[7:0]};
      else sample <= 16'($urandom_range(65535));
      @(posedge clock);
    end
  endtask

  initial begin
    repeat (3) @(posedge clock);
    reset <= 1'b0;
    // a damaged ILAS is rejected
    drop_a = 1;
    sync <= 1'b1;
    run_data(8 * K);
    check(!sync_check && n_words == 0, "damaged ILAS rejected");
    drop_a = 0;
    sync <= 1'b0;
    run_data(10);
    check(!sync_check, "sync_check low while SYNC~ is low");
    sync <= 1'b1;
    run_data(K + 4 * K + 2);
    check(sync_check, "ILAS accepted");
    run_data(20 * K);
    check(sync_check && n_bomf >= 19, $sformatf("lane aligned, %0d multiframes", n_bomf));
    check(n_restored > 20, $sformatf("only %0d replaced octets restored", n_restored));
    // an /A/ in the middle of a multiframe
    @(negedge clock);
    while (u_tx.lmfc == 5'(K - 1) || u_tx.lmfc == 5'(K - 2)) @(negedge clock);
    checking = 0;
    fake_a = 1;
    @(negedge clock);
    fake_a = 0;
    run_data(3);
    check(!sync_check, "misplaced /A/ clears sync_check");
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
