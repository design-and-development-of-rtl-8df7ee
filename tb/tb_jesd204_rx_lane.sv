// tb_jesd204_rx_lane: self-checking testbench of a complete JESD204B
// receive lane (code group synchronization, frame/ILAS check, alignment
// buffer).
//
// A transmit lane sends counting samples through a channel of random delay
// (1 to 8 clocks) into the receive lane; the lane's SYNC~ output goes back
// to the transmitter through two clocks of delay, as over the board. The
// buffer is read whenever it holds data. Checks:
//   - sync_out rises after the code group synchronization and sync_check
//     after the ILAS;
//   - the words read are the samples sent, in order, with no gaps, and the
//     delay from transmitter input to buffer output is the same for every
//     word;
//   - with reading stopped the buffer overflows (dovf);
//   - four invalid words (lost code groups) drop sync_out, which restarts
//     the transmitter; the lane then synchronizes and delivers data again.
module tb_jesd204_rx_lane;
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

  logic        tx_sync;
  logic [15:0] sample = '0;
  logic [15:0] tx_dout;
  logic [1:0]  tx_k;
  logic        tx_dp;

  jesd204_tx_lane #(.K_FRAMES(K)) u_tx (
    .clock, .reset, .sync(tx_sync), .sample, .dout(tx_dout), .charisk(tx_k), .data_phase(tx_dp));

  // channel with a delay of dly clocks
  int          dly = 1;
  logic [17:0] chan [8];
  logic [15:0] din;
  logic [1:0]  iscomma_in;
  logic [1:0]  valid_in;
  bit          kill = 0;
  always @(posedge clock) begin
    chan[0] <= {tx_k, tx_dout};
    for (int n = 1; n < 8; n++) chan[n] <= chan[n - 1];
  end
  always_comb begin
    {iscomma_in, din} = chan[dly - 1];
    valid_in = kill ? 2'b00 : 2'b11;
  end

  logic sync_out, dread, dovf, dready, sync_check, bof, bomf;
  logic [1:0]  valid_out;
  logic [15:0] dout;
  logic        sync_q1 = 1'b0, sync_q2 = 1'b0;
  bit          reading = 1;

  always @(posedge clock) begin
    sync_q1 <= sync_out;
    sync_q2 <= sync_q1;
  end
  assign tx_sync = sync_q2;
  assign dread   = dready && reading;

  jesd204_rx_lane #(.K_FRAMES(K)) dut (
    .clock, .reset, .din, .iscomma_in, .valid_in, .sync_in(sync_out), .dread,
    .sync_out, .valid_out, .bof, .bomf, .dout, .dovf, .dready, .sync_check);

  initial for (int n = 0; n < 8; n++) chan[n] = '0;

  // samples are a counter: sample = cycle number
  int cyc = 0;
  always @(posedge clock) cyc <= cyc + 1;
  always @(negedge clock) sample <= 16'(cyc);

  bit rd_q = 0;
  int last = -1, lat = -1, n_read = 0;
  always @(posedge clock) begin
    if (!reset) begin
      if (rd_q) begin
        int v, l;
        v = int'({dout[7:0], dout[15:8]});
        l = (cyc - v) & 16'hFFFF;
        if (last >= 0) check(v == ((last + 1) & 16'hFFFF), $sformatf("read %0d after %0d", v, last));
        if (lat >= 0) check(l == lat, $sformatf("latency %0d, before %0d", l, lat));
        last = v;
        lat = l;
        n_read++;
      end
      rd_q = dread;
    end
  end

  task automatic link_up(input int d);
    dly = d;
    last = -1;
    lat = -1;
    n_read = 0;
    repeat (4 * K + 2 * K + 60) @(posedge clock);
    check(sync_out, $sformatf("sync_out with delay %0d", d));
    check(sync_check, $sformatf("sync_check with delay %0d", d));
    repeat (200) @(posedge clock);
    check(n_read > 190, $sformatf("%0d words read with delay %0d", n_read, d));
    check(!dovf, "no overflow while reading");
  endtask

  initial begin
    repeat (3) @(posedge clock);
    reset <= 1'b0;
    link_up(int'($urandom_range(8, 1)));
    reading = 0;
    repeat (40) @(posedge clock);
    check(dovf, "overflow when not read");
    // lose code groups: the link restarts
    kill = 1;
    repeat (5) @(posedge clock);
    #1 check(!sync_out && !sync_check, "sync lost after invalid words");
    kill = 0;
    reading = 1;
    link_up(int'($urandom_range(8, 1)));
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
