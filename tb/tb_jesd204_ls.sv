// tb_jesd204_ls: self-checking testbench of the lane alignment buffer of a
// JESD204B receive lane.
//
// A counting data stream is written; the buffer must ignore everything
// before the first start-of-multiframe flag and from then on store every
// word. The reader starts a few clocks later;
// the words read (one clock after dread; a few single-clock pauses build up
// the fill level) must be the stream from the
// multiframe start on, in order and without gaps. Then reading stops until
// the buffer overflows (dovf must rise and stay), and dropping sync must
// empty the buffer and clear dovf. dready must be low while empty.
module tb_jesd204_ls;
  localparam int DEPTH = 16;
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

  logic [15:0] din = '0;
  logic        bomf = 1'b0, sync = 1'b0, dread = 1'b0;
  logic [15:0] dout;
  logic        dovf, dready;

  jesd204_ls #(.DEPTH(DEPTH)) dut (.clock, .reset, .din, .bomf, .sync, .dread, .dout, .dovf, .dready);

  int expect_next = -1;
  bit rd_q = 1'b0;
  int n_read = 0;

  always @(posedge clock) begin
    if (!reset) begin
      if (rd_q) begin
        check(int'(dout) == expect_next, $sformatf("read %0d expected %0d", dout, expect_next));
        expect_next = int'(dout) + 1;
        n_read++;
      end
      rd_q <= dread && dready;
    end
  end

  initial begin
    int w;
    repeat (3) @(posedge clock);
    reset <= 1'b0;
    sync <= 1'b1;
    w = 100;
    for (int n = 0; n < 10; n++) begin
      din <= 16'(w++);
      @(posedge clock);
      #1 check(!dready, "empty before the multiframe start");
    end
    expect_next = w;
    din  <= 16'(w++);
    bomf <= 1'b1;
    @(posedge clock);
    bomf <= 1'b0;
    for (int n = 0; n < 400; n++) begin
      din <= 16'(w++);
      bomf <= (n % 32 == 31);
      dread <= (n > 5) && !(n < 200 && n % 25 == 0);
      if (n > 300) dread <= 1'b1;
      @(posedge clock);
      if (n > 5) check(!dovf, "no overflow while reading");
    end
    check(n_read > 300, $sformatf("only %0d words read", n_read));
    dread <= 1'b0;
    for (int n = 0; n < DEPTH + 4; n++) begin
      din <= 16'(w++);
      @(posedge clock);
    end
    #1 check(dovf, "overflow when not read");
    repeat (5) @(posedge clock);
    #1 check(dovf, "overflow flag is sticky");
    sync <= 1'b0;
    @(posedge clock);
    @(posedge clock);
    #1 check(!dovf && !dready, "sync low empties the buffer");
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
