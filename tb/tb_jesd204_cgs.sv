// tb_jesd204_cgs: self-checking testbench of the code group synchronization
// stage of a JESD204B receive lane.
//
// Stimulus words of two octets with their K and valid flags:
//   random data, then three K28.5 words and data (no synchronization),
//   then K28.5 words (sync must rise one clock after the fourth),
//   single and triple invalid words (sync must hold), four invalid words in
//   a row (sync must fall), and a second synchronization.
// Also checks that isk is the K flag masked by valid, one clock late.
module tb_jesd204_cgs;
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
  logic [1:0]  iscomma_in = '0, valid_in = '0;
  logic [1:0]  isk;
  logic        sync;

  jesd204_cgs #(.CGS_COUNT(4)) dut (.clock, .reset, .din, .iscomma_in, .valid_in, .isk, .sync);

  logic [1:0] isk_exp = '0;
  always @(posedge clock) begin
    if (!reset) check(isk == isk_exp, "isk");
    isk_exp <= iscomma_in & valid_in;
  end

  task automatic word(input bit comma, input logic [1:0] v);
    din        <= comma ? 16'hBCBC : 16'($urandom_range(65535) & 16'h7F7F);
    iscomma_in <= comma ? 2'b11 : 2'(($urandom_range(3) == 0) ? 1 : 0);
    valid_in   <= v;
    @(posedge clock);
  endtask

  int n_sync = 0, n_lost = 0;
  logic sync_q = 1'b0;
  always @(posedge clock) begin
    if (sync && !sync_q) n_sync++;
    if (!sync && sync_q) n_lost++;
    sync_q <= sync;
  end

  initial begin
    repeat (3) @(posedge clock);
    reset <= 1'b0;
    for (int n = 0; n < 20; n++) word(1'b0, 2'b11);
    check(!sync, "no sync on data");
    for (int n = 0; n < 3; n++) word(1'b1, 2'b11);
    word(1'b0, 2'b11);
    @(posedge clock);
    check(!sync, "three commas are not enough");
    for (int n = 0; n < 3; n++) word(1'b1, 2'b11);
    #1 check(!sync, "sync not before the fourth comma");
    word(1'b1, 2'b11);
    #1 check(sync, "sync one clock after the fourth comma");
    for (int n = 0; n < 10; n++) word(1'b0, 2'b11);
    word(1'b0, 2'b01);
    word(1'b0, 2'b11);
    for (int n = 0; n < 3; n++) word(1'b0, 2'b10);
    word(1'b0, 2'b11);
    #1 check(sync, "sync survives up to three invalid words");
    for (int n = 0; n < 4; n++) word(1'b0, 2'b00);
    #1 check(!sync, "sync lost after four invalid words");
    for (int n = 0; n < 6; n++) word(1'b1, 2'b11);
    #1 check(sync, "second synchronization");
    check(n_sync == 2 && n_lost == 1, $sformatf("sync edges %0d up %0d down", n_sync, n_lost));
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
