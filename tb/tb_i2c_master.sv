// tb_i2c_master: self-checking testbench of the IIC master.
//
// The open-drain bus is modelled as wired AND of master and one model IIC
// slave (address 0x2A, 256 byte registers). Random register writes followed
// by reads of the same registers check that:
//   - the written byte arrives in the slave's register and reads back;
//   - the slave acknowledged address and bytes, and the master reports no
//     NACK; START/STOP and repeated START are seen on the bus;
//   - a transaction to an absent device reports NACK and still ends with
//     STOP;
//   - SDA never changes while SCL is high except for START and STOP;
//   - busy lasts the expected number of bit times: a write is START +
//     3 bytes of 9 bits + STOP = 29 bits, a read 39 bits, of 4*QUARTER
//     clocks each.
module tb_i2c_master;
  localparam int QUARTER = 8;
  localparam logic [6:0] ADDR = 7'h2A;
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

  logic       start = 1'b0, rd = 1'b0;
  logic [6:0] dev_addr = '0;
  logic [7:0] reg_addr = '0, wdata = '0, rdata;
  logic       busy, done, nack, scl_oe, sda_oe, sda_i, s_sda_oe;
  logic       scl, sda;
  int         n_start, n_stop, n_acks, n_glitch;

  i2c_master #(.QUARTER(QUARTER)) dut (
    .clock, .reset, .start, .dev_addr, .rd, .reg_addr, .wdata, .rdata, .busy, .done, .nack,
    .scl_oe, .sda_oe, .sda_i);

  assign scl   = !scl_oe;
  assign sda   = !(sda_oe || s_sda_oe);
  assign sda_i = sda;

  i2c_slave_model #(.ADDR(ADDR)) u_slave (
    .clock, .scl, .sda, .sda_oe(s_sda_oe), .n_start, .n_stop, .n_acks, .n_glitch);

  // SDA may change while SCL is high only as START or STOP
  int n_sda_high_changes = 0;
  logic scl_q = 1'b1, sda_q = 1'b1;
  always @(posedge clock) begin
    if (!reset && scl && scl_q && sda != sda_q) n_sda_high_changes++;
    scl_q <= scl;
    sda_q <= sda;
  end

  int busy_clocks = 0;
  always @(posedge clock) if (busy) busy_clocks++;

  task automatic xfer(input logic [6:0] a, input bit r, input logic [7:0] ra, input logic [7:0] wd);
    busy_clocks = 0;
    dev_addr <= a;
    rd       <= r;
    reg_addr <= ra;
    wdata    <= wd;
    start    <= 1'b1;
    @(posedge clock);
    start <= 1'b0;
    @(posedge clock);
    while (busy) @(posedge clock);
    repeat (4 * QUARTER) @(posedge clock);
  endtask

  initial begin
    repeat (3) @(posedge clock);
    reset <= 1'b0;
    repeat (4) @(posedge clock);
    for (int rep = 0; rep < 10; rep++) begin
      logic [7:0] ra, wd;
      int starts, stops, acks, hc;
      ra = 8'($urandom);
      wd = 8'($urandom);
      starts = n_start;
      stops = n_stop;
      acks = n_acks;
      hc = n_sda_high_changes;
      xfer(ADDR, 1'b0, ra, wd);
      check(!nack, "write acknowledged");
      check(u_slave.mem[ra] == wd, $sformatf("slave register %0d = %h expected %h", ra, u_slave.mem[ra], wd));
      check(n_acks - acks == 3, "slave acknowledged address, register and data");
      check(n_start - starts == 1 && n_stop - stops == 1, "one START and one STOP per write");
      check(busy_clocks == 29 * 4 * QUARTER, $sformatf("write took %0d clocks", busy_clocks));
      check(n_sda_high_changes - hc == 2, "SDA changed with SCL high only for START and STOP");
      starts = n_start;
      xfer(ADDR, 1'b1, ra, 8'h00);
      check(!nack && rdata == wd, $sformatf("read %h expected %h", rdata, wd));
      check(n_start - starts == 2, "repeated START in a read");
      check(busy_clocks == 39 * 4 * QUARTER, $sformatf("read took %0d clocks", busy_clocks));
    end
    begin
      int stops;
      stops = n_stop;
      xfer(ADDR ^ 7'h11, 1'b0, 8'h10, 8'h55);
      check(nack, "absent device reports NACK");
      check(n_stop - stops == 1, "STOP after NACK");
    end
    check(n_glitch == 0, "slave saw a clean bus");
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
