// tb_config_regs: self-checking testbench of the configuration register
// slave (SPI and IIC access over IPbus).
//
// Model slaves on the buses: ten SPI slaves and one IIC slave (address
// 0x2A). Through IPbus the testbench
//   - writes SPI data and control registers (random device and length),
//     polls the status register until the SPI master is idle, and checks
//     that the addressed slave received the data and that register 2 holds
//     its response;
//   - writes an IIC register through registers 5 and 4, reads it back
//     through register 4 and register 6, and checks the NACK status bit
//     for an absent device;
//   - checks control register read-back and err on unmapped addresses.
module tb_config_regs
  import llrf_pkg::*;
;
  localparam int NCS = 10;
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

  ipb_wbus_t ipb_in = '0;
  ipb_rbus_t ipb_out;
  logic      spi_sclk, spi_mosi, spi_miso;
  logic [NCS-1:0] spi_cs_n;
  logic      i2c_scl_oe, i2c_sda_oe, i2c_sda_i, s_sda_oe;

  config_regs #(.NUM_CS(NCS)) dut (
    .clock, .reset, .ipb_in, .ipb_out, .spi_sclk, .spi_mosi, .spi_miso, .spi_cs_n,
    .i2c_scl_oe, .i2c_sda_oe, .i2c_sda_i);

`include "ipb_master_tasks.svh"

  logic [NCS-1:0] miso_s;
  logic [31:0] response [NCS];
  logic [31:0] rx_word [NCS];
  int          n_edges [NCS], n_frames [NCS];
  int          nb = 24;

  for (genvar s = 0; s < NCS; s++) begin : g_spi
    spi_slave_model u_slave (
      .clock, .cs_n(spi_cs_n[s]), .sclk(spi_sclk), .mosi(spi_mosi), .miso(miso_s[s]),
      .response(response[s]), .nbits(nb), .rx_word(rx_word[s]), .n_edges(n_edges[s]),
      .n_frames(n_frames[s]));
  end
  always_comb begin
    spi_miso = 1'b0;
    for (int s = 0; s < NCS; s++) if (!spi_cs_n[s]) spi_miso = miso_s[s];
  end

  logic scl, sda;
  int   n_start, n_stop, n_acks, n_glitch;
  assign scl = !i2c_scl_oe;
  assign sda = !(i2c_sda_oe || s_sda_oe);
  assign i2c_sda_i = sda;
  i2c_slave_model #(.ADDR(7'h2A)) u_i2c (
    .clock, .scl, .sda, .sda_oe(s_sda_oe), .n_start, .n_stop, .n_acks, .n_glitch);

  task automatic wait_idle(input logic [31:0] mask);
    logic [31:0] d;
    bit e;
    for (int n = 0; n < 2000; n++) begin
      ipb_read(32'd3, d, e);
      if ((d & mask) == 0) return;
    end
    check(1'b0, "master stays busy");
  endtask

  initial begin
    logic [31:0] d, w, ctrl;
    bit e;
    for (int s = 0; s < NCS; s++) response[s] = '0;
    repeat (3) @(posedge clock);
    reset <= 1'b0;
    repeat (2) @(posedge clock);
    for (int rep = 0; rep < 8; rep++) begin
      int s;
      logic [31:0] mask;
      s  = int'($urandom_range(NCS - 1));
      nb = (rep % 2) ? 16 : 24;
      mask = (32'd1 << nb) - 1;
      for (int n = 0; n < NCS; n++) response[n] = $urandom;
      w = $urandom;
      ipb_write(32'd1, w, e);
      check(!e, "SPI data write");
      ctrl = {1'b1, 17'd0, 6'(nb), 4'd0, 4'(s)};
      ipb_write(32'd0, ctrl, e);
      ipb_read(32'd3, d, e);
      check(d[0], "SPI busy after start");
      wait_idle(32'h1);
      check(rx_word[s] == (w & mask), $sformatf("SPI device %0d received %h", s, rx_word[s]));
      ipb_read(32'd2, d, e);
      check(d == (response[s] & mask), $sformatf("SPI read-back %h", d));
      ipb_read(32'd0, d, e);
      check(d == {1'b0, ctrl[30:0]}, "SPI control read-back");
    end
    for (int rep = 0; rep < 3; rep++) begin
      logic [7:0] ra, wd;
      ra = 8'($urandom);
      wd = 8'($urandom);
      ipb_write(32'd5, {24'd0, wd}, e);
      ipb_write(32'd4, {1'b1, 15'd0, ra, 1'b0, 7'h2A}, e);
      wait_idle(32'h2);
      ipb_read(32'd3, d, e);
      check(!d[2], "IIC write acknowledged");
      check(u_i2c.mem[ra] == wd, "IIC register written");
      ipb_write(32'd4, {1'b1, 15'd0, ra, 1'b1, 7'h2A}, e);
      wait_idle(32'h2);
      ipb_read(32'd6, d, e);
      check(d == {24'd0, wd}, $sformatf("IIC read-back %h expected %h", d, wd));
    end
    ipb_write(32'd4, {1'b1, 15'd0, 8'h01, 1'b0, 7'h33}, e);
    wait_idle(32'h2);
    ipb_read(32'd3, d, e);
    check(d[2], "IIC NACK status for an absent device");
    ipb_read(32'd7 + 32'($urandom_range(100)), d, e);
    check(e, "unmapped address answers err");
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
