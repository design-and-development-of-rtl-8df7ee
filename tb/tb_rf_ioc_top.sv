// tb_rf_ioc_top: end-to-end testbench of the eight-cavity controller, at
// its default size (8 cavities, 4 dual ADCs and DACs, K = 32).
//
// Around the design: eight behavioural cavities; eight JESD204B transmit
// lanes standing for the ADCs (two per dual ADC, following its SYNC~);
// eight JESD204B receive lanes standing for the DACs (SYNC~ per dual DAC);
// ten SPI slave models and one IIC slave model; an IPbus master.
// Cavities 0-3 are 80 MHz cavities (D = 8), 4-7 160 MHz cavities (D = 4);
// cavity 3 averages pairs (CIC enabled). The testbench counts each
// mechanism it makes happen and fails if any count stays zero:
//   adc_cgs      all four ADC links finish code group synchronization
//   adc_ilas     all eight RX lanes pass the ILAS (transceiver register 0)
//   dac_link     all four DAC links synchronize and deliver samples
//   char_repl    /F/ or /A/ characters sent by the design's TX lanes
//   regs         loop parameters written and read back over IPbus
//   gdr_lock     field and phase lock of the GDR cavities (register 0)
//   setpoint     cavity amplitude at its set point (model) and phase error
//                small (register 14)
//   sel_cpm      SEL cavity locked in phase with a non-zero CPM correction
//   freq_err     frequency error read back from a detuned SEL cavity
//   cic          averaging cavity locked
//   spi          SPI transfer through the configuration registers
//   iic          IIC write and read-back through the configuration registers
//   ipb_err      unmapped IPbus address answered with err
//   lane_reset   an RX lane reset through the transceiver registers drops
//                the link, which synchronizes again
module tb_rf_ioc_top
  import llrf_pkg::*;
;
  localparam int NC = 8;
  localparam int NL = 4;
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

  logic [15:0] rx_data [NC];
  logic [1:0]  rx_charisk [NC];
  logic [1:0]  rx_valid [NC];
  logic [NL-1:0] adc_sync_n;
  logic [15:0] tx_data [NC];
  logic [1:0]  tx_charisk [NC];
  logic [NL-1:0] dac_sync_n;
  ipb_wbus_t   ipb_in = '0;
  ipb_rbus_t   ipb_out;
  logic        spi_sclk, spi_mosi, spi_miso;
  logic [9:0]  spi_cs_n;
  logic        i2c_scl_oe, i2c_sda_oe, i2c_sda_i;

  rf_ioc_top dut (
    .clock, .reset, .rx_data, .rx_charisk, .rx_valid, .adc_sync_n,
    .tx_data, .tx_charisk, .dac_sync_n, .ipb_in, .ipb_out,
    .spi_sclk, .spi_mosi, .spi_miso, .spi_cs_n, .i2c_scl_oe, .i2c_sda_oe, .i2c_sda_i);

`include "ipb_master_tasks.svh"

  // ------------------------------------------------------------ cavities
  real tan_psi [NC];
  real amp [NC], phase [NC];
  logic signed [15:0] adc_s [NC], dac_s [NC];
  int  dec [NC];

  // ------------------------------------------------------------ DAC side
  logic [NC-1:0] d_sync, d_ready;
  logic [15:0]   d_dout [NC];
  logic [NL-1:0] d_link_sync, d_link_read;
  always_comb
    for (int l = 0; l < NL; l++) begin
      d_link_sync[l] = d_sync[2 * l] && d_sync[2 * l + 1];
      d_link_read[l] = d_ready[2 * l] && d_ready[2 * l + 1];
    end
  assign dac_sync_n = d_link_sync;
  logic [NL-1:0] d_read_q = '0;
  always @(posedge clock) d_read_q <= d_link_read;

  int n_repl = 0;

  for (genvar c = 0; c < NC; c++) begin : g_env
    // ADC lane
    logic adc_dp;
    jesd204_tx_lane #(.K_FRAMES(32), .LANE_ID(c % 2)) u_adc (
      .clock, .reset, .sync(adc_sync_n[c / 2]), .sample(adc_s[c]),
      .dout(rx_data[c]), .charisk(rx_charisk[c]), .data_phase(adc_dp));
    assign rx_valid[c] = 2'b11;

    // DAC lane
    logic [1:0] vo;
    logic bof, bomf, ovf, chk;
    jesd204_rx_lane #(.K_FRAMES(32)) u_dac (
      .clock, .reset, .din(tx_data[c]), .iscomma_in(tx_charisk[c]), .valid_in(2'b11),
      .sync_in(d_link_sync[c / 2]), .dread(d_link_read[c / 2]), .sync_out(d_sync[c]),
      .valid_out(vo), .bof, .bomf, .dout(d_dout[c]), .dovf(ovf), .dready(d_ready[c]),
      .sync_check(chk));
    assign dac_s[c] = d_read_q[c / 2] ? signed'({d_dout[c][7:0], d_dout[c][15:8]}) : 16'sd0;

    always @(posedge clock)
      if (!reset && tx_charisk[c][1] && !tx_charisk[c][0] && dut.tx_dp_all[c]) n_repl++;

    cavity_model #(.AUTO_ALIGN(1'b1), .PHI_C(0.3 + 0.1 * c)) u_cav (
      .clock, .reset, .dec(dec[c]), .tan_psi(tan_psi[c]), .dac_data(dac_s[c]),
      .adc_data(adc_s[c]), .amp(amp[c]), .phase(phase[c]));
  end

  // ------------------------------------------------------------ SPI / IIC
  logic [9:0]  miso_s;
  logic [31:0] response [10];
  logic [31:0] spi_rx [10];
  int          n_edges [10], n_frames [10];
  for (genvar s = 0; s < 10; s++) begin : g_spi
    spi_slave_model u_slave (
      .clock, .cs_n(spi_cs_n[s]), .sclk(spi_sclk), .mosi(spi_mosi), .miso(miso_s[s]),
      .response(response[s]), .nbits(24), .rx_word(spi_rx[s]), .n_edges(n_edges[s]),
      .n_frames(n_frames[s]));
  end
  always_comb begin
    spi_miso = 1'b0;
    for (int s = 0; s < 10; s++) if (!spi_cs_n[s]) spi_miso = miso_s[s];
  end
  logic scl, sda, s_sda_oe;
  int   n_start, n_stop, n_acks, n_glitch;
  assign scl = !i2c_scl_oe;
  assign sda = !(i2c_sda_oe || s_sda_oe);
  assign i2c_sda_i = sda;
  i2c_slave_model #(.ADDR(7'h50)) u_i2c (
    .clock, .scl, .sda, .sda_oe(s_sda_oe), .n_start, .n_stop, .n_acks, .n_glitch);

  // ------------------------------------------------------------ helpers
  typedef enum int {M_ADC_CGS, M_ADC_ILAS, M_DAC_LINK, M_CHAR_REPL, M_REGS, M_GDR_LOCK,
                    M_SETPOINT, M_SEL_CPM, M_FREQ_ERR, M_CIC, M_SPI, M_IIC, M_IPB_ERR,
                    M_LANE_RESET, M_COUNT} mech_e;
  int mech [M_COUNT];
  string mech_name [M_COUNT] = '{"adc_cgs", "adc_ilas", "dac_link", "char_repl", "regs",
                                 "gdr_lock", "setpoint", "sel_cpm", "freq_err", "cic", "spi",
                                 "iic", "ipb_err", "lane_reset"};

  function automatic int wrap16(input int v);
    int r;
    r = v & 16'hFFFF;
    return (r >= 32768) ? r - 65536 : r;
  endfunction
  function automatic int absi(input int v);
    return v < 0 ? -v : v;
  endfunction

  task automatic wr(input int slave, input int r, input logic [31:0] v);
    bit e;
    ipb_write(32'(slave * 256 + r), v, e);
    check(!e, $sformatf("write slave %0d register %0d", slave, r));
  endtask
  task automatic rd(input int slave, input int r, output logic [31:0] v);
    bit e;
    ipb_read(32'(slave * 256 + r), v, e);
    check(!e, $sformatf("read slave %0d register %0d", slave, r));
  endtask

  logic [15:0] sp_field [NC], sp_phase [NC];

  function automatic logic [31:0] reg0(input int c, input bit sel, input bit ph_en);
    logic [31:0] v;
    v = '0;
    v[5:0]  = 6'(dec[c]);
    v[10:6] = (c == 3) ? 5'd1 : 5'd0;
    v[12]   = ph_en;
    v[13]   = 1'b1;
    v[16]   = sel;
    v[17]   = 1'b1;
    v[18]   = (c == 3);
    return v;
  endfunction

  task automatic program_cavity(input int c);
    logic [31:0] v;
    wr(c, 0, reg0(c, 1'b0, 1'b1));
    wr(c, 1, 32'd0);
    wr(c, 2, 32'd12000);
    wr(c, 3, {16'd0, sp_phase[c]});
    wr(c, 4, {16'd0, sp_field[c]});
    wr(c, 5, 32'd128);
    wr(c, 6, 32'd16);
    wr(c, 7, 32'd128);
    wr(c, 8, 32'd16);
    wr(c, 9, 32'd300);
    wr(c, 10, 32'd200);
    wr(c, 11, 32'd32);
    wr(c, 12, 32'd32);
    rd(c, 4, v);
    if (v == {16'd0, sp_field[c]}) mech[M_REGS]++;
    else check(1'b0, $sformatf("cavity %0d field set point read back %h", c, v));
  endtask

  task automatic check_cavity_locked(input int c, input string what);
    logic [31:0] v;
    rd(c, 0, v);
    check(v[14] && v[15], $sformatf("%s: cavity %0d lock bits %b%b", what, c, v[15], v[14]));
    if (v[14] && v[15]) mech[M_GDR_LOCK]++;
    rd(c, 14, v);
    if (absi(int'(0.8235 * amp[c]) - int'(sp_field[c])) < 250 &&
        absi(int'(signed'(v[15:0]))) < 300) mech[M_SETPOINT]++;
    else check(1'b0, $sformatf("%s: cavity %0d amplitude %f, phase error %0d", what, c, amp[c],
                               signed'(v[15:0])));
  endtask

  initial begin
    logic [31:0] v;
    bit e;
    for (int c = 0; c < NC; c++) begin
      tan_psi[c] = 0.1 * real'(c % 4) - 0.1;
      dec[c] = (c < 4) ? 8 : 4;
      sp_field[c] = 16'(9000 + 500 * c);
      sp_phase[c] = 16'(4096 * c + 1000);
    end
    for (int n = 0; n < M_COUNT; n++) mech[n] = 0;
    for (int s = 0; s < 10; s++) response[s] = 32'h00A5_0000 + 32'(s);
    repeat (5) @(posedge clock);
    reset <= 1'b0;

    // links
    repeat (400) @(posedge clock);
    check(adc_sync_n == 4'hF, "ADC links synchronized");
    if (adc_sync_n == 4'hF) mech[M_ADC_CGS]++;
    rd(9, 0, v);
    check(v[15:8] == 8'hFF, $sformatf("RX lanes passed ILAS: %h", v));
    if (v[15:8] == 8'hFF) mech[M_ADC_ILAS]++;
    check(dac_sync_n == 4'hF && d_read_q == 4'hF, "DAC links deliver samples");
    if (dac_sync_n == 4'hF && d_read_q == 4'hF) mech[M_DAC_LINK]++;

    // GDR on all cavities
    for (int c = 0; c < NC; c++) program_cavity(c);
    repeat (50000) @(posedge clock);
    for (int c = 0; c < NC; c++) check_cavity_locked(c, "GDR");
    if (n_repl > 0) mech[M_CHAR_REPL]++;
    rd(3, 0, v);
    if (v[14] && v[15] && v[18]) mech[M_CIC]++;

    // SEL with the phase loop open on cavity 1: frequency error
    // the SEL phase shift cancels the loop's own phase, known from the
    // GDR state of this (tuned) cavity: drive phase - measured phase
    rd(1, 16, v);
    wr(1, 1, {16'd0, v[15:0] - sp_phase[1]});
    tan_psi[1] = 0.4;
    wr(1, 0, reg0(1, 1'b1, 1'b0));
    repeat (20000) @(posedge clock);
    rd(1, 15, v);
    check(signed'(v) < -2000, $sformatf("SEL frequency error %0d", signed'(v)));
    if (signed'(v) < -2000) mech[M_FREQ_ERR]++;
    // phase loop closed: CPM
    wr(1, 0, reg0(1, 1'b1, 1'b1));
    repeat (50000) @(posedge clock);
    rd(1, 16, v);
    check(v != 0, "SEL phase correction");
    rd(1, 0, v);
    check(v[14] && v[15] && v[16], $sformatf("SEL cavity locked: register 0 %h", v));
    begin
      logic [31:0] pe;
      rd(1, 14, pe);
      if (v[14] && v[15] && v[16] && absi(int'(signed'(pe[15:0]))) < 300) mech[M_SEL_CPM]++;
    end

    // SPI: write 24 bits to the first DAC (chip select 4)
    wr(8, 1, 32'h0012_3456);
    wr(8, 0, {1'b1, 17'd0, 6'd24, 4'd0, 4'd4});
    repeat (400) @(posedge clock);
    rd(8, 2, v);
    check(spi_rx[4] == 32'h0012_3456 && v == (response[4] & 32'hFF_FFFF), "SPI transfer");
    if (spi_rx[4] == 32'h0012_3456 && v == (response[4] & 32'hFF_FFFF)) mech[M_SPI]++;

    // IIC: write register 0x21 of device 0x50, read it back
    wr(8, 5, 32'h0000_00C3);
    wr(8, 4, {1'b1, 15'd0, 8'h21, 1'b0, 7'h50});
    repeat (1200) @(posedge clock);
    wr(8, 4, {1'b1, 15'd0, 8'h21, 1'b1, 7'h50});
    repeat (1500) @(posedge clock);
    rd(8, 6, v);
    check(v == 32'hC3 && u_i2c.mem[8'h21] == 8'hC3, $sformatf("IIC read-back %h", v));
    if (v == 32'hC3) mech[M_IIC]++;

    // unmapped address
    ipb_read(32'h0000_0A00, v, e);
    check(e, "unmapped address answers err");
    if (e) mech[M_IPB_ERR]++;

    // lane reset: RX lane 6 held in reset, link 3 drops, then recovers
    wr(9, 2, 32'h0000_0040);
    repeat (20) @(posedge clock);
    check(adc_sync_n[3] == 1'b0, "link 3 down while its lane is reset");
    wr(9, 2, 32'h0);
    repeat (600) @(posedge clock);
    rd(9, 0, v);
    check(adc_sync_n == 4'hF && v[15:8] == 8'hFF, "link 3 synchronized again");
    if (adc_sync_n == 4'hF && v[15:8] == 8'hFF) mech[M_LANE_RESET]++;
    repeat (30000) @(posedge clock);
    check_cavity_locked(6, "after lane reset");

    for (int n = 0; n < M_COUNT; n++) begin
      $display("mechanism %-11s happened %0d times", mech_name[n], mech[n]);
      check(mech[n] > 0, $sformatf("mechanism %s never happened", mech_name[n]));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #20ms;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
