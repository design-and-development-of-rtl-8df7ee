// rf_ioc_top: FPGA firmware of an eight-cavity digital low-level RF
// controller for a superconducting linear accelerator.
//
// Each cavity's pick-up signal is undersampled by one channel of a dual ADC
// at f_s = 121.9 MHz, arrives over a JESD204B lane, and is demodulated,
// controlled in amplitude and phase and modulated again into a 16-bit
// sample stream that goes out over another JESD204B lane to one channel of a
// dual DAC, whose output, filtered, drives the cavity's power amplifier.
// The control system reads and writes the loop parameters, and programs the
// board's chips, over IPbus.
//
// Structure:
//   8 x jesd204_rx_lane   ADC lanes; lanes 2l and 2l+1 form the link of
//                         dual ADC l: its SYNC~ (adc_sync_n[l]) is the AND
//                         of both lanes' synchronization, and both lanes'
//                         alignment buffers are read together once both
//                         hold data
//   8 x cavity_controller one per cavity, fed by RX lane c, feeding TX lane c
//   8 x jesd204_tx_lane   DAC lanes; lanes 2l and 2l+1 follow dac_sync_n[l]
//   ipbus_fabric          slaves 0-7: ctrl_regs of cavities 0-7,
//                         slave 8: config_regs (SPI, IIC),
//                         slave 9: xcvr_regs (lane status and resets);
//                         slave n sits at word addresses 0x100*n + 0..0xFF
// The gigabit transceivers (8b/10b, serialisation, comma alignment) and the
// IPbus core (Ethernet, UDP/ARP/ICMP, transaction engine) are outside this
// module: the transceivers' parallel data and the IPbus master bus are its
// ports.
//
// Samples: one 16-bit sample per lane per clock (F = 2 octets per frame),
// most significant octet first. All logic runs on the single device clock
// and a synchronous active-high reset.
// The partition into lanes, demodulation, loops, modulation and register
// slaves follows the controller's firmware description; the lane-to-link
// mapping, the address map and the port form are this design's choices.
module rf_ioc_top
  import llrf_pkg::*;
#(
  parameter int NUM_CAV    = 8,
  parameter int NUM_CONV   = 4,
  parameter int K_FRAMES   = 32,
  parameter int NUM_SPI_CS = 10
) (
  input  logic              clock,
  input  logic              reset,
  // ADC lanes from the transceivers
  input  logic [15:0]       rx_data    [NUM_CAV],
  input  logic [1:0]        rx_charisk [NUM_CAV],
  input  logic [1:0]        rx_valid   [NUM_CAV],
  output logic [NUM_CONV-1:0] adc_sync_n,
  // DAC lanes to the transceivers
  output logic [15:0]       tx_data    [NUM_CAV],
  output logic [1:0]        tx_charisk [NUM_CAV],
  input  logic [NUM_CONV-1:0] dac_sync_n,
  // IPbus master bus
  input  ipb_wbus_t         ipb_in,
  output ipb_rbus_t         ipb_out,
  // SPI to ADCs, DACs, PLLs
  output logic              spi_sclk,
  output logic              spi_mosi,
  input  logic              spi_miso,
  output logic [NUM_SPI_CS-1:0] spi_cs_n,
  // IIC to the front-end and power monitor boards (open drain)
  output logic              i2c_scl_oe,
  output logic              i2c_sda_oe,
  input  logic              i2c_sda_i
);

  localparam int NSLV = NUM_CAV + 2;
  localparam int LPC  = NUM_CAV / NUM_CONV;  // lanes per converter

  // ---------------------------------------------------------------- IPbus
  ipb_wbus_t ipb_w [NSLV];
  ipb_rbus_t ipb_r [NSLV];

  ipbus_fabric #(.NSLV(NSLV), .SEL_LSB(8)) u_fabric (
    .clock, .reset,
    .ipb_in, .ipb_out,
    .ipb_to_slaves  (ipb_w),
    .ipb_from_slaves(ipb_r)
  );

  logic [NUM_CAV-1:0] rx_rst, tx_rst;

  // ---------------------------------------------------------------- RX lanes
  logic [NUM_CAV-1:0] rx_sync_out, rx_dready, rx_dovf, rx_check;
  logic [NUM_CAV-1:0] tx_dp_all;
  logic [15:0]        rx_dout [NUM_CAV];
  logic [NUM_CONV-1:0] link_sync, link_read;
  logic [NUM_CONV-1:0] link_read_q;

  always_comb begin
    for (int l = 0; l < NUM_CONV; l++) begin
      link_sync[l] = &rx_sync_out[l*LPC +: LPC];
      link_read[l] = &rx_dready[l*LPC +: LPC];
    end
    adc_sync_n = link_sync;
  end

  always_ff @(posedge clock) begin
    if (reset) link_read_q <= '0;
    else       link_read_q <= link_read;
  end

  for (genvar c = 0; c < NUM_CAV; c++) begin : g_cav
    logic [1:0] valid_out;
    logic       bof, bomf;
    cav_cfg_t    cfg;
    cav_status_t status;
    logic signed [DAC_W-1:0] dac_sample;
    logic        tx_dp;

    jesd204_rx_lane #(.K_FRAMES(K_FRAMES)) u_rx (
      .clock,
      .reset      (reset || rx_rst[c]),
      .din        (rx_data[c]),
      .iscomma_in (rx_charisk[c]),
      .valid_in   (rx_valid[c]),
      .sync_in    (link_sync[c / LPC]),
      .dread      (link_read[c / LPC]),
      .sync_out   (rx_sync_out[c]),
      .valid_out,
      .bof,
      .bomf,
      .dout       (rx_dout[c]),
      .dovf       (rx_dovf[c]),
      .dready     (rx_dready[c]),
      .sync_check (rx_check[c])
    );

    ctrl_regs u_regs (
      .clock, .reset,
      .ipb_in  (ipb_w[c]),
      .ipb_out (ipb_r[c]),
      .cfg,
      .status
    );

    cavity_controller u_ctrl (
      .clock, .reset,
      .adc_data  ({rx_dout[c][7:0], rx_dout[c][15:8]}),
      .adc_valid (link_read_q[c / LPC]),
      .cfg,
      .status,
      .dac_data  (dac_sample)
    );

    jesd204_tx_lane #(.K_FRAMES(K_FRAMES), .LANE_ID(c % LPC)) u_tx (
      .clock,
      .reset      (reset || tx_rst[c]),
      .sync       (dac_sync_n[c / LPC]),
      .sample     (dac_sample),
      .dout       (tx_data[c]),
      .charisk    (tx_charisk[c]),
      .data_phase (tx_dp)
    );

    assign tx_dp_all[c] = tx_dp;
  end

  // ---------------------------------------------------------------- slow control
  config_regs #(.NUM_CS(NUM_SPI_CS)) u_config (
    .clock, .reset,
    .ipb_in  (ipb_w[NUM_CAV]),
    .ipb_out (ipb_r[NUM_CAV]),
    .spi_sclk, .spi_mosi, .spi_miso, .spi_cs_n,
    .i2c_scl_oe, .i2c_sda_oe, .i2c_sda_i
  );

  xcvr_regs #(.NLANES(NUM_CAV), .NLINKS(NUM_CONV)) u_xcvr (
    .clock, .reset,
    .ipb_in        (ipb_w[NUM_CAV + 1]),
    .ipb_out       (ipb_r[NUM_CAV + 1]),
    .rx_sync       (rx_sync_out),
    .rx_check      (rx_check),
    .rx_ovf        (rx_dovf),
    .tx_data_phase (tx_dp_all),
    .dac_sync_n,
    .adc_sync_n    (link_sync),
    .rx_rst,
    .tx_rst
  );

endmodule
