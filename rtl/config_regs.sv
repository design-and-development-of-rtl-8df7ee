// config_regs: configuration registers, the IPbus slave through which the
// control system programs the board's chips over SPI (ADCs, DACs, PLLs) and
// the front-end and power monitor boards over IIC.
//
// Word address map:
//   0  W  SPI control: [3:0] device, [13:8] number of bits (0 = 32),
//         [31] start (writing 1 launches the transfer)
//      R  the last value written, bit 31 reading 0
//   1  W  SPI data out (right aligned)
//   2  R  SPI data in of the last transfer (right aligned)
//   3  R  status: [0] SPI busy, [1] IIC busy, [2] IIC no acknowledge
//   4  W  IIC control: [6:0] device address, [7] read (1) / write (0),
//         [15:8] register address, [31] start
//      R  the last value written, bit 31 reading 0
//   5  W  IIC data out [7:0]
//   6  R  IIC data in [7:0] of the last read
// A start written while that master is busy is ignored. Other addresses
// answer with err.
// Devices on the SPI chip selects, in this design's order: 0-3 ADCs, 4-7
// DACs, 8-9 PLLs.
//
// Timing: ack one clock after strobe (see ctrl_regs for the strobe rule);
// the transfer starts the clock after the write. Software polls register 3.
// A register interface turning bus transactions into SPI and IIC
// transactions follows the controller's description; the map is this
// design's choice.
module config_regs
  import llrf_pkg::*;
#(
  parameter int NUM_CS      = 10,
  parameter int SPI_CLK_DIV = 4,
  parameter int I2C_QUARTER = 8
) (
  input  logic              clock,
  input  logic              reset,
  input  ipb_wbus_t         ipb_in,
  output ipb_rbus_t         ipb_out,
  output logic              spi_sclk,
  output logic              spi_mosi,
  input  logic              spi_miso,
  output logic [NUM_CS-1:0] spi_cs_n,
  output logic              i2c_scl_oe,
  output logic              i2c_sda_oe,
  input  logic              i2c_sda_i
);

  logic [31:0] spi_ctrl, spi_dout, i2c_ctrl;
  logic [7:0]  i2c_dout;
  logic        spi_start, i2c_start;

  logic [31:0] spi_rx;
  logic        spi_busy, spi_done;
  logic [7:0]  i2c_rx;
  logic        i2c_busy, i2c_done, i2c_nack;

  spi_master #(.NUM_CS(NUM_CS), .CLK_DIV(SPI_CLK_DIV)) u_spi (
    .clock, .reset,
    .start   (spi_start),
    .cs_sel  (spi_ctrl[3:0]),
    .nbits   (spi_ctrl[13:8]),
    .tx_data (spi_dout),
    .rx_data (spi_rx),
    .busy    (spi_busy),
    .done    (spi_done),
    .sclk    (spi_sclk),
    .mosi    (spi_mosi),
    .miso    (spi_miso),
    .cs_n    (spi_cs_n)
  );

  i2c_master #(.QUARTER(I2C_QUARTER)) u_i2c (
    .clock, .reset,
    .start    (i2c_start),
    .dev_addr (i2c_ctrl[6:0]),
    .rd       (i2c_ctrl[7]),
    .reg_addr (i2c_ctrl[15:8]),
    .wdata    (i2c_dout),
    .rdata    (i2c_rx),
    .busy     (i2c_busy),
    .done     (i2c_done),
    .nack     (i2c_nack),
    .scl_oe   (i2c_scl_oe),
    .sda_oe   (i2c_sda_oe),
    .sda_i    (i2c_sda_i)
  );

  logic [7:0] a;
  logic       in_range;
  always_comb begin
    a        = ipb_in.addr[7:0];
    in_range = (a < 8'd7);
  end

  logic [31:0] rdata;
  always_comb begin
    unique case (a)
      8'd0:    rdata = {1'b0, spi_ctrl[30:0]};
      8'd1:    rdata = spi_dout;
      8'd2:    rdata = spi_rx;
      8'd3:    rdata = {29'd0, i2c_nack, i2c_busy, spi_busy};
      8'd4:    rdata = {1'b0, i2c_ctrl[30:0]};
      8'd5:    rdata = {24'd0, i2c_dout};
      8'd6:    rdata = {24'd0, i2c_rx};
      default: rdata = '0;
    endcase
  end

  always_ff @(posedge clock) begin
    if (reset) begin
      spi_ctrl  <= '0;
      spi_dout  <= '0;
      i2c_ctrl  <= '0;
      i2c_dout  <= '0;
      spi_start <= 1'b0;
      i2c_start <= 1'b0;
      ipb_out   <= IPB_RBUS_NULL;
    end else begin
      spi_start <= 1'b0;
      i2c_start <= 1'b0;
      ipb_out   <= IPB_RBUS_NULL;
      if (ipb_in.strobe && !ipb_out.ack && !ipb_out.err) begin
        ipb_out.ack   <= in_range;
        ipb_out.err   <= !in_range;
        ipb_out.rdata <= in_range ? rdata : '0;
        if (ipb_in.write) begin
          unique case (a)
            8'd0: if (!spi_busy) begin
              spi_ctrl  <= ipb_in.wdata;
              spi_start <= ipb_in.wdata[31];
            end
            8'd1: spi_dout <= ipb_in.wdata;
            8'd4: if (!i2c_busy) begin
              i2c_ctrl  <= ipb_in.wdata;
              i2c_start <= ipb_in.wdata[31];
            end
            8'd5: i2c_dout <= ipb_in.wdata[7:0];
            default: ;
          endcase
        end
      end
    end
  end

endmodule
