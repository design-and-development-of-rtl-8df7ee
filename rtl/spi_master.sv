// spi_master: SPI master for the configuration of the converters and clock
// chips (ADCs, DACs, PLLs) of the controller board.
//
// A pulse on start (while not busy) selects device cs_sel, pulls its chip
// select low and shifts out the nbits least significant bits of tx_data,
// most significant of them first, while shifting in the same number of bits
// from miso into rx_data (right aligned). SPI mode 0: sclk idles low, mosi
// changes on the falling edge, miso is sampled on the rising edge. One sclk
// period lasts 2*CLK_DIV clocks. nbits = 0 is taken as 32, so register
// formats of 16 and 24 bits (address + data) are all covered.
//
// Timing: busy rises the clock after start and falls when chip select is
// released, nbits*2*CLK_DIV + 2*CLK_DIV clocks later; done pulses then and
// rx_data is valid. cs_sel values >= NUM_CS select no device.
// An FPGA-side SPI master serving the board's devices follows the
// controller's description; mode, bit order and framing are this design's
// choices.
module spi_master #(
  parameter int NUM_CS  = 10,
  parameter int CLK_DIV = 4
) (
  input  logic              clock,
  input  logic              reset,
  input  logic              start,
  input  logic [3:0]        cs_sel,
  input  logic [5:0]        nbits,
  input  logic [31:0]       tx_data,
  output logic [31:0]       rx_data,
  output logic              busy,
  output logic              done,
  output logic              sclk,
  output logic              mosi,
  input  logic              miso,
  output logic [NUM_CS-1:0] cs_n
);

  typedef enum logic [1:0] {S_IDLE, S_LEAD, S_SHIFT, S_TRAIL} state_e;

  localparam int DW = $clog2(CLK_DIV + 1);

  state_e      state;
  logic [DW-1:0] div_cnt;
  logic [5:0]  bits_left;
  logic [31:0] sh_out;
  logic [31:0] sh_in;

  logic tick;
  always_comb tick = (div_cnt == DW'(CLK_DIV - 1));

  always_ff @(posedge clock) begin
    if (reset) begin
      state     <= S_IDLE;
      div_cnt   <= '0;
      bits_left <= '0;
      sh_out    <= '0;
      sh_in     <= '0;
      rx_data   <= '0;
      busy      <= 1'b0;
      done      <= 1'b0;
      sclk      <= 1'b0;
      mosi      <= 1'b0;
      cs_n      <= '1;
    end else begin
      done    <= 1'b0;
      div_cnt <= tick ? '0 : div_cnt + 1'b1;
      unique case (state)
        S_IDLE: begin
          div_cnt <= '0;
          if (start) begin
            logic [5:0] n;
            n = (nbits == 6'd0) ? 6'd32 : (nbits > 6'd32 ? 6'd32 : nbits);
            // left-align the bits to send
            sh_out    <= tx_data << (32 - int'(n));
            bits_left <= n;
            sh_in     <= '0;
            busy      <= 1'b1;
            state     <= S_LEAD;
            for (int c = 0; c < NUM_CS; c++) cs_n[c] <= !(32'(cs_sel) == c);
          end
        end
        S_LEAD: begin
          // first bit set up half a period before the first rising edge
          mosi <= sh_out[31];
          if (tick) state <= S_SHIFT;
        end
        S_SHIFT: begin
          if (tick) begin
            if (!sclk) begin
              sclk  <= 1'b1;
              sh_in <= {sh_in[30:0], miso};
            end else begin
              sclk      <= 1'b0;
              sh_out    <= sh_out << 1;
              mosi      <= sh_out[30];
              bits_left <= bits_left - 6'd1;
              if (bits_left == 6'd1) state <= S_TRAIL;
            end
          end
        end
        S_TRAIL: begin
          if (tick) begin
            cs_n    <= '1;
            busy    <= 1'b0;
            done    <= 1'b1;
            rx_data <= sh_in;
            mosi    <= 1'b0;
            state   <= S_IDLE;
          end
        end
        default: state <= S_IDLE;
      endcase
    end
  end

endmodule
