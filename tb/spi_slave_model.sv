// spi_slave_model: behavioural SPI slave (mode 0) for the testbenches.
//
// While its chip select cs_n is low it shifts mosi in on each rising sclk
// edge and presents the bits of `response` on miso, most significant of the
// nbits first: the first bit as chip select falls, the next ones after each
// falling edge. rx_word holds the bits received (right aligned), n_edges
// the rising edges counted during the last selection, n_frames the number
// of completed selections. Sampled on the system clock.
module spi_slave_model (
  input  logic        clock,
  input  logic        cs_n,
  input  logic        sclk,
  input  logic        mosi,
  output logic        miso,
  input  logic [31:0] response,
  input  int          nbits,
  output logic [31:0] rx_word,
  output int          n_edges,
  output int          n_frames
);
  logic cs_q = 1'b1, sclk_q = 1'b0;
  logic [31:0] sh_out = '0;
  int   sent = 0;

  initial begin
    miso = 1'b0;
    rx_word = '0;
    n_edges = 0;
    n_frames = 0;
  end

  always @(posedge clock) begin
    if (cs_q && !cs_n) begin
      sh_out  = response << (32 - nbits);
      miso    <= sh_out[31];
      rx_word <= '0;
      n_edges = 0;
      sent = 1;
    end else if (!cs_n) begin
      if (sclk && !sclk_q) begin
        rx_word <= {rx_word[30:0], mosi};
        n_edges++;
      end
      if (!sclk && sclk_q) begin
        sh_out = sh_out << 1;
        miso <= sh_out[31];
      end
    end else if (!cs_q && cs_n) begin
      n_frames++;
    end
    cs_q   <= cs_n;
    sclk_q <= sclk;
  end
endmodule
