// tb_spi_master: self-checking testbench of the SPI master.
//
// Ten model SPI slaves (mode 0) sit on the ten chip selects. Random
// transfers of random length (16, 24, 32 bits and others) to random devices
// check that:
//   - only the addressed chip select goes low, exactly once per transfer;
//   - the slave receives the nbits low bits of tx_data, MSB first, with
//     exactly nbits rising sclk edges;
//   - rx_data holds the slave's response;
//   - busy lasts nbits*2*CLK_DIV + 2*CLK_DIV clocks and done pulses once.
module tb_spi_master;
  localparam int NCS = 10;
  localparam int DIV = 4;
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

  logic        start = 1'b0;
  logic [3:0]  cs_sel = '0;
  logic [5:0]  nbits = '0;
  logic [31:0] tx_data = '0;
  logic [31:0] rx_data;
  logic        busy, done, sclk, mosi;
  logic [NCS-1:0] cs_n;
  logic        miso;
  logic [NCS-1:0] miso_s;
  logic [31:0] response [NCS];
  logic [31:0] rx_word [NCS];
  int          n_edges [NCS], n_frames [NCS];
  int          nb = 32;

  spi_master #(.NUM_CS(NCS), .CLK_DIV(DIV)) dut (
    .clock, .reset, .start, .cs_sel, .nbits, .tx_data, .rx_data, .busy, .done,
    .sclk, .mosi, .miso, .cs_n);

  for (genvar s = 0; s < NCS; s++) begin : g_slave
    spi_slave_model u_slave (
      .clock, .cs_n(cs_n[s]), .sclk, .mosi, .miso(miso_s[s]), .response(response[s]),
      .nbits(nb), .rx_word(rx_word[s]), .n_edges(n_edges[s]), .n_frames(n_frames[s]));
  end

  always_comb begin
    miso = 1'b0;
    for (int s = 0; s < NCS; s++) if (!cs_n[s]) miso = miso_s[s];
  end

  int busy_clocks = 0, n_done = 0;
  always @(posedge clock) begin
    if (busy) busy_clocks++;
    if (done) n_done++;
  end

  initial begin
    for (int s = 0; s < NCS; s++) response[s] = '0;
    repeat (3) @(posedge clock);
    reset <= 1'b0;
    repeat (2) @(posedge clock);
    for (int rep = 0; rep < 40; rep++) begin
      int s, frames_before [NCS];
      logic [31:0] mask, w;
      s  = int'($urandom_range(NCS - 1));
      case (rep % 4)
        0: nb = 16;
        1: nb = 24;
        2: nb = 32;
        default: nb = int'($urandom_range(31, 1));
      endcase
      mask = (nb == 32) ? 32'hFFFF_FFFF : ((32'd1 << nb) - 1);
      for (int n = 0; n < NCS; n++) begin
        response[n] = $urandom;
        frames_before[n] = n_frames[n];
      end
      w = $urandom;
      busy_clocks = 0;
      n_done = 0;
      cs_sel  <= 4'(s);
      nbits   <= (nb == 32) ? 6'd0 : 6'(nb);
      tx_data <= w;
      start   <= 1'b1;
      @(posedge clock);
      start <= 1'b0;
      @(posedge clock);
      while (busy) @(posedge clock);
      repeat (3) @(posedge clock);
      check(n_done == 1, "done pulses once");
      check(busy_clocks == nb * 2 * DIV + 2 * DIV,
            $sformatf("busy %0d clocks for %0d bits", busy_clocks, nb));
      check(rx_word[s] == (w & mask), $sformatf("slave received %h expected %h", rx_word[s], w & mask));
      check(n_edges[s] == nb, $sformatf("%0d sclk edges for %0d bits", n_edges[s], nb));
      check(rx_data == (response[s] & mask),
            $sformatf("master received %h expected %h", rx_data, response[s] & mask));
      for (int n = 0; n < NCS; n++)
        check(n_frames[n] - frames_before[n] == ((n == s) ? 1 : 0),
              $sformatf("chip select %0d in transfer to %0d", n, s));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #2ms;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
