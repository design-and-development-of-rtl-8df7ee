// tb_xcvr_regs: self-checking testbench of the transceiver register slave.
//
// Random lane status inputs must read back from registers 0 and 1 (one
// clock of sampling delay); an overflow pulse must set its sticky bit, which
// stays after the pulse and is cleared by a write to register 3; values
// written to register 2 must appear on the RX and TX lane reset outputs
// and read back; unmapped addresses answer err.
module tb_xcvr_regs
  import llrf_pkg::*;
;
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

  ipb_wbus_t  ipb_in = '0;
  ipb_rbus_t  ipb_out;
  logic [7:0] rx_sync = '0, rx_check = '0, rx_ovf = '0, tx_data_phase = '0;
  logic [3:0] dac_sync_n = '0, adc_sync_n = '0;
  logic [7:0] rx_rst, tx_rst;

  xcvr_regs #(.NLANES(8), .NLINKS(4)) dut (
    .clock, .reset, .ipb_in, .ipb_out, .rx_sync, .rx_check, .rx_ovf, .tx_data_phase,
    .dac_sync_n, .adc_sync_n, .rx_rst, .tx_rst);

`include "ipb_master_tasks.svh"

  initial begin
    logic [31:0] d, w;
    bit e;
    repeat (3) @(posedge clock);
    reset <= 1'b0;
    for (int rep = 0; rep < 30; rep++) begin
      logic [7:0] ovf;
      rx_sync       <= 8'($urandom);
      rx_check      <= 8'($urandom);
      tx_data_phase <= 8'($urandom);
      dac_sync_n    <= 4'($urandom);
      adc_sync_n    <= 4'($urandom);
      ovf = 8'($urandom);
      rx_ovf <= ovf;
      @(posedge clock);
      rx_ovf <= '0;
      repeat (2) @(posedge clock);
      ipb_read(32'd0, d, e);
      check(!e && d[7:0] == rx_sync && d[15:8] == rx_check, "lane sync and check bits");
      check(d[23:16] == ovf, $sformatf("sticky overflow %h expected %h", d[23:16], ovf));
      ipb_read(32'd1, d, e);
      check(d[7:0] == tx_data_phase && d[11:8] == dac_sync_n && d[19:16] == adc_sync_n,
            "TX data phase and SYNC~ levels");
      ipb_write(32'd3, 32'd0, e);
      ipb_read(32'd0, d, e);
      check(d[23:16] == 8'd0, "overflow cleared by register 3");
      w = $urandom;
      ipb_write(32'd2, w, e);
      check(rx_rst == w[7:0] && tx_rst == w[15:8], "lane resets");
      ipb_read(32'd2, d, e);
      check(d[15:0] == w[15:0], "reset register read-back");
      ipb_read(32'd4 + 32'($urandom_range(200)), d, e);
      check(e, "unmapped address answers err");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #1ms;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
