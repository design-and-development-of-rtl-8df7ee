// xcvr_regs: transceiver registers, the IPbus slave that reports the state
// of the JESD204B lanes and lets software restart them.
//
// Word address map (NLANES <= 8):
//   0  R  [7:0] RX lane code group synchronization done, [15:8] RX lane
//         ILAS passed and aligned, [23:16] RX alignment buffer overflow
//         (sticky: set by any overflow, cleared by writing register 3)
//   1  R  [7:0] TX lane sending user data, [11:8] SYNC~ level of each DAC
//         link, [19:16] SYNC~ level sent to each ADC link
//   2  W  [7:0] RX lane reset, [15:8] TX lane reset (held while set)
//      R  the last value written
//   3  W  any write clears the sticky overflow bits
// Other addresses answer with err.
//
// Read-data bits 31:24 are unused by every register and always read 0.
// Timing: ack one clock after strobe (see ctrl_regs for the strobe rule);
// status bits are sampled through one register stage.
// The existence of a transceiver register slave follows the controller's
// description; its contents are this design's choice.
module xcvr_regs
  import llrf_pkg::*;
#(
  parameter int NLANES = 8,
  parameter int NLINKS = 4
) (
  input  logic              clock,
  input  logic              reset,
  input  ipb_wbus_t         ipb_in,
  output ipb_rbus_t         ipb_out,
  input  logic [NLANES-1:0] rx_sync,
  input  logic [NLANES-1:0] rx_check,
  input  logic [NLANES-1:0] rx_ovf,
  input  logic [NLANES-1:0] tx_data_phase,
  input  logic [NLINKS-1:0] dac_sync_n,
  input  logic [NLINKS-1:0] adc_sync_n,
  output logic [NLANES-1:0] rx_rst,
  output logic [NLANES-1:0] tx_rst
);

  logic [NLANES-1:0] rx_sync_q, rx_check_q, ovf_sticky, tx_dp_q;
  logic [NLINKS-1:0] dac_sync_q, adc_sync_q;

  logic [7:0] a;
  logic       in_range;
  always_comb begin
    a        = ipb_in.addr[7:0];
    in_range = (a < 8'd4);
  end

  logic [31:0] rdata;
  always_comb begin
    rdata = '0;
    unique case (a)
      8'd0: begin
        rdata[0 +: NLANES]  = rx_sync_q;
        rdata[8 +: NLANES]  = rx_check_q;
        rdata[16 +: NLANES] = ovf_sticky;
      end
      8'd1: begin
        rdata[0 +: NLANES]  = tx_dp_q;
        rdata[8 +: NLINKS]  = dac_sync_q;
        rdata[16 +: NLINKS] = adc_sync_q;
      end
      8'd2: begin
        rdata[0 +: NLANES] = rx_rst;
        rdata[8 +: NLANES] = tx_rst;
      end
      default: ;
    endcase
  end

  always_ff @(posedge clock) begin
    if (reset) begin
      rx_sync_q  <= '0;
      rx_check_q <= '0;
      ovf_sticky <= '0;
      tx_dp_q    <= '0;
      dac_sync_q <= '0;
      adc_sync_q <= '0;
      rx_rst     <= '0;
      tx_rst     <= '0;
      ipb_out    <= IPB_RBUS_NULL;
    end else begin
      rx_sync_q  <= rx_sync;
      rx_check_q <= rx_check;
      tx_dp_q    <= tx_data_phase;
      dac_sync_q <= dac_sync_n;
      adc_sync_q <= adc_sync_n;
      ovf_sticky <= ovf_sticky | rx_ovf;
      ipb_out    <= IPB_RBUS_NULL;
      if (ipb_in.strobe && !ipb_out.ack && !ipb_out.err) begin
        ipb_out.ack   <= in_range;
        ipb_out.err   <= !in_range;
        ipb_out.rdata <= in_range ? rdata : '0;
        if (ipb_in.write) begin
          if (a == 8'd2) begin
            rx_rst <= ipb_in.wdata[0 +: NLANES];
            tx_rst <= ipb_in.wdata[8 +: NLANES];
          end
          if (a == 8'd3) ovf_sticky <= rx_ovf;
        end
      end
    end
  end

  initial begin
    assert (NLANES <= 8 && NLINKS <= 8) else $error("xcvr_regs: at most 8 lanes and 8 links");
  end

endmodule
