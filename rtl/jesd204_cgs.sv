// jesd204_cgs: code group synchronization of one JESD204B receive lane.
//
// While the link is down the transmitter sends the comma K28.5 (/K/)
// continuously. This block watches the 2-octet words coming out of the
// transceiver (already 8b/10b decoded and comma aligned) and counts words
// whose two octets are both valid /K/ characters. After CGS_COUNT such words
// in a row it raises sync, which deasserts the link's SYNC~ request; the
// transmitter then starts its initial lane alignment sequence. A word with a
// byte marked invalid by the decoder breaks the count; after 4 invalid words
// in a row while synchronized, sync falls again and code group
// synchronization restarts.
//
// Interface: din/iscomma_in/valid_in from the transceiver, bit 0 / bits 7:0
// being the earlier octet. isk is iscomma_in registered and masked with
// valid_in. Timing: sync rises on the clock edge that registers the
// CGS_COUNT-th comma word.
// The comma counting and the SYNC~ release follow the lane receiver's
// description and port names; the count of 4 and the loss rule are this
// design's choices.
module jesd204_cgs
  import llrf_pkg::*;
#(
  parameter int CGS_COUNT = 4
) (
  input  logic        clock,
  input  logic        reset,
  input  logic [15:0] din,
  input  logic [1:0]  iscomma_in,
  input  logic [1:0]  valid_in,
  output logic [1:0]  isk,
  output logic        sync
);

  logic [3:0] k_cnt;
  logic [2:0] bad_cnt;

  logic comma_word, bad_word;
  always_comb begin
    comma_word = (valid_in == 2'b11) && (iscomma_in == 2'b11) &&
                 (din[7:0] == K_COMMA) && (din[15:8] == K_COMMA);
    bad_word   = (valid_in != 2'b11);
  end

  always_ff @(posedge clock) begin
    if (reset) begin
      k_cnt   <= '0;
      bad_cnt <= '0;
      sync    <= 1'b0;
      isk     <= '0;
    end else begin
      isk <= iscomma_in & valid_in;
      if (!sync) begin
        if (comma_word) begin
          k_cnt <= k_cnt + 4'd1;
          if (32'(k_cnt) + 1 >= CGS_COUNT) sync <= 1'b1;
        end else begin
          k_cnt <= '0;
        end
        bad_cnt <= '0;
      end else begin
        k_cnt <= '0;
        if (bad_word) begin
          bad_cnt <= bad_cnt + 3'd1;
          if (bad_cnt == 3'd3) sync <= 1'b0;
        end else begin
          bad_cnt <= '0;
        end
      end
    end
  end

  initial begin
    assert (CGS_COUNT >= 1 && CGS_COUNT <= 15) else $error("jesd204_cgs: CGS_COUNT out of range");
  end

endmodule
