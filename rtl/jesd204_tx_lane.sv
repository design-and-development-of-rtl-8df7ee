// jesd204_tx_lane: one JESD204B transmit lane (transport and data link
// layer), the counterpart of jesd204_rx_lane, feeding a transceiver that
// does the 8b/10b encoding.
//
// While the receiver holds SYNC~ asserted (sync = 0) the lane sends the comma
// /K/ (K28.5) in both octets. When sync rises it waits for the next local
// multiframe clock (LMFC) boundary and sends the four-multiframe initial
// lane alignment sequence: every multiframe starts with /R/ and ends with
// /A/, the octets between carry a count; the second multiframe has /Q/ as
// its second octet followed by the 14 link configuration octets. Then it
// sends user data, one 16-bit sample per frame (F = 2), most significant
// octet first. Scrambling is off, so when the last octet of a frame equals
// the last octet of the previous frame it is replaced by /A/ at the end of a
// multiframe and by /F/ elsewhere; the receiver restores it.
// A drop of sync at any time returns the lane to /K/.
//
// The LMFC is a free-running count of K_FRAMES frames (JESD204B subclass 0:
// no SYSREF, no deterministic latency). The configuration octets describe
// this link: DID 0, BID 0, LID LANE_ID, no scrambling, L = 2, F = 2,
// K = K_FRAMES, M = 2, N = N' = 16, S = 1, subclass 0, JESD204B; octet 13 is
// the sum of octets 0-12 modulo 256.
//
// Interface: dout/charisk to the transceiver, bits 7:0 / bit 0 being the
// earlier octet. Timing: outputs registered; sample is framed on the clock
// after it is presented. data_phase is high while user data is sent.
// That the transmit lane mirrors the receive lane follows the controller's
// description; the ILAS contents and the K value are this design's choices
// taken from the JESD204B standard's general form.
module jesd204_tx_lane
  import llrf_pkg::*;
#(
  parameter int K_FRAMES = 32,
  parameter int LANE_ID  = 0,
  parameter int ILAS_MF  = 4
) (
  input  logic        clock,
  input  logic        reset,
  input  logic        sync,
  input  logic [15:0] sample,
  output logic [15:0] dout,
  output logic [1:0]  charisk,
  output logic        data_phase
);

  typedef enum logic [1:0] {S_CGS, S_WAIT_LMFC, S_ILAS, S_DATA} state_e;

  localparam int FW = $clog2(K_FRAMES);

  // Link configuration octets 0..13.
  typedef logic [7:0] octets_t [14];
  function automatic octets_t link_cfg();
    octets_t c;
    logic [7:0] sum;
    c[0]  = 8'd0;                               // DID
    c[1]  = 8'd0;                               // ADJCNT | BID
    c[2]  = 8'(LANE_ID & 31);                   // LID
    c[3]  = 8'd1;                               // SCR = 0 | L-1
    c[4]  = 8'd1;                               // F-1
    c[5]  = 8'((K_FRAMES - 1) & 31);            // K-1
    c[6]  = 8'd1;                               // M-1
    c[7]  = 8'd15;                              // CS = 0 | N-1
    c[8]  = 8'd15;                              // SUBCLASSV = 0 | N'-1
    c[9]  = 8'b001_00000;                       // JESDV = JESD204B | S-1
    c[10] = 8'd0;                               // HD | CF
    c[11] = 8'd0;                               // RES1
    c[12] = 8'd0;                               // RES2
    sum = '0;
    for (int n = 0; n < 13; n++) sum = sum + c[n];
    c[13] = sum;                                // FCHK
    return c;
  endfunction

  localparam octets_t CFG = link_cfg();

  state_e        state;
  logic [FW-1:0] lmfc;
  logic [2:0]    mcnt;
  logic [7:0]    prev_last;

  // ILAS octet for frame f of multiframe m, byte b, and its K flag.
  function automatic logic [8:0] ilas_octet(input logic [FW-1:0] f, input logic [2:0] m, input logic b);
    int idx;
    idx = 2 * int'(f) + int'(b);
    if (f == '0 && !b)                      return {1'b1, K_R};
    if (f == '0 && b && m == 3'd1)          return {1'b1, K_Q};
    if (f == FW'(K_FRAMES - 1) && b)        return {1'b1, K_A};
    if (m == 3'd1 && idx >= 2 && idx < 16)  return {1'b0, CFG[idx - 2]};
    return {1'b0, 8'(idx)};
  endfunction

  always_ff @(posedge clock) begin
    if (reset) begin
      state      <= S_CGS;
      lmfc       <= '0;
      mcnt       <= '0;
      prev_last  <= '0;
      dout       <= {K_COMMA, K_COMMA};
      charisk    <= 2'b11;
      data_phase <= 1'b0;
    end else begin
      lmfc <= (lmfc == FW'(K_FRAMES - 1)) ? '0 : lmfc + 1'b1;
      data_phase <= 1'b0;
      if (!sync) begin
        state   <= S_CGS;
        dout    <= {K_COMMA, K_COMMA};
        charisk <= 2'b11;
      end else begin
        unique case (state)
          S_CGS, S_WAIT_LMFC: begin
            dout    <= {K_COMMA, K_COMMA};
            charisk <= 2'b11;
            state   <= S_WAIT_LMFC;
            if (lmfc == FW'(K_FRAMES - 1)) begin
              state <= S_ILAS;
              mcnt  <= '0;
            end
          end
          S_ILAS: begin
            logic [8:0] o0, o1;
            o0 = ilas_octet(lmfc, mcnt, 1'b0);
            o1 = ilas_octet(lmfc, mcnt, 1'b1);
            dout    <= {o1[7:0], o0[7:0]};
            charisk <= {o1[8], o0[8]};
            if (lmfc == FW'(K_FRAMES - 1)) begin
              if (mcnt == 3'(ILAS_MF - 1)) begin
                state     <= S_DATA;
                prev_last <= K_A;
              end
              mcnt <= mcnt + 3'd1;
            end
          end
          S_DATA: begin
            data_phase <= 1'b1;
            prev_last  <= sample[7:0];
            if (sample[7:0] == prev_last) begin
              dout    <= {(lmfc == FW'(K_FRAMES - 1)) ? K_A : K_F, sample[15:8]};
              charisk <= 2'b10;
            end else begin
              dout    <= {sample[7:0], sample[15:8]};
              charisk <= 2'b00;
            end
          end
          default: state <= S_CGS;
        endcase
      end
    end
  end

endmodule
