// jesd204_ifs_ils: initial lane alignment sequence (ILAS) check and
// de-framing of one JESD204B receive lane.
//
// After the link's SYNC~ is released (sync = 1) the transmitter sends, from
// its next multiframe boundary, four multiframes of ILAS: each starts with
// /R/ (K28.0) and ends with /A/ (K28.3); the second carries /Q/ (K28.4) as its
// second octet, followed by the link configuration. The block waits for the
// /R/ at the first octet of a word, checks the four multiframes' /R/, /Q/
// and /A/ positions (not the configuration octets), and then switches to user
// data, marking every frame start (bof) and multiframe start (bomf). A failed
// check restarts the search for /R/.
//
// Frames are F = 2 octets, one per 16-bit word, and a multiframe is
// K_FRAMES frames. Scrambling is not used, so in user data the transmitter
// replaces the last octet of a frame by /F/ (K28.7), or by /A/ at the end of
// a multiframe, whenever it equals the last octet of the previous frame. The
// block puts that octet back. An /A/ anywhere but at a multiframe end means
// the lane lost alignment and clears sync_check.
//
// sync_check is high from a passed ILAS until SYNC~ is requested again or
// alignment is lost. Timing: all outputs registered, one clock after the
// word; valid_out is high only for user data.
// The three tasks (ILAS, frame/multiframe boundaries, de-framing) and the
// ports follow the lane receiver's description; K, the check depth and the
// octet order are this design's choices.
module jesd204_ifs_ils
  import llrf_pkg::*;
#(
  parameter int K_FRAMES = 32,
  parameter int ILAS_MF  = 4
) (
  input  logic        clock,
  input  logic        reset,
  input  logic [1:0]  comma_in,
  input  logic [15:0] din,
  input  logic [1:0]  valid_in,
  input  logic        sync,
  output logic [1:0]  comma_out,
  output logic [15:0] dout,
  output logic [1:0]  valid_out,
  output logic        bof,
  output logic        bomf,
  output logic        sync_check
);

  typedef enum logic [1:0] {S_WAIT_SYNC, S_WAIT_R, S_ILAS, S_DATA} state_e;

  localparam int FW = $clog2(K_FRAMES);

  state_e        state;
  logic [FW-1:0] fcnt;
  logic [2:0]    mcnt;
  logic [7:0]    prev_last;

  logic is_r0, is_q1, is_a1, is_f1;
  always_comb begin
    is_r0 = comma_in[0] && valid_in[0] && din[7:0]  == K_R;
    is_q1 = comma_in[1] && valid_in[1] && din[15:8] == K_Q;
    is_a1 = comma_in[1] && valid_in[1] && din[15:8] == K_A;
    is_f1 = comma_in[1] && valid_in[1] && din[15:8] == K_F;
  end

  // ILAS word check for frame f of multiframe m.
  function automatic logic ilas_ok(input logic [FW-1:0] f, input logic [2:0] m,
                                   input logic r0, input logic q1, input logic a1);
    logic ok;
    ok = 1'b1;
    if (f == '0 && !r0) ok = 1'b0;
    if (f == '0 && m == 3'd1 && !q1) ok = 1'b0;
    if (f == FW'(K_FRAMES - 1) && !a1) ok = 1'b0;
    return ok;
  endfunction

  always_ff @(posedge clock) begin
    if (reset) begin
      state      <= S_WAIT_SYNC;
      fcnt       <= '0;
      mcnt       <= '0;
      prev_last  <= '0;
      comma_out  <= '0;
      dout       <= '0;
      valid_out  <= '0;
      bof        <= 1'b0;
      bomf       <= 1'b0;
      sync_check <= 1'b0;
    end else begin
      valid_out <= '0;
      bof       <= 1'b0;
      bomf      <= 1'b0;
      comma_out <= comma_in;
      dout      <= din;
      if (!sync) begin
        state      <= S_WAIT_SYNC;
        sync_check <= 1'b0;
      end else begin
        unique case (state)
          S_WAIT_SYNC, S_WAIT_R: begin
            state <= S_WAIT_R;
            if (is_r0) begin
              if (ilas_ok('0, 3'd0, is_r0, is_q1, is_a1)) begin
                state <= S_ILAS;
                fcnt  <= FW'(1);
                mcnt  <= 3'd0;
              end
            end
          end
          S_ILAS: begin
            if (!ilas_ok(fcnt, mcnt, is_r0, is_q1, is_a1)) begin
              state <= S_WAIT_R;
            end else if (fcnt == FW'(K_FRAMES - 1)) begin
              fcnt <= '0;
              if (mcnt == 3'(ILAS_MF - 1)) begin
                state      <= S_DATA;
                sync_check <= 1'b1;
                prev_last  <= din[15:8];
              end else begin
                mcnt <= mcnt + 3'd1;
              end
            end else begin
              fcnt <= fcnt + 1'b1;
            end
          end
          S_DATA: begin
            logic [7:0] last;
            last = (is_f1 || is_a1) ? prev_last : din[15:8];
            fcnt      <= (fcnt == FW'(K_FRAMES - 1)) ? '0 : fcnt + 1'b1;
            valid_out <= valid_in;
            bof       <= 1'b1;
            bomf      <= (fcnt == '0);
            dout      <= {last, din[7:0]};
            comma_out <= {comma_in[1] & ~(is_f1 | is_a1), comma_in[0]};
            prev_last <= last;
            if (is_a1 && fcnt != FW'(K_FRAMES - 1)) sync_check <= 1'b0;
          end
          default: state <= S_WAIT_SYNC;
        endcase
      end
    end
  end

  initial begin
    assert (K_FRAMES >= 2) else $error("jesd204_ifs_ils: K_FRAMES must be at least 2");
  end

endmodule
