// jesd204_rx_lane: one JESD204B receive lane (transport and part of the
// data link layer) behind a transceiver that already does the 8b/10b
// decoding and comma alignment.
//
// Three stages, wired as in the lane receiver's block diagram:
//   jesd204_cgs      counts /K/ commas and reports the lane synchronized
//                    (sync_out); the link ANDs its lanes' sync_out into the
//                    SYNC~ it sends back to the converter and into sync_in;
//   jesd204_ifs_ils  checks the ILAS once sync_in is high, then de-frames the
//                    user data (bof, bomf, valid_out, /F/ and /A/ replaced);
//   jesd204_ls       buffers the de-framed words from the first multiframe so
//                    that all lanes of the link can be read out together with
//                    a common dread once every lane shows dready.
// dout is the aligned word: with F = 2 one frame, i.e. one 16-bit sample
// with its most significant octet in bits 7:0. bof, bomf and valid_out
// describe the word entering the buffer, not dout.
//
// Timing: sync_out follows the comma count; ILAS/de-framing adds one clock;
// dout follows dread by one clock.
module jesd204_rx_lane #(
  parameter int K_FRAMES  = 32,
  parameter int DEPTH     = 16,
  parameter int CGS_COUNT = 4
) (
  input  logic        clock,
  input  logic        reset,
  input  logic [15:0] din,
  input  logic [1:0]  iscomma_in,
  input  logic [1:0]  valid_in,
  input  logic        sync_in,
  input  logic        dread,
  output logic        sync_out,
  output logic [1:0]  valid_out,
  output logic        bof,
  output logic        bomf,
  output logic [15:0] dout,
  output logic        dovf,
  output logic        dready,
  output logic        sync_check
);

  logic [1:0]  isk;
  logic [1:0]  comma_out;
  logic [15:0] ils_dout;

  jesd204_cgs #(.CGS_COUNT(CGS_COUNT)) cgs (
    .clock, .reset,
    .din, .iscomma_in, .valid_in,
    .isk,
    .sync (sync_out)
  );

  jesd204_ifs_ils #(.K_FRAMES(K_FRAMES)) ifs_ils (
    .clock, .reset,
    .comma_in  (iscomma_in),
    .din,
    .valid_in,
    .sync      (sync_in),
    .comma_out,
    .dout      (ils_dout),
    .valid_out,
    .bof,
    .bomf,
    .sync_check
  );

  jesd204_ls #(.DEPTH(DEPTH)) lsync (
    .clock, .reset,
    .din   (ils_dout),
    .bomf,
    .sync  (sync_in),
    .dread,
    .dout,
    .dovf,
    .dready
  );

endmodule
