// ctrl_regs: control-loop register block of one cavity, an IPbus slave.
//
// Word address map (32-bit registers; W = writable, R = read-only):
//   0  W  [5:0] decimation factor D, [10:6] averaging exponent,
//         [11] counter-clockwise sample order, [12] phase loop enable,
//         [13] field loop enable, [16] SEL (1) / GDR (0), [17] power enable,
//         [18] CIC (averaging) enable
//      R  the same plus [14] phase locked, [15] field locked
//   1  W  [15:0] phase shift             2  W  [15:0] quiescent power
//   3  W  [15:0] phase set point         4  W  [15:0] field set point
//   5  W  [15:0] phase proportional gain 6  W  [15:0] phase integral gain
//   7  W  [15:0] field proportional gain 8  W  [15:0] field integral gain
//   9  W  [15:0] phase lock threshold    10 W  [15:0] field lock threshold
//   11 W  [15:0] phase lock window       12 W  [15:0] field lock window
//   13 R  reserved, reads 0
//   14 R  [15:0] phase error, [31:16] field error
//   15 R  [23:0] frequency error (sign extended to 32 bits)
//   16 R  [15:0] phase correction        17 R  [15:0] field correction
// Writable registers read back their value. Writes to read-only registers
// are acknowledged and ignored; addresses above 17 within the block answer
// with err. Only the low 8 address bits are decoded (the bus fabric selects
// the block).
//
// Reset: D = DEFAULT_DEC, every other field 0 (loops open, power off).
// Timing: ack/err one clock after strobe; a write takes effect on that
// clock. The master holds strobe until it sees ack or err and then drops it;
// a strobe still high in the ack cycle is not taken as a new transaction.
// The fields, widths and offsets follow the controller's register table and
// its register layout file; where they disagree (field integral gain at 7 or
// 8; errors at 13 or 14, frequency error at 14 or 15) this block uses 8, 14
// and 15. Reset values and the error response are this design's choices.
module ctrl_regs
  import llrf_pkg::*;
#(
  parameter int DEFAULT_DEC = 8
) (
  input  logic        clock,
  input  logic        reset,
  input  ipb_wbus_t   ipb_in,
  output ipb_rbus_t   ipb_out,
  output cav_cfg_t    cfg,
  input  cav_status_t status
);

  localparam int NREGS = 18;

  logic [4:0] a;
  always_comb a = ipb_in.addr[4:0];

  logic        in_range;
  always_comb in_range = (ipb_in.addr[7:0] < 8'(NREGS));

  // Register 0 as read.
  logic [31:0] reg0;
  always_comb begin
    reg0        = '0;
    reg0[5:0]   = cfg.dec_fact;
    reg0[10:6]  = cfg.avg_exp;
    reg0[11]    = cfg.ccw;
    reg0[12]    = cfg.phase_loop_en;
    reg0[13]    = cfg.field_loop_en;
    reg0[14]    = status.phase_locked;
    reg0[15]    = status.field_locked;
    reg0[16]    = cfg.mode;
    reg0[17]    = cfg.power_en;
    reg0[18]    = cfg.cic_en;
  end

  logic [31:0] rdata;
  always_comb begin
    unique case (a)
      5'd0:  rdata = reg0;
      5'd1:  rdata = {16'd0, cfg.phase_shift};
      5'd2:  rdata = {16'd0, cfg.quiescent};
      5'd3:  rdata = {16'd0, cfg.phase_sp};
      5'd4:  rdata = {16'd0, cfg.field_sp};
      5'd5:  rdata = {16'd0, cfg.phase_kp};
      5'd6:  rdata = {16'd0, cfg.phase_ki};
      5'd7:  rdata = {16'd0, cfg.field_kp};
      5'd8:  rdata = {16'd0, cfg.field_ki};
      5'd9:  rdata = {16'd0, cfg.phase_lck_thrs};
      5'd10: rdata = {16'd0, cfg.field_lck_thrs};
      5'd11: rdata = {16'd0, cfg.phase_lck_wind};
      5'd12: rdata = {16'd0, cfg.field_lck_wind};
      5'd14: rdata = {status.field_err, status.phase_err};
      5'd15: rdata = 32'($signed(status.freq_err));
      5'd16: rdata = {{16{status.phase_corr[15]}}, status.phase_corr};
      5'd17: rdata = {{16{status.field_corr[15]}}, status.field_corr};
      default: rdata = '0;
    endcase
  end

  always_ff @(posedge clock) begin
    if (reset) begin
      cfg          <= '0;
      cfg.dec_fact <= 6'(DEFAULT_DEC);
      ipb_out      <= IPB_RBUS_NULL;
    end else begin
      ipb_out <= IPB_RBUS_NULL;
      if (ipb_in.strobe && !ipb_out.ack && !ipb_out.err) begin
        ipb_out.ack   <= in_range;
        ipb_out.err   <= !in_range;
        ipb_out.rdata <= in_range ? rdata : '0;
        if (ipb_in.write && in_range) begin
          unique case (a)
            5'd0: begin
              cfg.dec_fact      <= ipb_in.wdata[5:0];
              cfg.avg_exp       <= ipb_in.wdata[10:6];
              cfg.ccw           <= ipb_in.wdata[11];
              cfg.phase_loop_en <= ipb_in.wdata[12];
              cfg.field_loop_en <= ipb_in.wdata[13];
              cfg.mode          <= cav_mode_e'(ipb_in.wdata[16]);
              cfg.power_en      <= ipb_in.wdata[17];
              cfg.cic_en        <= ipb_in.wdata[18];
            end
            5'd1:  cfg.phase_shift    <= ipb_in.wdata[15:0];
            5'd2:  cfg.quiescent      <= ipb_in.wdata[15:0];
            5'd3:  cfg.phase_sp       <= ipb_in.wdata[15:0];
            5'd4:  cfg.field_sp       <= ipb_in.wdata[15:0];
            5'd5:  cfg.phase_kp       <= ipb_in.wdata[15:0];
            5'd6:  cfg.phase_ki       <= ipb_in.wdata[15:0];
            5'd7:  cfg.field_kp       <= ipb_in.wdata[15:0];
            5'd8:  cfg.field_ki       <= ipb_in.wdata[15:0];
            5'd9:  cfg.phase_lck_thrs <= ipb_in.wdata[15:0];
            5'd10: cfg.field_lck_thrs <= ipb_in.wdata[15:0];
            5'd11: cfg.phase_lck_wind <= ipb_in.wdata[15:0];
            5'd12: cfg.field_lck_wind <= ipb_in.wdata[15:0];
            default: ;
          endcase
        end
      end
    end
  end

endmodule
