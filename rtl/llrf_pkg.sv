// llrf_pkg: types and constants shared by the digital RF cavity controller.
//
// The controller runs at the converter sample rate f_s (121.9 MHz for the
// 80/160 MHz cavities). Widths follow the register table of the controller:
// 16-bit set points, gains, errors and corrections, 16-bit ADC and DAC
// samples, 19-bit CORDIC words and a 24-bit frequency error. Angles are
// binary fractions of a full turn (2^W = 2*pi), so they wrap around by plain
// two's complement overflow.
//
// The IPbus bus structs mirror the usual IPbus slave bus (address, write
// data, strobe, write / read data, ack, err); the register layouts are
// documented in ctrl_regs, config_regs and xcvr_regs.
package llrf_pkg;

  localparam int ADC_W    = 16;
  localparam int DAC_W    = 16;
  localparam int CORDIC_W = 19;
  localparam int LOOP_W   = 16;
  localparam int FREQ_W   = 24;

  // JESD204B control characters (8b/10b K codes).
  localparam logic [7:0] K_COMMA = 8'hBC;  // K28.5, code group synchronization
  localparam logic [7:0] K_R     = 8'h1C;  // K28.0, ILAS multiframe start
  localparam logic [7:0] K_A     = 8'h7C;  // K28.3, multiframe end / lane alignment
  localparam logic [7:0] K_Q     = 8'h9C;  // K28.4, ILAS configuration data follows
  localparam logic [7:0] K_F     = 8'hFC;  // K28.7, frame alignment

  // Arctangent table for the CORDIC: round(atan(2^-i) * 2^19 / (2*pi)),
  // i.e. atan(2^-i) in units of 2^-19 of a full turn.
  localparam int ATAN_N = 18;
  localparam logic [18:0] ATAN_TABLE [ATAN_N] = '{
    19'd65536, 19'd38688, 19'd20442, 19'd10377, 19'd5208, 19'd2607,
    19'd1304,  19'd652,   19'd326,   19'd163,   19'd81,   19'd41,
    19'd20,    19'd10,    19'd5,     19'd3,     19'd1,    19'd1
  };

  typedef enum logic {
    MODE_GDR = 1'b0,   // generator driven resonator
    MODE_SEL = 1'b1    // self excited loop
  } cav_mode_e;

  // Writable loop parameters of one cavity (control-loop registers).
  typedef struct packed {
    logic [5:0]        dec_fact;      // decimation factor D
    logic [4:0]        avg_exp;       // log2 of the averaging length
    logic              ccw;           // sample sequence I,-Q,-I,Q instead of I,Q,-I,-Q
    logic              phase_loop_en;
    logic              field_loop_en;
    cav_mode_e         mode;
    logic              power_en;
    logic              cic_en;
    logic [LOOP_W-1:0] phase_shift;   // SEL loop phase shift (angle)
    logic [LOOP_W-1:0] quiescent;     // open-loop drive amplitude
    logic [LOOP_W-1:0] phase_sp;      // angle
    logic [LOOP_W-1:0] field_sp;      // amplitude
    logic [LOOP_W-1:0] phase_kp;
    logic [LOOP_W-1:0] phase_ki;
    logic [LOOP_W-1:0] field_kp;
    logic [LOOP_W-1:0] field_ki;
    logic [LOOP_W-1:0] phase_lck_thrs;
    logic [LOOP_W-1:0] field_lck_thrs;
    logic [LOOP_W-1:0] phase_lck_wind;
    logic [LOOP_W-1:0] field_lck_wind;
  } cav_cfg_t;

  // Read-back values of one cavity.
  typedef struct packed {
    logic              phase_locked;
    logic              field_locked;
    logic [LOOP_W-1:0] phase_err;
    logic [LOOP_W-1:0] field_err;
    logic [FREQ_W-1:0] freq_err;
    logic [LOOP_W-1:0] phase_corr;
    logic [LOOP_W-1:0] field_corr;
  } cav_status_t;

  // IPbus slave bus.
  typedef struct packed {
    logic [31:0] addr;
    logic [31:0] wdata;
    logic        strobe;
    logic        write;
  } ipb_wbus_t;

  typedef struct packed {
    logic [31:0] rdata;
    logic        ack;
    logic        err;
  } ipb_rbus_t;

  localparam ipb_rbus_t IPB_RBUS_NULL = '{rdata: 32'd0, ack: 1'b0, err: 1'b0};

  // Saturate a signed value to a signed W-bit range.
  function automatic logic signed [31:0] sat_s(input logic signed [39:0] v, input int w);
    logic signed [39:0] hi, lo;
    hi = (40'sd1 <<< (w - 1)) - 40'sd1;
    lo = -(40'sd1 <<< (w - 1));
    if (v > hi) return 32'(hi);
    if (v < lo) return 32'(lo);
    return 32'(v);
  endfunction

endpackage
