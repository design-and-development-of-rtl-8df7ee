// cordic: pipelined CORDIC for the cartesian <-> polar conversions of the
// cavity control loop.
//
// VECTORING = 1 turns (xi, yi) into xo = K*sqrt(xi^2 + yi^2) and
// ao = ai + atan2(yi, xi); yo is the residue (close to zero).
// VECTORING = 0 rotates (xi, yi) by the angle ai: xo = K*(xi cos ai - yi sin ai),
// yo = K*(yi cos ai + xi sin ai); ao is the residual angle (close to zero).
// K is the CORDIC gain, about 1.6468, and is not removed, as in the
// controller's equations. Iteration i rotates by +/-atan(2^-i) using shifts:
// vectoring chooses the sign that drives y to zero, rotation the sign that
// drives the angle to zero.
//
// Angles are W-bit binary fractions of a turn (2^W = 2*pi) and wrap. A first
// stage rotates by 180 degrees when xi < 0 (vectoring) or when |ai| > 90
// degrees (rotation), so every input converges; the controller's
// demodulator in any case hands the vectoring CORDIC positive values only.
// Inputs must keep |xi|, |yi| below 2^(W-2) so that K*magnitude fits W bits.
//
// Timing: fully pipelined, one input per clock (div), results ITER+1 clocks
// later with dov. rdy is high whenever the block is out of reset.
// The port names are those of the controller's CORDIC entity; the pipeline
// organisation, iteration count and the 180-degree pre-stage are this
// design's choices.
module cordic
  import llrf_pkg::*;
#(
  parameter int W         = 19,
  parameter int ITER      = 16,
  parameter bit VECTORING = 1'b1
) (
  input  logic                clock,
  input  logic                reset,
  input  logic                div,
  input  logic signed [W-1:0] xi,
  input  logic signed [W-1:0] yi,
  input  logic signed [W-1:0] ai,
  output logic signed [W-1:0] xo,
  output logic signed [W-1:0] yo,
  output logic signed [W-1:0] ao,
  output logic                dov,
  output logic                rdy
);

  localparam int XW = W + 2;  // internal guard bits for the CORDIC gain

  typedef struct packed {
    logic signed [XW-1:0] x;
    logic signed [XW-1:0] y;
    logic signed [W-1:0]  a;
  } stage_t;

  stage_t       st [ITER+1];
  logic [ITER:0] vld;

  // Arctangent of 2^-i scaled from the 19-bit table to W bits.
  function automatic logic signed [W-1:0] atan_w(input int i);
    logic [W+18:0] t;
    t = (W + 19)'(ATAN_TABLE[i]) << W;
    return W'(t >> 19);
  endfunction

  // Pre-rotation by 180 degrees where needed.
  localparam logic signed [W-1:0] HALF_TURN = W'(1) <<< (W - 1);
  localparam logic signed [W-1:0] QUARTER   = W'(1) <<< (W - 2);

  always_ff @(posedge clock) begin
    if (reset) begin
      vld[0] <= 1'b0;
      st[0]  <= '0;
    end else begin
      vld[0] <= div;
      if (VECTORING ? (xi < 0) : (ai > QUARTER || ai < -QUARTER)) begin
        st[0].x <= -XW'(xi);
        st[0].y <= -XW'(yi);
        st[0].a <= VECTORING ? ai + HALF_TURN : ai - HALF_TURN;
      end else begin
        st[0].x <= XW'(xi);
        st[0].y <= XW'(yi);
        st[0].a <= ai;
      end
    end
  end

  for (genvar i = 0; i < ITER; i++) begin : g_stage
    logic up;  // rotate counter-clockwise this step
    always_comb up = VECTORING ? (st[i].y < 0) : (st[i].a >= 0);
    always_ff @(posedge clock) begin
      if (reset) begin
        vld[i+1] <= 1'b0;
        st[i+1]  <= '0;
      end else begin
        vld[i+1] <= vld[i];
        if (up) begin
          st[i+1].x <= st[i].x - (st[i].y >>> i);
          st[i+1].y <= st[i].y + (st[i].x >>> i);
          st[i+1].a <= st[i].a - atan_w(i);
        end else begin
          st[i+1].x <= st[i].x + (st[i].y >>> i);
          st[i+1].y <= st[i].y - (st[i].x >>> i);
          st[i+1].a <= st[i].a + atan_w(i);
        end
      end
    end
  end

  always_comb begin
    xo  = W'(sat_s(40'(st[ITER].x), W));
    yo  = W'(sat_s(40'(st[ITER].y), W));
    ao  = st[ITER].a;
    dov = vld[ITER];
  end

  always_ff @(posedge clock) rdy <= !reset;

  initial begin
    assert (ITER <= ATAN_N) else $error("cordic: ITER exceeds the arctangent table");
  end

endmodule
