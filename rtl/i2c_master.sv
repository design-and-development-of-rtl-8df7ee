// i2c_master: IIC master for the configuration of the front-end and power
// monitor boards (attenuators, gain amplifiers, switches, power readings).
//
// One transaction per start pulse, on a 7-bit device address dev_addr:
//   write (rd = 0): START, dev_addr+W, reg_addr, wdata, STOP
//   read  (rd = 1): START, dev_addr+W, reg_addr, repeated START,
//                   dev_addr+R, one byte read and answered with NACK, STOP
// The device's acknowledge is checked after each byte sent; a missing one
// sets nack and ends the transaction with STOP.
// Both lines are open drain: scl_oe / sda_oe = 1 pull the line low, 0 let it
// float high; sda_i is the line level. Every bit lasts four quarter periods
// of QUARTER clocks: data set while SCL is low, SCL high, SDA sampled at the
// middle of the high time, SCL low. Slaves may not stretch the clock.
//
// Timing: busy from the clock after start to the end of STOP; done pulses
// once at the end, with rdata (read) and nack valid.
// An FPGA-side IIC master serving the boards follows the controller's
// description; the single-register transaction format is this design's
// choice.
module i2c_master #(
  parameter int QUARTER = 8
) (
  input  logic       clock,
  input  logic       reset,
  input  logic       start,
  input  logic [6:0] dev_addr,
  input  logic       rd,
  input  logic [7:0] reg_addr,
  input  logic [7:0] wdata,
  output logic [7:0] rdata,
  output logic       busy,
  output logic       done,
  output logic       nack,
  output logic       scl_oe,
  output logic       sda_oe,
  input  logic       sda_i
);

  typedef enum logic [2:0] {S_IDLE, S_START, S_WBYTE, S_RESTART, S_RBYTE, S_STOP} state_e;

  localparam int QW = $clog2(QUARTER + 1);

  state_e      state;
  logic [QW-1:0] qcnt;
  logic [1:0]  q;         // quarter within the bit
  logic [3:0]  bitn;      // bit within the byte, 8 = acknowledge
  logic [1:0]  step;      // byte number within the transaction
  logic [7:0]  sh;
  logic        rd_r;
  logic [6:0]  addr_r;
  logic [7:0]  reg_r, wdata_r;

  logic tick;
  always_comb tick = (qcnt == QW'(QUARTER - 1));

  always_ff @(posedge clock) begin
    if (reset) begin
      state   <= S_IDLE;
      qcnt    <= '0;
      q       <= '0;
      bitn    <= '0;
      step    <= '0;
      sh      <= '0;
      rd_r    <= 1'b0;
      addr_r  <= '0;
      reg_r   <= '0;
      wdata_r <= '0;
      rdata   <= '0;
      busy    <= 1'b0;
      done    <= 1'b0;
      nack    <= 1'b0;
      scl_oe  <= 1'b0;
      sda_oe  <= 1'b0;
    end else begin
      done <= 1'b0;
      qcnt <= (state == S_IDLE || tick) ? '0 : qcnt + 1'b1;
      if (state != S_IDLE && tick) q <= q + 2'd1;
      unique case (state)
        S_IDLE: begin
          q <= '0;
          scl_oe <= 1'b0;
          sda_oe <= 1'b0;
          if (start) begin
            rd_r    <= rd;
            addr_r  <= dev_addr;
            reg_r   <= reg_addr;
            wdata_r <= wdata;
            nack    <= 1'b0;
            busy    <= 1'b1;
            step    <= '0;
            state   <= S_START;
          end
        end
        // SDA falls while SCL is high, then SCL falls.
        S_START: if (tick) begin
          unique case (q)
            2'd0: begin scl_oe <= 1'b0; sda_oe <= 1'b0; end
            2'd1: sda_oe <= 1'b1;
            2'd2: scl_oe <= 1'b1;
            default: begin
              sh    <= {addr_r, 1'b0};
              bitn  <= '0;
              state <= S_WBYTE;
            end
          endcase
        end
        S_WBYTE: if (tick) begin
          unique case (q)
            2'd0: sda_oe <= (bitn == 4'd8) ? 1'b0 : !sh[7];
            2'd1: scl_oe <= 1'b0;
            2'd2: begin
              if (bitn == 4'd8 && sda_i) nack <= 1'b1;
            end
            default: begin
              scl_oe <= 1'b1;
              if (bitn == 4'd8) begin
                bitn <= '0;
                step <= step + 2'd1;
                if (nack) begin
                  state <= S_STOP;
                end else if (step == 2'd0 || step == 2'd3) begin
                  // address sent: register address next, or read the byte
                  if (step == 2'd3) state <= S_RBYTE;
                  else              sh    <= reg_r;
                end else if (step == 2'd1) begin
                  if (rd_r) state <= S_RESTART;
                  else      sh    <= wdata_r;
                end else begin
                  state <= S_STOP;
                end
              end else begin
                bitn <= bitn + 4'd1;
                sh   <= {sh[6:0], 1'b0};
              end
            end
          endcase
        end
        // SDA released, SCL high, SDA falls, SCL falls; then address + R.
        S_RESTART: if (tick) begin
          unique case (q)
            2'd0: sda_oe <= 1'b0;
            2'd1: scl_oe <= 1'b0;
            2'd2: sda_oe <= 1'b1;
            default: begin
              scl_oe <= 1'b1;
              sh     <= {addr_r, 1'b1};
              bitn   <= '0;
              step   <= 2'd3;
              state  <= S_WBYTE;
            end
          endcase
        end
        S_RBYTE: if (tick) begin
          unique case (q)
            2'd0: sda_oe <= 1'b0;             // released; 9th bit = NACK
            2'd1: scl_oe <= 1'b0;
            2'd2: if (bitn != 4'd8) sh <= {sh[6:0], sda_i};
            default: begin
              scl_oe <= 1'b1;
              if (bitn == 4'd8) begin
                rdata <= sh;
                state <= S_STOP;
              end else begin
                bitn <= bitn + 4'd1;
              end
            end
          endcase
        end
        // SDA rises while SCL is high.
        S_STOP: if (tick) begin
          unique case (q)
            2'd0: sda_oe <= 1'b1;
            2'd1: scl_oe <= 1'b0;
            2'd2: sda_oe <= 1'b0;
            default: begin
              busy  <= 1'b0;
              done  <= 1'b1;
              state <= S_IDLE;
            end
          endcase
        end
        default: state <= S_IDLE;
      endcase
    end
  end

endmodule
