// i2c_slave_model: behavioural IIC slave with 256 byte registers for the
// testbenches.
//
// Answers device address ADDR. A write transaction (address+W, register
// pointer, data bytes) stores the data from the pointer on; a read
// (address+R, after a pointer write and repeated START) returns the byte at
// the pointer. The slave acknowledges its address and every byte written
// by pulling sda low (sda_oe = 1) during the ninth clock. Lines are given as
// levels (scl, sda) and sampled on the system clock; START and STOP are
// detected as SDA edges while SCL is high. n_start, n_stop and n_acks count
// what happened; protocol errors (SDA changing while SCL is high other than
// START/STOP) are counted in n_glitch.
module i2c_slave_model #(
  parameter logic [6:0] ADDR = 7'h2A
) (
  input  logic clock,
  input  logic scl,
  input  logic sda,
  output logic sda_oe,
  output int   n_start,
  output int   n_stop,
  output int   n_acks,
  output int   n_glitch
);
  typedef enum {P_IDLE, P_ADDR, P_REG, P_DATA, P_READ} phase_e;

  logic [7:0] mem [256];
  phase_e     phase = P_IDLE;
  logic       scl_q = 1'b1, sda_q = 1'b1;
  logic [7:0] sh = '0, sh_out = '0, ptr = '0;
  int         bitcnt = 0;
  logic       m_nack = 1'b0;  // ninth bit as seen on the bus

  initial begin
    sda_oe = 1'b0;
    n_start = 0;
    n_stop = 0;
    n_acks = 0;
    n_glitch = 0;
    for (int n = 0; n < 256; n++) mem[n] = 8'(n * 7 + 3);
  end

  always @(posedge clock) begin
    if (scl && scl_q && sda_q && !sda) begin
      n_start++;
      phase  = P_ADDR;
      bitcnt = 0;
      sda_oe <= 1'b0;
    end else if (scl && scl_q && !sda_q && sda) begin
      if (sda_oe) n_glitch++;
      n_stop++;
      phase = P_IDLE;
      sda_oe <= 1'b0;
    end else if (scl && !scl_q) begin
      if (phase != P_IDLE) begin
        if (bitcnt < 8) sh = {sh[6:0], sda};
        else m_nack = sda;
        bitcnt++;
      end
    end else if (!scl && scl_q && phase != P_IDLE) begin
      if (bitcnt == 8) begin
        unique case (phase)
          P_ADDR: begin
            if (sh[7:1] == ADDR) begin
              sda_oe <= 1'b1;
              n_acks++;
              phase = sh[0] ? P_READ : P_REG;
            end else begin
              phase = P_IDLE;
            end
          end
          P_REG: begin
            ptr = sh;
            sda_oe <= 1'b1;
            n_acks++;
            phase = P_DATA;
          end
          P_DATA: begin
            mem[ptr] = sh;
            ptr++;
            sda_oe <= 1'b1;
            n_acks++;
          end
          default: sda_oe <= 1'b0;  // P_READ: the master answers
        endcase
      end else if (bitcnt == 9) begin
        bitcnt = 0;
        sda_oe <= 1'b0;
        if (phase == P_READ && m_nack) begin
          phase = P_IDLE;  // the master ends the read
        end else if (phase == P_READ) begin
          sh_out = mem[ptr];
          sda_oe <= !sh_out[7];
        end
      end else if (phase == P_READ && bitcnt >= 1 && bitcnt <= 7) begin
        sda_oe <= !sh_out[7 - bitcnt];
      end
    end
    scl_q <= scl;
    sda_q <= sda;
  end
endmodule
