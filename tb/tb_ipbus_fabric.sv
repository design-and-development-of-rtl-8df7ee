// tb_ipbus_fabric: self-checking testbench of the IPbus address decoder.
//
// Four model slaves answer one clock after strobe with data made of their
// own number and the address they saw, and log every strobe they receive.
// Random reads and writes to all slaves and to unmapped addresses (slave
// field past the last slave, or upper address bits set) check that:
//   - slave n at word addresses 0x100*n + 0..0xFF gets the transaction and
//     no other slave sees a strobe;
//   - its answer (data, ack) comes back to the master;
//   - an unmapped address answers err one clock after strobe, reaching no
//     slave.
module tb_ipbus_fabric
  import llrf_pkg::*;
;
  localparam int NSLV = 4;
  logic clock = 1'b0;
  logic reset = 1'b1;
  always #4 clock = ~clock;

  int checks = 0;
  int failures = 0;

  task automatic check(input bit ok, input string msg);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL %s", msg);
    end
  endtask

  ipb_wbus_t ipb_in = '0;
  ipb_rbus_t ipb_out;
  ipb_wbus_t to_s   [NSLV];
  ipb_rbus_t from_s [NSLV];

  ipbus_fabric #(.NSLV(NSLV), .SEL_LSB(8)) dut (
    .clock, .reset, .ipb_in, .ipb_out, .ipb_to_slaves(to_s), .ipb_from_slaves(from_s));

  int strobes [NSLV];
  logic [31:0] last_w [NSLV];

  for (genvar n = 0; n < NSLV; n++) begin : g_slave
    always @(posedge clock) begin
      if (reset) from_s[n] <= '0;
      else begin
        from_s[n] <= '0;
        if (to_s[n].strobe && !from_s[n].ack) begin
          strobes[n]++;
          from_s[n].ack   <= 1'b1;
          from_s[n].rdata <= {8'(n), 16'h0, to_s[n].addr[7:0]};
          if (to_s[n].write) last_w[n] <= to_s[n].wdata;
        end
      end
    end
  end

`include "ipb_master_tasks.svh"

  initial begin
    for (int n = 0; n < NSLV; n++) begin
      strobes[n] = 0;
      last_w[n] = '0;
      from_s[n] = '0;
    end
    repeat (3) @(posedge clock);
    reset <= 1'b0;
    for (int rep = 0; rep < 300; rep++) begin
      int s, prev_cnt [NSLV], c;
      logic [31:0] addr, d, w;
      bit e, wr;
      s = int'($urandom_range(NSLV + 1));
      wr = $urandom_range(1);
      w = $urandom;
      for (int n = 0; n < NSLV; n++) prev_cnt[n] = strobes[n];
      if (s < NSLV) addr = {16'd0, 8'(s), 8'($urandom)};
      else if (s == NSLV) addr = {16'd0, 8'($urandom_range(255, NSLV)), 8'($urandom)};
      else addr = {16'($urandom_range(65535, 1)), 8'($urandom_range(NSLV - 1)), 8'($urandom)};
      ipb_access(addr, wr, w, d, e, c);
      if (s < NSLV) begin
        check(!e && c == 1, $sformatf("slave %0d answers", s));
        check(d == {8'(s), 16'h0, addr[7:0]}, $sformatf("read data %h from slave %0d", d, s));
        if (wr) check(last_w[s] == w, "write data reaches the slave");
      end else begin
        check(e && c == 1, $sformatf("unmapped address %h answers err", addr));
      end
      for (int n = 0; n < NSLV; n++)
        check(strobes[n] - prev_cnt[n] == ((n == s) ? 1 : 0),
              $sformatf("strobe count of slave %0d for address %h", n, addr));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #1ms;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
