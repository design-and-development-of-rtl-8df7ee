// ipb_master_tasks.svh: IPbus master tasks for the testbenches.
//
// Included inside a testbench module that declares `clock`, `ipb_in`
// (ipb_wbus_t, driven by the testbench) and `ipb_out` (ipb_rbus_t). A
// transaction raises strobe on a rising clock edge, looks for ack or err
// between edges (at most 100 clocks) and drops strobe on the edge after the
// answer, as a synchronous IPbus master does.
// ipb_read returns the data; both tasks return whether err was answered and
// the number of clocks from strobe to answer.

task automatic ipb_access(input logic [31:0] addr, input bit wr, input logic [31:0] wdata,
                          output logic [31:0] rdata, output bit err, output int clocks);
  ipb_in.addr   <= addr;
  ipb_in.wdata  <= wdata;
  ipb_in.write  <= wr;
  ipb_in.strobe <= 1'b1;
  clocks = 0;
  err    = 1'b1;
  rdata  = '0;
  @(posedge clock);
  for (int n = 0; n < 100; n++) begin
    @(negedge clock);
    clocks++;
    if (ipb_out.ack || ipb_out.err) begin
      err   = ipb_out.err;
      rdata = ipb_out.rdata;
      break;
    end
  end
  @(posedge clock);
  ipb_in.strobe <= 1'b0;
  ipb_in.write  <= 1'b0;
  @(posedge clock);
endtask

task automatic ipb_write(input logic [31:0] addr, input logic [31:0] wdata, output bit err);
  logic [31:0] d;
  int c;
  ipb_access(addr, 1'b1, wdata, d, err, c);
endtask

task automatic ipb_read(input logic [31:0] addr, output logic [31:0] rdata, output bit err);
  int c;
  ipb_access(addr, 1'b0, '0, rdata, err, c);
endtask
