// ipbus_fabric: IPbus bus fabric connecting one master (the IPbus
// transaction engine) to NSLV register slaves.
//
// The slave is selected by the address bits [SEL_LSB+7:SEL_LSB]; the master's
// strobe reaches only that slave, while address, write data and the write
// flag go to all of them, so a slave sees activity only when it is
// addressed. The selected slave's read data, ack and err return to the
// master. An address selecting no slave is answered with err one clock
// after its strobe, so a bad address never hangs the master.
//
// Timing: combinational in both directions except the err reply for an
// unmapped address, which is registered.
// Address decoding onto several slaves follows the controller's description
// of the IPbus core; the decoding field is this design's choice.
// Most output bits of this block are wires straight from its input
// (address, write data and write flag broadcast to every slave): that is
// what a bus fabric does, not unused logic.
module ipbus_fabric
  import llrf_pkg::*;
#(
  parameter int NSLV    = 10,
  parameter int SEL_LSB = 8
) (
  input  logic      clock,
  input  logic      reset,
  input  ipb_wbus_t ipb_in,
  output ipb_rbus_t ipb_out,
  output ipb_wbus_t ipb_to_slaves   [NSLV],
  input  ipb_rbus_t ipb_from_slaves [NSLV]
);

  logic [7:0] sel;
  logic       unmapped;
  logic       bad_ack;

  always_comb begin
    sel      = ipb_in.addr[SEL_LSB +: 8];
    unmapped = (32'(sel) >= NSLV) || (ipb_in.addr[31:SEL_LSB+8] != '0);
  end

  always_comb begin
    for (int n = 0; n < NSLV; n++) begin
      ipb_to_slaves[n]        = ipb_in;
      ipb_to_slaves[n].strobe = ipb_in.strobe && !unmapped && (32'(sel) == n);
    end
  end

  always_ff @(posedge clock) begin
    if (reset) bad_ack <= 1'b0;
    else       bad_ack <= ipb_in.strobe && unmapped && !bad_ack;
  end

  always_comb begin
    ipb_out = IPB_RBUS_NULL;
    for (int n = 0; n < NSLV; n++) begin
      if (!unmapped && 32'(sel) == n) ipb_out = ipb_from_slaves[n];
    end
    if (bad_ack) ipb_out.err = 1'b1;
  end

  // Bus rule: a master keeps strobe, address and write flag steady until the
  // transaction is answered.
  a_strobe_held : assert property (@(posedge clock) disable iff (reset)
    ipb_in.strobe && !ipb_out.ack && !ipb_out.err
      |=> ipb_in.strobe && $stable(ipb_in.addr) && $stable(ipb_in.write))
    else $error("ipbus_fabric: strobe dropped or address changed before ack");

endmodule
