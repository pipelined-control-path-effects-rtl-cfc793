// grant_unit: the Grant-Routing-Acknowledge unit (G) of a router input port.
//
// Each output arbiter returns a routing acknowledge (ra) to every input port it
// can serve. G collects the acknowledges that come back to its own port and
// turns the one that answers the port's pending routing request (rr) into the
// read enable er of the port's queue (2-cycle router) or data buffer (1-cycle
// router). It is purely combinational: er rises in the same cycle as the grant,
// so the granted flit leaves the input side at the next clock edge, the same
// edge at which the MIM registers it onto the outgoing link.
//
// The function follows the source design; masking ra with rr is this
// implementation's choice and guards against an acknowledge for a port that
// did not ask.
module grant_unit #(
  parameter int unsigned NP = noc_pkg::NP
) (
  input  logic [NP-1:0] rr,   // routing request of this input (one-hot or zero)
  input  logic [NP-1:0] ra,   // acknowledges from the output arbiters
  output logic          er    // read enable: the head flit has been switched
);

  assign er = |(rr & ra);

endmodule
