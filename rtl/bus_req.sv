// bus_req: the bus-request sub-module added to each core for the shared bus.
//
// Combinational. When the core is in the first cycle of a load or store whose
// address lies outside the core's private RAM (see plasma_pkg::is_bus_addr),
// it raises req towards the main bus arbiter and pauses the core until the
// arbiter answers with ack. The request is dropped as soon as the core leaves
// that cycle, which tells the arbiter that the bus is free again. Accesses to
// the private RAM and instruction fetches never use the shared bus.
//
// That each core gets such a request module and otherwise stays unchanged follows
// the published system; which addresses need the bus, and holding the request
// for the whole access, are this design's choices.
module bus_req
  import plasma_pkg::*;
(
  input  logic        data_phase,    // first cycle of a load/store
  input  logic [31:2] data_address,
  input  logic        ack,
  output logic        req,
  output logic        bus_pause
);

  assign req       = data_phase && is_bus_addr(data_address);
  assign bus_pause = req && !ack;

endmodule
