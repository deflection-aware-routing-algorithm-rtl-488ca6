// dar_unit: deflection-aware routing (DAR) check of an arriving header flit.
//
// The transmitter already routed the header correctly, so re-running XY
// routing as if still at the transmitter, on the header as received, must
// point back at this receiver. The unit
//   1. derives the transmitter address from the input port (address
//      generator),
//   2. routes the received destination from that address (routing unit),
//   3. steps one hop from the transmitter in the chosen direction (second
//      address generator) and
//   4. compares the result with the receiver's own address (address
//      comparator).
// `deflect` is high when they differ, i.e. the header would have left the
// routing path and is faulty. A fault that keeps this receiver on the path
// is not seen here; the parity check covers those. Combinational, so the
// check is merged with the normal routing cycle ("merged" timing).
// The algorithm follows the source design. It uses its own routing
// instance rather than sharing the router's, since here the check runs on
// the link while the main routing runs at the buffer head.
module dar_unit
  import noc_pkg::*;
(
  input  addr_t own,      // address of this (receiving) node
  input  port_e in_port,  // input port the header arrived on (not LOCAL)
  input  addr_t dest,     // destination field of the received header
  output addr_t tx_addr,  // transmitter address (for observation)
  output logic  deflect   // 1: header deviates from the routing path
);
  port_e dir;
  addr_t next;

  addr_gen u_tx   (.node(own),     .port_i(in_port), .nbr(tx_addr));
  xy_route u_rt   (.cur(tx_addr),  .dest(dest),      .port_o(dir));
  addr_gen u_next (.node(tx_addr), .port_i(dir),     .nbr(next));

  assign deflect = (next != own);
endmodule
