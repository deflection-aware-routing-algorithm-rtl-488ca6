// xy_route: deterministic XY routing function of the mesh.
//
// The packet first travels along x until the destination column is reached,
// then along y; at the destination it leaves through the LOCAL port. Purely
// combinational (no clock); the router uses it both for the normal routing
// of a header at the head of an input buffer and, inside dar_unit, for the
// deflection-aware re-check of a header arriving on a link.
// XY routing is the routing algorithm of the source design; the direction
// convention (y grows towards SOUTH) is this design's own.
module xy_route
  import noc_pkg::*;
(
  input  addr_t cur,    // address of the node that routes
  input  addr_t dest,   // destination taken from the header flit
  output port_e port_o  // output port chosen
);
  always_comb begin
    if (dest.x > cur.x)      port_o = P_EAST;
    else if (dest.x < cur.x) port_o = P_WEST;
    else if (dest.y > cur.y) port_o = P_SOUTH;
    else if (dest.y < cur.y) port_o = P_NORTH;
    else                     port_o = P_LOCAL;
  end
endmodule
