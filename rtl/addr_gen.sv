// addr_gen: address generator of the deflection-aware routing check.
//
// Given a node address and one of its ports it returns the address of the
// neighbour on that port; for LOCAL it returns the node itself. In the
// receiver it turns "the input channel the header came in on" into the
// address of the transmitter node; dar_unit uses a second copy to step from
// the transmitter in the direction the re-run routing chose. Combinational.
// Coordinates wrap modulo 2^COORD_W at the mesh edge; a router never asks
// for a neighbour outside the mesh, because XY routing never points there.
// The block and its function follow the source design; the arithmetic is
// this design's own.
module addr_gen
  import noc_pkg::*;
(
  input  addr_t node,    // address of the node
  input  port_e port_i,  // port of that node
  output addr_t nbr      // address of the neighbour on that port
);
  always_comb begin
    nbr = node;
    unique case (port_i)
      P_NORTH: nbr.y = node.y - COORD_W'(1);
      P_SOUTH: nbr.y = node.y + COORD_W'(1);
      P_EAST:  nbr.x = node.x + COORD_W'(1);
      P_WEST:  nbr.x = node.x - COORD_W'(1);
      default: nbr   = node;
    endcase
  end
endmodule
