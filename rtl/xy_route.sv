// xy_route: deterministic X-Y routing decision of one router.
//
// Compares the router's own address (srcx, srcy) with the destination
// address (destx, desty) carried by a packet and names the output port.
// The x coordinate is settled first: srcx < destx routes west, srcx > destx
// routes east.  Once srcx == destx, srcy < desty routes north, srcy > desty
// routes south, and srcx == destx with srcy == desty means this node is the
// destination, so the packet leaves by the local port to the processing
// element.  Purely combinational.
//
// The order of the comparisons and the direction each one selects follow
// the document's X-Y routing description; which physical neighbour a port
// name stands for is fixed by the mesh wiring in noc_aes_top (west = x+1,
// north = y+1).
module xy_route
  import noc_pkg::*;
(
  input  addr_t cur,    // this router's address (srcx, srcy)
  input  addr_t dest,   // packet destination (destx, desty)
  output port_e port
);

  always_comb begin
    if (cur.x < dest.x)      port = P_WEST;
    else if (cur.x > dest.x) port = P_EAST;
    else if (cur.y < dest.y) port = P_NORTH;
    else if (cur.y > dest.y) port = P_SOUTH;
    else                     port = P_LOCAL;
  end

endmodule
