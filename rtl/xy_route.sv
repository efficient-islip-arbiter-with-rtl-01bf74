// xy_route: dimension-order (XY) routing decision for one mesh node.
//
// A packet first travels along x until its x coordinate matches the
// destination's, then along y; at the destination it leaves through the
// local port. Combinational. The x-then-y order follows the design; the port
// numbering (islip_pkg::port_e) and +y being north are this design's choice.
module xy_route
  import islip_pkg::*;
(
  input  node_addr_t cur,
  input  node_addr_t dst,
  output port_e      port
);

  always_comb begin
    if (dst.x > cur.x)      port = PORT_EAST;
    else if (dst.x < cur.x) port = PORT_WEST;
    else if (dst.y > cur.y) port = PORT_NORTH;
    else if (dst.y < cur.y) port = PORT_SOUTH;
    else                    port = PORT_LOCAL;
  end

endmodule
