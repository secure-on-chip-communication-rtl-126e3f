// xy_routing_logic: dimension-ordered (XY) route computation of an input port.
//
// From the destination id in the header flit and the router's own id it
// picks the output port: first move along x until the column matches, then
// along y, then deliver to the local port. The result is combinational and
// qualified by enable: route_valid is high only while enable is, which is how
// the IAV module holds back routing until a packet has been verified.
// route is one-hot over the five ports in noc_pkg::port_e order.
//
// XY routing is what the router uses; the id-to-coordinate split and the
// direction names are this design's own.
module xy_routing_logic
  import noc_pkg::*;
#(
  parameter node_id_t ROUTER_ID = '0
) (
  input  logic             enable,
  input  node_id_t         id_dest,
  output logic             route_valid,
  output port_e            route_port,
  output logic [NPORTS-1:0] route
);

  logic [COORD_W-1:0] my_x, my_y, dst_x, dst_y;

  assign my_x  = ROUTER_ID[COORD_W-1:0];
  assign my_y  = ROUTER_ID[2*COORD_W-1:COORD_W];
  assign dst_x = id_dest[COORD_W-1:0];
  assign dst_y = id_dest[2*COORD_W-1:COORD_W];

  always_comb begin
    if (dst_x > my_x)      route_port = PORT_EAST;
    else if (dst_x < my_x) route_port = PORT_WEST;
    else if (dst_y > my_y) route_port = PORT_SOUTH;
    else if (dst_y < my_y) route_port = PORT_NORTH;
    else                   route_port = PORT_LOCAL;
  end

  assign route_valid = enable;
  assign route       = enable ? (NPORTS'(1) << route_port) : '0;

endmodule
