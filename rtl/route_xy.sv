// route_xy: route computation (RC) for a head flit, dimension-ordered XY.
//
// The head flit's destination coordinates are compared with the router's own:
// the flit first travels along x (east or west) until the column matches, then
// along y (north or south), and is delivered to the local port at its
// destination.  XY routing is the routing the router was evaluated with; the
// direction naming (north = larger y, east = larger x) is this design's choice.
// Purely combinational; the input port registers the result.
module route_xy
  import hnoc_pkg::*;
(
  input  logic [COORD_W-1:0] my_x,
  input  logic [COORD_W-1:0] my_y,
  input  logic [COORD_W-1:0] dst_x,
  input  logic [COORD_W-1:0] dst_y,
  output port_e              oport
);
  always_comb begin
    if (dst_x > my_x)      oport = P_EAST;
    else if (dst_x < my_x) oport = P_WEST;
    else if (dst_y > my_y) oport = P_NORTH;
    else if (dst_y < my_y) oport = P_SOUTH;
    else                   oport = P_LOCAL;
  end
endmodule
