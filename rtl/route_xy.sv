// route_xy: dimension-order (XY) routing computation for a 2-D mesh.
//
// A packet first travels along x until its column matches the destination,
// then along y; at the destination it leaves through the local port. The
// destination address is the head flit's data field, {y, x}. Coordinates grow
// eastwards (x) and southwards (y), matching the row-major numbering of the
// logical clusters. Purely combinational.
//
// XY routing follows the document; the port numbering and the coordinate
// direction (y grows southward) are this design's choices.
module route_xy (
  input  logic [noc_pkg::COORD_W-1:0] cur_x,
  input  logic [noc_pkg::COORD_W-1:0] cur_y,
  input  logic [noc_pkg::DATA_W-1:0]  dest,
  output noc_pkg::port_e              port
);
  import noc_pkg::*;
  logic [COORD_W-1:0] dx, dy;
  always_comb begin
    dx = dest[COORD_W-1:0];
    dy = dest[2*COORD_W-1:COORD_W];
    if (dx > cur_x)      port = P_EAST;
    else if (dx < cur_x) port = P_WEST;
    else if (dy > cur_y) port = P_SOUTH;
    else if (dy < cur_y) port = P_NORTH;
    else                 port = P_LOCAL;
  end
endmodule
