// xy_route: dimension-order (XY) route computation.
//
// A flit first travels along x until its column matches, then along y, then
// leaves on the local port. x grows to the east, y to the north, as routers are
// numbered from the bottom-left corner of the mesh. The result is purely
// combinational. XY routing on a mesh is the design's routing scheme; the
// assignment of ports 1 to 4 to north, east, south and west is this design's.
module xy_route
  import noc_pkg::*;
(
  input  logic [COORD_W-1:0] cur_x,
  input  logic [COORD_W-1:0] cur_y,
  input  logic [COORD_W-1:0] dst_x,
  input  logic [COORD_W-1:0] dst_y,
  output port_e              out_port
);

  always_comb begin
    if (dst_x > cur_x)      out_port = P_EAST;
    else if (dst_x < cur_x) out_port = P_WEST;
    else if (dst_y > cur_y) out_port = P_NORTH;
    else if (dst_y < cur_y) out_port = P_SOUTH;
    else                    out_port = P_LOCAL;
  end

endmodule
