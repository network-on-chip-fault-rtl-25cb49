// noc_pkg: types and constants shared by the router, its self-test and the mesh.
//
// A flit is the unit a link moves in one clock: a tail bit that closes a packet,
// the destination router's x and y coordinates, and a data word. Every flit
// carries its destination so that every flit can be routed; a packet holds the
// output port it won from its first flit to its tail flit (wormhole switching).
// Ports are numbered as in the usual mesh picture: 0 is the local node, 1 to 4
// are the mesh links. The flit layout, the field widths and which side each of
// ports 1 to 4 faces are this design's choices.
package noc_pkg;

  localparam int unsigned NPORTS  = 5;   // local + four mesh links
  localparam int unsigned DATA_W  = 32;  // payload bits per flit
  localparam int unsigned COORD_W = 4;   // up to 16 x 16 routers
  localparam int unsigned CRC_W   = 8;   // CRC-8 per stored flit
  localparam int unsigned PORT_W  = 3;

  typedef enum logic [PORT_W-1:0] {
    P_LOCAL = 3'd0,
    P_NORTH = 3'd1,
    P_EAST  = 3'd2,
    P_SOUTH = 3'd3,
    P_WEST  = 3'd4
  } port_e;

  typedef struct packed {
    logic               tail;
    logic [COORD_W-1:0] dst_y;
    logic [COORD_W-1:0] dst_x;
    logic [DATA_W-1:0]  data;
  } flit_t;

  localparam int unsigned FLIT_W = $bits(flit_t);

endpackage
