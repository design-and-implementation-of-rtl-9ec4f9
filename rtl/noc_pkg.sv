// noc_pkg: constants and types shared by the five-port NoC router.
//
// A flit is 8 bits and every channel buffer holds 16 flits, as the router
// description specifies. A packet is 1 to 15 flits (8 to 120 bits); its first
// flit is the header. The header layout is this design's choice: the upper
// nibble is the destination Y coordinate, the lower nibble the destination X
// coordinate, so a mesh of up to 16 x 16 routers can be addressed.
//
// Port numbering follows the order in which the ports are listed for the
// router: east, west, north, south, local. Routing is dimension-ordered (XY):
// a packet first travels along X until its column matches, then along Y, then
// leaves through the local port. X grows towards east, Y grows towards north.
package noc_pkg;

  localparam int unsigned FLIT_W     = 8;   // flit width in bits
  localparam int unsigned FIFO_DEPTH = 16;  // flits per channel FIFO
  localparam int unsigned NUM_PORTS  = 5;   // east, west, north, south, local
  localparam int unsigned PORT_W     = 3;   // crossbar select width
  localparam int unsigned COORD_W    = 4;   // bits per coordinate in the header
  localparam int unsigned MAX_PKT_FLITS = 15; // 120-bit packet

  typedef logic [FLIT_W-1:0] flit_t;

  typedef enum logic [PORT_W-1:0] {
    PORT_EAST  = 3'd0,
    PORT_WEST  = 3'd1,
    PORT_NORTH = 3'd2,
    PORT_SOUTH = 3'd3,
    PORT_LOCAL = 3'd4
  } port_e;

  typedef struct packed {
    logic [COORD_W-1:0] dst_y;
    logic [COORD_W-1:0] dst_x;
  } header_t;

  // Dimension-ordered route decision for a header flit at router (x, y).
  function automatic port_e route_xy(input flit_t hdr,
                                     input logic [COORD_W-1:0] x,
                                     input logic [COORD_W-1:0] y);
    header_t h;
    h = header_t'(hdr);
    if (h.dst_x > x)      return PORT_EAST;
    else if (h.dst_x < x) return PORT_WEST;
    else if (h.dst_y > y) return PORT_NORTH;
    else if (h.dst_y < y) return PORT_SOUTH;
    else                  return PORT_LOCAL;
  endfunction

endpackage
