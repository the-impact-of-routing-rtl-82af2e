// lasio_pkg - types and constants shared by the Lasio 3D-mesh NoC.
//
// A router has seven structurally identical ports: Local (the processing
// element) and six mesh ports. East/West step along x, North/South along y
// and Top/Bottom along z, which is the vertical (through-silicon) direction
// between stacked 2D layers. The port names and the 16-bit flit follow the
// design description; the numbering of the ports, which compass port maps
// to which axis sign, and the packet format below are this design's choices.
//
// Packet format (own choice): flit 0 is the header and carries the
// destination address, x in bits [11:8], y in [7:4], z in [3:0]; flit 1
// carries the number of payload flits that follow it; then the payload.
// An 8-flit packet is therefore header + size(=6) + 6 payload flits.
package lasio_pkg;

  localparam int unsigned NPORTS  = 7;
  localparam int unsigned PORT_W  = 3;
  localparam int unsigned COORD_W = 4;    // up to 16 routers per dimension
  localparam int unsigned FLIT_W  = 16;

  typedef enum logic [PORT_W-1:0] {
    P_LOCAL  = 3'd0,
    P_EAST   = 3'd1,   // +x
    P_WEST   = 3'd2,   // -x
    P_NORTH  = 3'd3,   // +y
    P_SOUTH  = 3'd4,   // -y
    P_TOP    = 3'd5,   // +z
    P_BOTTOM = 3'd6    // -z
  } port_e;

  typedef struct packed {
    logic [COORD_W-1:0] x;
    logic [COORD_W-1:0] y;
    logic [COORD_W-1:0] z;
  } addr_t;

  // One direction of a link: the flit and its valid bit. The matching
  // ready bit runs the other way.
  typedef struct packed {
    logic              valid;
    logic [FLIT_W-1:0] data;
  } link_t;

  function automatic logic [FLIT_W-1:0] make_header(input addr_t dst);
    return FLIT_W'(dst);
  endfunction

endpackage
