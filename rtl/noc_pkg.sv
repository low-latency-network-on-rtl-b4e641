// noc_pkg: constants, port encoding and routing functions shared by the
// router, its sub-blocks and the mesh.
//
// Ports are numbered LOCAL=0, EAST=1, NORTH=2, WEST=3, SOUTH=4. Column x grows
// eastward and row y grows southward. A flit is {hdr, tail, vc[V-1:0] one-hot,
// payload[FPAY-1:0]}; in a header flit the low payload bits carry the
// look-ahead output port (the port the receiving router must use) and the
// destination and source coordinates. The field layout is this design's own
// choice; the published design fixes only the payload width (32 bits).
package noc_pkg;

  localparam int P       = 5;   // ports of a 2D-mesh router
  localparam int PW      = 3;   // bits of a port number
  localparam int CW      = 4;   // bits of a mesh coordinate (meshes up to 16x16)

  typedef enum logic [PW-1:0] {
    LOCAL = 3'd0,
    EAST  = 3'd1,
    NORTH = 3'd2,
    WEST  = 3'd3,
    SOUTH = 3'd4
  } port_e;

  // Header payload field offsets
  localparam int HDR_LK_LSB   = 0;            // look-ahead port, PW bits
  localparam int HDR_DSTX_LSB = PW;           // destination x
  localparam int HDR_DSTY_LSB = PW + CW;      // destination y
  localparam int HDR_SRCX_LSB = PW + 2*CW;    // source x
  localparam int HDR_SRCY_LSB = PW + 3*CW;    // source y
  localparam int HDR_BITS     = PW + 4*CW;    // header fields in the payload

  // Dimension-order (X then Y) routing decision at router (cx,cy)
  function automatic logic [PW-1:0] xy_route(input logic [CW-1:0] cx, cy, dx, dy);
    if (dx > cx)      return EAST;
    else if (dx < cx) return WEST;
    else if (dy > cy) return SOUTH;
    else if (dy < cy) return NORTH;
    else              return LOCAL;
  endfunction

  // Port on the far side of a link: a flit leaving by EAST enters by WEST
  function automatic logic [PW-1:0] opposite(input logic [PW-1:0] p);
    case (p)
      EAST:    return WEST;
      WEST:    return EAST;
      NORTH:   return SOUTH;
      SOUTH:   return NORTH;
      default: return LOCAL;
    endcase
  endfunction

endpackage
