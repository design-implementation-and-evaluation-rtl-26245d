// noc_pkg: types and constants shared by the virtual-channel NoC router and network.
//
// A flit is FLIT_W bits wide (32 by default, the minimum that carries the routing
// information of a head flit). The header fields sit at fixed positions in bits [31:0];
// any bits above 31 in a wider flit are extra payload. Every flit carries its type and
// the virtual channel identifier (VCID) used to demultiplex it into a VC FIFO at the
// receiving router. A head flit also carries the current-node output port (CNOP), the
// output port it takes at the router it is arriving at (lookahead routing), and the
// source and destination coordinates. Body and tail flits carry payload below the VCID.
//
// The document names these fields but not their widths or order; the layout, the
// two-bit type encoding (including a combined head+tail type for one-flit packets), the
// 3-bit coordinates (meshes up to 8x8) and the port numbering are this design's choice.
// The XY dimension-order routing function follows the document's algorithm for a mesh.
package noc_pkg;

  localparam int FLIT_W   = 32;
  localparam int COORD_W  = 3;
  localparam int VCID_W   = 2;   // up to 4 virtual channels per port
  localparam int PORT_W   = 3;
  localparam int NUM_PORTS = 5;

  // Port numbering. North is increasing Y, east is increasing X.
  typedef enum logic [PORT_W-1:0] {
    PORT_LOCAL = 3'd0,
    PORT_EAST  = 3'd1,
    PORT_WEST  = 3'd2,
    PORT_NORTH = 3'd3,
    PORT_SOUTH = 3'd4
  } port_e;

  typedef enum logic [1:0] {
    FT_BODY     = 2'b00,
    FT_HEAD     = 2'b01,
    FT_TAIL     = 2'b10,
    FT_HEADTAIL = 2'b11
  } ftype_e;

  // Low 32 bits of every flit, seen as a head flit.
  typedef struct packed {
    ftype_e               ftype;    // [31:30]
    logic [VCID_W-1:0]    vcid;     // [29:28]
    logic [PORT_W-1:0]    cnop;     // [27:25]
    logic [COORD_W-1:0]   src_x;    // [24:22]
    logic [COORD_W-1:0]   src_y;    // [21:19]
    logic [COORD_W-1:0]   dst_x;    // [18:16]
    logic [COORD_W-1:0]   dst_y;    // [15:13]
    logic [12:0]          payload;  // [12:0]
  } hdr_t;

  function automatic logic is_head(ftype_e t);
    return t == FT_HEAD || t == FT_HEADTAIL;
  endfunction

  function automatic logic is_tail(ftype_e t);
    return t == FT_TAIL || t == FT_HEADTAIL;
  endfunction

  // XY dimension-order routing for a 2D mesh: the output port taken at node (x, y)
  // by a packet heading for (dx, dy). X is resolved first, then Y.
  function automatic logic [PORT_W-1:0] xy_route(logic [COORD_W-1:0] x, logic [COORD_W-1:0] y,
                                                 logic [COORD_W-1:0] dx, logic [COORD_W-1:0] dy);
    if (dx > x)      return PORT_EAST;
    else if (dx < x) return PORT_WEST;
    else if (dy > y) return PORT_NORTH;
    else if (dy < y) return PORT_SOUTH;
    else             return PORT_LOCAL;
  endfunction

endpackage
