// noc_pkg: types and constants shared by the fragmentation router and the mesh.
//
// A flit is 128 bits wide. Its top bits carry a 3-bit type (head, body, tail,
// virtual head, virtual tail), the look-ahead output port for the router that
// receives it, and the destination coordinates; the rest is payload. Body and
// tail flits carry only payload; their routing fields are ignored.
// A link carries one flit per cycle with its virtual-channel number as
// sideband; a second, narrow "next" bundle tells the receiver which VC the
// flit arriving in the following cycle belongs to (the flit that is in switch
// traversal upstream right now).
//
// Follows the document: 5 ports, 4 VCs per port, 5-entry flit buffers per VC,
// 128-bit flits, 4x4 mesh with XY routing. Own choices: the field layout, the
// type encoding, the port numbering and which way "north" points.
package noc_pkg;

  localparam int FLIT_W    = 128;  // flit size
  localparam int NUM_PORTS = 5;    // local + 4 mesh directions
  localparam int NUM_VC    = 4;    // VCs per port
  localparam int BUF_DEPTH = 5;    // flit buffer entries per VC (plus header buffer)
  localparam int COORD_W   = 2;    // enough for a 4x4 mesh
  localparam int VC_W      = $clog2(NUM_VC);
  localparam int PORT_W    = 3;
  localparam int CNT_W     = $clog2(BUF_DEPTH + 1);

  // Port numbering. North is +y, east is +x.
  typedef enum logic [PORT_W-1:0] {
    P_LOCAL = 3'd0,
    P_NORTH = 3'd1,
    P_EAST  = 3'd2,
    P_SOUTH = 3'd3,
    P_WEST  = 3'd4
  } port_e;

  typedef enum logic [2:0] {
    F_BODY  = 3'd0,
    F_HEAD  = 3'd1,
    F_TAIL  = 3'd2,
    F_VHEAD = 3'd3,   // header copy sent in front of a packet fragment
    F_VTAIL = 3'd4    // body flit re-typed where a packet was fragmented
  } ftype_e;

  localparam int DATA_W = FLIT_W - 3 - PORT_W - 2 * COORD_W;

  typedef struct packed {
    ftype_e               ftype;
    port_e                la_port;  // output port to take at the receiving router
    logic [COORD_W-1:0]   dst_x;
    logic [COORD_W-1:0]   dst_y;
    logic [DATA_W-1:0]    data;
  } flit_t;

  typedef struct packed {
    logic              valid;
    logic [VC_W-1:0]   vc;
    flit_t             flit;
  } link_t;

  // Look-ahead of the link: the flit that will be on the link next cycle.
  typedef struct packed {
    logic              valid;
    logic [VC_W-1:0]   vc;
  } la_t;

  // A flit on its way through the crossbar of one router.
  typedef struct packed {
    logic              valid;
    port_e             port;   // output port
    logic [VC_W-1:0]   vc;     // output VC
    flit_t             flit;
  } xbar_t;

  function automatic logic is_head(ftype_e t);
    return (t == F_HEAD) || (t == F_VHEAD);
  endfunction

  function automatic logic is_tail(ftype_e t);
    return (t == F_TAIL) || (t == F_VTAIL);
  endfunction

  // Dimension-order routing: X first, then Y.
  function automatic port_e xy_dir(logic [COORD_W-1:0] cx, logic [COORD_W-1:0] cy,
                                   logic [COORD_W-1:0] dx, logic [COORD_W-1:0] dy);
    if (dx > cx)      return P_EAST;
    else if (dx < cx) return P_WEST;
    else if (dy > cy) return P_NORTH;
    else if (dy < cy) return P_SOUTH;
    else              return P_LOCAL;
  endfunction

endpackage
