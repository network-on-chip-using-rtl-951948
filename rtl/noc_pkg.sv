// noc_pkg: shared types of the on-chip network.
//
// The network is a 4 x 4 mesh of routers, each with a local IP core. Every
// packet is a single flit that carries its destination and source router
// coordinates, a 3-bit message kind and 16 data bits; no packet is split
// over several flits. The mesh size follows the network drawing of the
// design; the flit format is this implementation's choice.
package noc_pkg;
  localparam int MESH_X  = 4;
  localparam int MESH_Y  = 4;
  localparam int CW      = 2;          // coordinate width
  localparam int DATA_W  = 16;
  localparam int KIND_W  = 3;
  localparam int NPORT   = 5;

  // Router ports. East is x+1, North is y+1.
  typedef enum logic [2:0] {
    P_LOCAL = 3'd0, P_NORTH = 3'd1, P_EAST = 3'd2, P_SOUTH = 3'd3, P_WEST = 3'd4
  } port_e;

  typedef struct packed {
    logic [CW-1:0] x;
    logic [CW-1:0] y;
  } coord_t;

  typedef struct packed {
    coord_t              dst;
    coord_t              src;
    logic [KIND_W-1:0]   kind;
    logic [DATA_W-1:0]   data;
  } flit_t;

  localparam int FLIT_W = $bits(flit_t);

  // A message as the IP core sees it: peer is the destination when sending
  // and the source when receiving.
  typedef struct packed {
    coord_t              peer;
    logic [KIND_W-1:0]   kind;
    logic [DATA_W-1:0]   data;
  } ip_msg_t;

  // Message kinds understood by the GMM classifier node.
  localparam logic [KIND_W-1:0] K_LOAD_X   = 3'd1;
  localparam logic [KIND_W-1:0] K_LOAD_GMM = 3'd2;
  localparam logic [KIND_W-1:0] K_LOAD_K   = 3'd3;
  localparam logic [KIND_W-1:0] K_LOAD_LPF = 3'd4;
  localparam logic [KIND_W-1:0] K_RESET    = 3'd5;
  localparam logic [KIND_W-1:0] K_START    = 3'd6;
  localparam logic [KIND_W-1:0] K_RESULT   = 3'd7;

  // Dimension-ordered (XY) routing: first along x, then along y.
  function automatic port_e route_xy(coord_t here, coord_t dst);
    if (dst.x > here.x)      return P_EAST;
    else if (dst.x < here.x) return P_WEST;
    else if (dst.y > here.y) return P_NORTH;
    else if (dst.y < here.y) return P_SOUTH;
    else                     return P_LOCAL;
  endfunction
endpackage
