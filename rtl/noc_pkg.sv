// noc_pkg: types and constants shared by the DVS-link mesh network.
//
// A flit is 32 data bits (the channel width) plus sideband fields that
// travel beside it: a valid bit, the flit type (head / body / tail) and the
// virtual channel it belongs to. A head flit carries its destination in the
// low data bits: X in data[3:0], Y in data[7:4]. Credits flow backwards, one
// per flit that leaves an input buffer, tagged with the VC that freed a slot.
//
// The link frequency is held as a level L = 1..8, giving L x 125 MHz, which
// spans the 125 MHz .. 1 GHz range of a DVS link. The supply voltage for a
// level is interpolated linearly between 0.9 V at 125 MHz and 2.5 V at 1 GHz.
// The end points are the document's; the eight equal steps and the linear
// voltage law are this design's choice.
package noc_pkg;

  localparam int FLIT_W    = 32;   // flit width in bits
  localparam int NUM_VC    = 2;    // virtual channels per port
  localparam int VC_W      = 1;    // bits for a VC index
  localparam int NUM_PORTS = 5;    // local + four mesh directions
  localparam int PORT_W    = 3;
  localparam int COORD_W   = 4;    // mesh coordinate width (up to 16 x 16)

  // Port numbering. East is +X, South is +Y.
  typedef enum logic [PORT_W-1:0] {
    P_LOCAL = 3'd0,
    P_NORTH = 3'd1,
    P_EAST  = 3'd2,
    P_SOUTH = 3'd3,
    P_WEST  = 3'd4
  } port_e;

  typedef enum logic [1:0] {
    FT_BODY     = 2'd0,
    FT_HEAD     = 2'd1,
    FT_TAIL     = 2'd2,
    FT_HEADTAIL = 2'd3
  } ftype_e;

  typedef struct packed {
    logic              valid;
    ftype_e            ftype;
    logic [VC_W-1:0]   vc;
    logic [FLIT_W-1:0] data;
  } flit_t;

  typedef struct packed {
    logic            valid;
    logic [VC_W-1:0] vc;
  } credit_t;

  localparam flit_t   FLIT_NONE   = '0;
  localparam credit_t CREDIT_NONE = '0;

  function automatic logic is_head(ftype_e t);
    return (t == FT_HEAD) || (t == FT_HEADTAIL);
  endfunction

  function automatic logic is_tail(ftype_e t);
    return (t == FT_TAIL) || (t == FT_HEADTAIL);
  endfunction

  function automatic logic [COORD_W-1:0] dest_x(logic [FLIT_W-1:0] d);
    return d[COORD_W-1:0];
  endfunction

  function automatic logic [COORD_W-1:0] dest_y(logic [FLIT_W-1:0] d);
    return d[2*COORD_W-1:COORD_W];
  endfunction

  // Dimension-order (X first, then Y) routing.
  function automatic port_e xy_route(logic [COORD_W-1:0] my_x, logic [COORD_W-1:0] my_y,
                                     logic [COORD_W-1:0] dx,   logic [COORD_W-1:0] dy);
    if (dx > my_x)      return P_EAST;
    else if (dx < my_x) return P_WEST;
    else if (dy > my_y) return P_SOUTH;
    else if (dy < my_y) return P_NORTH;
    else                return P_LOCAL;
  endfunction

  // ---- DVS link frequency / voltage levels ----
  localparam int LEVEL_W    = 4;
  localparam int MAX_LEVEL  = 8;     // 8 x 125 MHz = 1 GHz
  localparam int MIN_LEVEL  = 1;     // 125 MHz
  localparam int VMIN_MV    = 900;   // supply at 125 MHz
  localparam int VMAX_MV    = 2500;  // supply at 1 GHz
  localparam int MV_W       = 12;

  // Supply voltage in mV needed by frequency level lvl (1..MAX_LEVEL).
  function automatic logic [MV_W-1:0] level_mv(logic [LEVEL_W-1:0] lvl);
    int l;
    l = (int'(lvl) < MIN_LEVEL) ? MIN_LEVEL : (int'(lvl) > MAX_LEVEL) ? MAX_LEVEL : int'(lvl);
    return MV_W'(VMIN_MV + ((l - MIN_LEVEL) * (VMAX_MV - VMIN_MV) + (MAX_LEVEL - MIN_LEVEL) / 2)
                           / (MAX_LEVEL - MIN_LEVEL));
  endfunction

endpackage
