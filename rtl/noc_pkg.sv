// noc_pkg: types and constants shared by the router blocks.
//
// A mesh router has five ports. Their numbering (EAST, WEST, SOUTH, NORTH,
// LOCAL) is chosen so that the fixed FVADA map of an east input port lists
// its four VCs as WEST, SOUTH, NORTH, LOCAL, the order the design description
// uses for that port. Flits are 128 bits wide; the header fields sit in the
// low bits of every flit and the rest is payload. Packets are five flits
// (head, three bodies, tail), but the logic also accepts single-flit packets
// (HEADTAIL) and any length of two or more.
//
// Header field widths (VC id 3 bits, coordinates 4 bits) are this design's
// choice: they cover up to 8 VCs per port and a 16x16 mesh.
package noc_pkg;

  localparam int unsigned NUM_PORTS = 5;
  localparam int unsigned FLIT_W    = 128;
  localparam int unsigned VCID_W    = 3;
  localparam int unsigned COORD_W   = 4;
  localparam int unsigned PAYLOAD_W = FLIT_W - VCID_W - 2 - 3 - 4 * COORD_W;

  typedef enum logic [2:0] {
    P_EAST  = 3'd0,
    P_WEST  = 3'd1,
    P_SOUTH = 3'd2,
    P_NORTH = 3'd3,
    P_LOCAL = 3'd4
  } port_e;

  typedef enum logic [1:0] {
    FT_HEAD     = 2'd0,
    FT_BODY     = 2'd1,
    FT_TAIL     = 2'd2,
    FT_HEADTAIL = 2'd3
  } flit_type_e;

  // Status field of the VC control table
  typedef enum logic [1:0] {
    VC_IDLE   = 2'd0,
    VC_VA     = 2'd1,
    VC_ACTIVE = 2'd2
  } vc_status_e;

  // VC selection scheme of the output units
  typedef enum logic {
    VA_FVADA = 1'b0,
    VA_AVADA = 1'b1
  } va_scheme_e;

  typedef logic [VCID_W-1:0]  vcid_t;
  typedef logic [COORD_W-1:0] coord_t;

  // 'op' is the output port this flit takes in the router that receives it
  // (computed one hop earlier by look-ahead routing); 'vc' is the VC of that
  // router's input port the flit is written into.
  typedef struct packed {
    logic [PAYLOAD_W-1:0] payload;
    coord_t               src_y;
    coord_t               src_x;
    coord_t               dst_y;
    coord_t               dst_x;
    port_e                op;
    flit_type_e           ftype;
    vcid_t                vc;
  } flit_t;

  // one credit returned upstream: a flit has left VC 'vc'
  typedef struct packed {
    logic  valid;
    vcid_t vc;
  } credit_t;

  function automatic logic is_head(flit_type_e t);
    return (t == FT_HEAD) || (t == FT_HEADTAIL);
  endfunction

  function automatic logic is_tail(flit_type_e t);
    return (t == FT_TAIL) || (t == FT_HEADTAIL);
  endfunction

  // Dimension-ordered (X then Y) route at router (cx, cy) towards (dx, dy).
  // EAST is +x, NORTH is +y.
  function automatic port_e xy_route(coord_t cx, coord_t cy, coord_t dx, coord_t dy);
    if (dx > cx)      return P_EAST;
    else if (dx < cx) return P_WEST;
    else if (dy > cy) return P_NORTH;
    else if (dy < cy) return P_SOUTH;
    else              return P_LOCAL;
  endfunction

  // Input port of the neighbour reached through output port p.
  function automatic port_e opposite(port_e p);
    case (p)
      P_EAST:  return P_WEST;
      P_WEST:  return P_EAST;
      P_SOUTH: return P_NORTH;
      P_NORTH: return P_SOUTH;
      default: return P_LOCAL;
    endcase
  endfunction

  // FVADA fixed map: VC of input port 'inp' that is home to packets leaving
  // through output port 'outp'. The four non-U-turn outputs take VCs 0..3 in
  // port order; a U-turn (also the ejection side) falls back to VC 0.
  function automatic int unsigned home_vc(port_e inp, port_e outp);
    if (outp == inp)     return 0;
    else if (outp < inp) return int'(outp);
    else                 return int'(outp) - 1;
  endfunction

endpackage
