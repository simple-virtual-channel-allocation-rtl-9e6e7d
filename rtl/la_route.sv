// la_route: look-ahead routing (LA) for one flit.
//
// A head flit carries 'op', the output port it takes in the current router,
// computed one hop earlier. This unit computes the pre-route: the output port
// the packet will take in the next router, which the current router writes
// into the head flit as it leaves. It steps the current coordinates one hop
// in direction 'op' and applies dimension-ordered X-then-Y routing (DOR) from
// there. A packet that leaves through LOCAL is ejected and has no next router;
// its pre-route is LOCAL. Purely combinational. DOR is one of the two routing
// choices of the design description; the adaptive choice is not built here.
module la_route
  import noc_pkg::*;
(
  input  coord_t cur_x,
  input  coord_t cur_y,
  input  port_e  op,
  input  coord_t dst_x,
  input  coord_t dst_y,
  output port_e  pre_route
);
  coord_t nx, ny;

  always_comb begin
    nx = cur_x;
    ny = cur_y;
    case (op)
      P_EAST:  nx = cur_x + 1'b1;
      P_WEST:  nx = cur_x - 1'b1;
      P_NORTH: ny = cur_y + 1'b1;
      P_SOUTH: ny = cur_y - 1'b1;
      default: ;
    endcase
    if (op == P_LOCAL) pre_route = P_LOCAL;
    else               pre_route = xy_route(nx, ny, dst_x, dst_y);
  end

endmodule
