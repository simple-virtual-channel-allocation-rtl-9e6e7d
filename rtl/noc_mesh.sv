// noc_mesh: MESH_X x MESH_Y mesh network of two-stage FVADA/AVADA routers
// (8 x 8 by default, the network evaluated in the design description).
//
// Router (x, y) sits at index n = y * MESH_X + x. Its EAST port is linked to
// the WEST port of router (x+1, y) and its NORTH port to the SOUTH port of
// router (x, y+1); every link carries flits one way and credits the other.
// Ports on the mesh edge receive nothing and get no credits back;
// dimension-ordered routing never sends a flit there. The LOCAL port of every
// router is brought out for its processing element (PE):
//   inj_flit[n]/inj_valid[n]  flit from the PE into router n. The PE keeps
//                             per-VC credits from inj_credit[n], writes the
//                             VC id into the flit and, in a head flit, the
//                             output port at router n (noc_pkg::xy_route).
//   ej_flit[n]/ej_valid[n]    flit delivered to PE n; the PE returns one
//                             credit per flit on ej_credit[n] when it has
//                             consumed it (NUM_VC x VC_DEPTH slots).
// All routers share clk and an asynchronous active-low reset.
module noc_mesh
  import noc_pkg::*;
#(
  parameter int unsigned MESH_X    = 8,
  parameter int unsigned MESH_Y    = 8,
  parameter int unsigned NUM_VC    = 4,
  parameter int unsigned VC_DEPTH  = 5,
  parameter va_scheme_e  VA_SCHEME = VA_FVADA,
  localparam int unsigned NODES    = MESH_X * MESH_Y
) (
  input  logic    clk,
  input  logic    rst_n,
  input  flit_t   inj_flit   [NODES],
  input  logic    inj_valid  [NODES],
  output credit_t inj_credit [NODES],
  output flit_t   ej_flit    [NODES],
  output logic    ej_valid   [NODES],
  input  credit_t ej_credit  [NODES]
);
  flit_t   r_in_flit   [NODES][NUM_PORTS];
  logic    r_in_valid  [NODES][NUM_PORTS];
  credit_t r_cred_out  [NODES][NUM_PORTS];
  flit_t   r_out_flit  [NODES][NUM_PORTS];
  logic    r_out_valid [NODES][NUM_PORTS];
  credit_t r_cred_in   [NODES][NUM_PORTS];

  for (genvar y = 0; y < MESH_Y; y++) begin : g_y
    for (genvar x = 0; x < MESH_X; x++) begin : g_x
      localparam int N  = y * MESH_X + x;
      localparam int NE = y * MESH_X + x + 1;
      localparam int NW = y * MESH_X + x - 1;
      localparam int NN = (y + 1) * MESH_X + x;
      localparam int NS = (y - 1) * MESH_X + x;

      router #(
        .NUM_VC    (NUM_VC),
        .VC_DEPTH  (VC_DEPTH),
        .VA_SCHEME (VA_SCHEME),
        .MY_X      (x),
        .MY_Y      (y)
      ) u_router (
        .clk        (clk),
        .rst_n      (rst_n),
        .in_flit    (r_in_flit[N]),
        .in_valid   (r_in_valid[N]),
        .credit_out (r_cred_out[N]),
        .out_flit   (r_out_flit[N]),
        .out_valid  (r_out_valid[N]),
        .credit_in  (r_cred_in[N])
      );

      // LOCAL port
      assign r_in_flit[N][P_LOCAL]  = inj_flit[N];
      assign r_in_valid[N][P_LOCAL] = inj_valid[N];
      assign inj_credit[N]          = r_cred_out[N][P_LOCAL];
      assign ej_flit[N]             = r_out_flit[N][P_LOCAL];
      assign ej_valid[N]            = r_out_valid[N][P_LOCAL];
      assign r_cred_in[N][P_LOCAL]  = ej_credit[N];

      // input from the east neighbour, credits back from it
      if (x < MESH_X - 1) begin : g_e
        assign r_in_flit[N][P_EAST]  = r_out_flit[NE][P_WEST];
        assign r_in_valid[N][P_EAST] = r_out_valid[NE][P_WEST];
        assign r_cred_in[N][P_EAST]  = r_cred_out[NE][P_WEST];
      end else begin : g_e_edge
        assign r_in_flit[N][P_EAST]  = '0;
        assign r_in_valid[N][P_EAST] = 1'b0;
        assign r_cred_in[N][P_EAST]  = '0;
      end

      if (x > 0) begin : g_w
        assign r_in_flit[N][P_WEST]  = r_out_flit[NW][P_EAST];
        assign r_in_valid[N][P_WEST] = r_out_valid[NW][P_EAST];
        assign r_cred_in[N][P_WEST]  = r_cred_out[NW][P_EAST];
      end else begin : g_w_edge
        assign r_in_flit[N][P_WEST]  = '0;
        assign r_in_valid[N][P_WEST] = 1'b0;
        assign r_cred_in[N][P_WEST]  = '0;
      end

      if (y < MESH_Y - 1) begin : g_n
        assign r_in_flit[N][P_NORTH]  = r_out_flit[NN][P_SOUTH];
        assign r_in_valid[N][P_NORTH] = r_out_valid[NN][P_SOUTH];
        assign r_cred_in[N][P_NORTH]  = r_cred_out[NN][P_SOUTH];
      end else begin : g_n_edge
        assign r_in_flit[N][P_NORTH]  = '0;
        assign r_in_valid[N][P_NORTH] = 1'b0;
        assign r_cred_in[N][P_NORTH]  = '0;
      end

      if (y > 0) begin : g_s
        assign r_in_flit[N][P_SOUTH]  = r_out_flit[NS][P_NORTH];
        assign r_in_valid[N][P_SOUTH] = r_out_valid[NS][P_NORTH];
        assign r_cred_in[N][P_SOUTH]  = r_cred_out[NS][P_NORTH];
      end else begin : g_s_edge
        assign r_in_flit[N][P_SOUTH]  = '0;
        assign r_in_valid[N][P_SOUTH] = 1'b0;
        assign r_cred_in[N][P_SOUTH]  = '0;
      end
    end
  end

endmodule
