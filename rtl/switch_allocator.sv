// switch_allocator: two-stage separable switch allocation (SA) with the
// body/tail-first priority rule.
//
// Stage 1 (local): in every input port a NUM_VC:1 round-robin arbiter picks
// one of the VCs that request the switch. Stage 2 (global): for every output
// port a NUM_PORTS:1 round-robin arbiter picks one of the local winners that
// want it. In both stages requests from body and tail flits ('prio') win over
// requests from head flits: only when no prioritised request is present do
// the heads compete, so a packet that already holds a VC moves on and frees
// it quickly. The stage-1 pointer of a port moves only when its local winner
// also wins stage 2; stage-2 pointers move on every grant. The design
// description states the priority for VC allocation and SA in general; using
// it in both stages is this design's reading.
//
// A request means the flit at the front of that VC may leave now: the caller
// has already checked credits and, for head flits, that VC selection offers
// a usable VC. Combinational grants from registered pointers.
module switch_allocator
  import noc_pkg::*;
#(
  parameter int unsigned NUM_VC = 4
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic [NUM_VC-1:0] req      [NUM_PORTS],
  input  logic [NUM_VC-1:0] prio     [NUM_PORTS],
  input  port_e             req_port [NUM_PORTS][NUM_VC],
  // per input port
  output logic              in_gnt     [NUM_PORTS],
  output vcid_t             in_gnt_vc  [NUM_PORTS],
  // per output port
  output logic              out_gnt    [NUM_PORTS],
  output logic [2:0]        out_gnt_in [NUM_PORTS]
);
  localparam int unsigned VW = (NUM_VC > 1) ? $clog2(NUM_VC) : 1;

  logic [NUM_VC-1:0]    s1_req  [NUM_PORTS];
  logic [NUM_VC-1:0]    s1_gnt  [NUM_PORTS];
  logic [VW-1:0]        s1_idx  [NUM_PORTS];
  logic                 s1_val  [NUM_PORTS];
  port_e                lw_port [NUM_PORTS];
  logic                 lw_prio [NUM_PORTS];
  logic [NUM_PORTS-1:0] s2_req  [NUM_PORTS];
  logic [NUM_PORTS-1:0] s2_gnt  [NUM_PORTS];
  logic [2:0]           s2_idx  [NUM_PORTS];
  logic                 s2_val  [NUM_PORTS];

  for (genvar i = 0; i < NUM_PORTS; i++) begin : g_in
    always_comb begin
      logic [NUM_VC-1:0] p;
      p = req[i] & prio[i];
      s1_req[i] = (p != '0) ? p : req[i];
    end

    rr_arbiter #(.N(NUM_VC)) u_local (
      .clk       (clk),
      .rst_n     (rst_n),
      .req       (s1_req[i]),
      .advance   (in_gnt[i]),
      .gnt       (s1_gnt[i]),
      .gnt_idx   (s1_idx[i]),
      .gnt_valid (s1_val[i])
    );

    assign lw_port[i] = req_port[i][s1_idx[i]];
    assign lw_prio[i] = prio[i][s1_idx[i]];
  end

  for (genvar o = 0; o < NUM_PORTS; o++) begin : g_out
    always_comb begin
      logic [NUM_PORTS-1:0] r, p;
      for (int i = 0; i < NUM_PORTS; i++) begin
        r[i] = s1_val[i] && (lw_port[i] == port_e'(o));
        p[i] = r[i] && lw_prio[i];
      end
      s2_req[o] = (p != '0) ? p : r;
    end

    rr_arbiter #(.N(NUM_PORTS)) u_global (
      .clk       (clk),
      .rst_n     (rst_n),
      .req       (s2_req[o]),
      .advance   (1'b1),
      .gnt       (s2_gnt[o]),
      .gnt_idx   (s2_idx[o]),
      .gnt_valid (s2_val[o])
    );

    assign out_gnt[o]    = s2_val[o];
    assign out_gnt_in[o] = s2_idx[o];
  end

  always_comb begin
    for (int i = 0; i < NUM_PORTS; i++) begin
      in_gnt[i]    = s1_val[i] && s2_gnt[lw_port[i]][i];
      in_gnt_vc[i] = vcid_t'(s1_idx[i]);
    end
  end

  // a grant always goes to a VC that asked for the switch
  for (genvar i = 0; i < NUM_PORTS; i++) begin : g_chk
    a_gnt_requested: assert property (@(posedge clk) disable iff (!rst_n)
      in_gnt[i] |-> req[i][in_gnt_vc[i]]);
  end

endmodule
