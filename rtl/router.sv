// router: two-stage virtual-channel mesh router with FVADA or AVADA VC
// allocation.
//
// Five ports (EAST, WEST, SOUTH, NORTH, LOCAL). Every input port has a flit
// buffer of NUM_VC VCs x VC_DEPTH flits (4 x 5 by default) and a VC control
// table. Every output port has an output unit that tracks the credits and
// reservations of the downstream input port's VCs and selects VCs for it.
//
// Pipeline of one flit:
//   stage 1  (SA+VA, with LA and BW in parallel)
//            A flit arriving on an input link is written into its VC (BW).
//            Flits at the front of the VCs that were written in earlier
//            cycles request the switch. Look-ahead routing (LA) computes each
//            front head flit's route in the next router; VC Selection in the
//            output units prepares a candidate VC for every route; a head
//            flit only requests when the candidate for its route is usable,
//            a body or tail flit only when its VC has a credit. The two-stage
//            switch allocator picks the winners (body/tail first); VC
//            Assignment hands each winning head the candidate of its route.
//            The control table pops the flit, credits are taken, and the read
//            address and crossbar setting are registered.
//   stage 2  (BR+ST)
//            The flit is read from the buffer, crosses the crossbar, gets its
//            new VC id (and, for a head, its next-router output port) written
//            into the header, and is registered on the output link (LT). The
//            credit for the freed slot goes upstream from a register in the
//            same cycle.
// A flit therefore leaves on the output link three clock edges after it
// appeared on the input link when nothing blocks it. Placing BW in the cycle
// before SA for the same flit is this design's choice; the design
// description puts BW, LA and SA+VA in one stage without saying how a flit
// arriving into an empty VC is handled.
//
// Interface per port p: 'in_flit[p]'/'in_valid[p]' from the upstream router
// (the flit's 'vc' field names the VC to write, its 'op' the output port
// here), 'credit_out[p]' back to it; 'out_flit[p]'/'out_valid[p]' to the
// downstream router and 'credit_in[p]' from it. The local PE uses port LOCAL
// in the same way. Ports on the mesh edge are tied off by the mesh.
// Routing is dimension-ordered (X then Y). MY_X/MY_Y are this router's mesh
// coordinates (EAST is +x, NORTH is +y).
module router
  import noc_pkg::*;
#(
  parameter int unsigned NUM_VC    = 4,
  parameter int unsigned VC_DEPTH  = 5,
  parameter va_scheme_e  VA_SCHEME = VA_FVADA,
  parameter int unsigned MY_X      = 0,
  parameter int unsigned MY_Y      = 0,
  localparam int unsigned AW       = $clog2(NUM_VC * VC_DEPTH),
  localparam int unsigned CW       = $clog2(VC_DEPTH + 1)
) (
  input  logic    clk,
  input  logic    rst_n,
  input  flit_t   in_flit    [NUM_PORTS],
  input  logic    in_valid   [NUM_PORTS],
  output credit_t credit_out [NUM_PORTS],
  output flit_t   out_flit   [NUM_PORTS],
  output logic    out_valid  [NUM_PORTS],
  input  credit_t credit_in  [NUM_PORTS]
);
  localparam coord_t CX = coord_t'(MY_X);
  localparam coord_t CY = coord_t'(MY_Y);

  // ---------------- input side ----------------
  logic [AW-1:0]     wr_addr     [NUM_PORTS];
  logic [AW-1:0]     rd_addr     [NUM_PORTS];
  logic [NUM_VC-1:0] vc_nonempty [NUM_PORTS];
  logic [NUM_VC-1:0] vc_active   [NUM_PORTS];
  vcid_t             vc_ovc      [NUM_PORTS][NUM_VC];
  flit_type_e        front_type  [NUM_PORTS][NUM_VC];
  port_e             front_op    [NUM_PORTS][NUM_VC];
  coord_t            front_dx    [NUM_PORTS][NUM_VC];
  coord_t            front_dy    [NUM_PORTS][NUM_VC];
  logic [CW-1:0]     vc_count    [NUM_PORTS][NUM_VC];
  vc_status_e        vc_status   [NUM_PORTS][NUM_VC];
  port_e             pre_route   [NUM_PORTS][NUM_VC];
  flit_t             buf_rdata   [NUM_PORTS];

  // SA / VA signals
  logic [NUM_VC-1:0] sa_req      [NUM_PORTS];
  logic [NUM_VC-1:0] sa_prio     [NUM_PORTS];
  logic              in_gnt      [NUM_PORTS];
  vcid_t             in_gnt_vc   [NUM_PORTS];
  logic              out_gnt     [NUM_PORTS];
  logic [2:0]        out_gnt_in  [NUM_PORTS];
  logic              cand_ok     [NUM_PORTS][NUM_PORTS];
  logic [NUM_VC-1:0] credit_ok   [NUM_PORTS];
  vcid_t             out_vc      [NUM_PORTS];
  logic              og_head     [NUM_PORTS];
  logic              og_tail     [NUM_PORTS];
  port_e             og_dir      [NUM_PORTS];
  vcid_t             og_vc       [NUM_PORTS];

  // stage-2 registers
  logic [AW-1:0]     br_addr     [NUM_PORTS];
  logic              st_valid    [NUM_PORTS];
  logic [2:0]        st_in       [NUM_PORTS];
  vcid_t             st_vc       [NUM_PORTS];
  logic              st_head     [NUM_PORTS];
  port_e             st_op       [NUM_PORTS];
  flit_t             xbar_out    [NUM_PORTS];

  for (genvar p = 0; p < NUM_PORTS; p++) begin : g_inp
    flit_sram #(.NUM_VC(NUM_VC), .VC_DEPTH(VC_DEPTH)) u_buf (
      .clk   (clk),
      .we    (in_valid[p]),
      .waddr (wr_addr[p]),
      .wdata (in_flit[p]),
      .raddr (br_addr[p]),
      .rdata (buf_rdata[p])
    );

    vc_control_table #(.NUM_VC(NUM_VC), .VC_DEPTH(VC_DEPTH)) u_tbl (
      .clk         (clk),
      .rst_n       (rst_n),
      .wr_valid    (in_valid[p]),
      .wr_flit     (in_flit[p]),
      .wr_addr     (wr_addr[p]),
      .rd_valid    (in_gnt[p]),
      .rd_vc       (in_gnt_vc[p]),
      .rd_ovc      (out_vc[front_op[p][in_gnt_vc[p]]]),
      .rd_addr     (rd_addr[p]),
      .vc_nonempty (vc_nonempty[p]),
      .vc_active   (vc_active[p]),
      .vc_ovc      (vc_ovc[p]),
      .front_type  (front_type[p]),
      .front_op    (front_op[p]),
      .front_dx    (front_dx[p]),
      .front_dy    (front_dy[p]),
      .vc_count    (vc_count[p]),
      .status      (vc_status[p]),
      .credit_out  (credit_out[p])
    );

    for (genvar v = 0; v < NUM_VC; v++) begin : g_vc
      la_route u_la (
        .cur_x     (CX),
        .cur_y     (CY),
        .op        (front_op[p][v]),
        .dst_x     (front_dx[p][v]),
        .dst_y     (front_dy[p][v]),
        .pre_route (pre_route[p][v])
      );

      // switch request of the flit at the front of VC v
      always_comb begin
        port_e o;
        o = front_op[p][v];
        if (!vc_nonempty[p][v])
          sa_req[p][v] = 1'b0;
        else if (is_head(front_type[p][v]))
          sa_req[p][v] = cand_ok[o][pre_route[p][v]];
        else
          sa_req[p][v] = credit_ok[o][vc_ovc[p][v]];
        sa_prio[p][v] = vc_nonempty[p][v] && !is_head(front_type[p][v]);
      end
    end
  end

  switch_allocator #(.NUM_VC(NUM_VC)) u_sa (
    .clk        (clk),
    .rst_n      (rst_n),
    .req        (sa_req),
    .prio       (sa_prio),
    .req_port   (front_op),
    .in_gnt     (in_gnt),
    .in_gnt_vc  (in_gnt_vc),
    .out_gnt    (out_gnt),
    .out_gnt_in (out_gnt_in)
  );

  // ---------------- output side ----------------
  for (genvar o = 0; o < NUM_PORTS; o++) begin : g_out
    always_comb begin
      og_head[o] = 1'b0;
      og_tail[o] = 1'b0;
      og_dir[o]  = P_LOCAL;
      og_vc[o]   = '0;
      for (int i = 0; i < NUM_PORTS; i++) begin
        if (int'(out_gnt_in[o]) == i) begin
          og_head[o] = is_head(front_type[i][in_gnt_vc[i]]);
          og_tail[o] = is_tail(front_type[i][in_gnt_vc[i]]);
          og_dir[o]  = pre_route[i][in_gnt_vc[i]];
          og_vc[o]   = vc_ovc[i][in_gnt_vc[i]];
        end
      end
    end

    output_unit #(
      .NUM_VC    (NUM_VC),
      .VC_DEPTH  (VC_DEPTH),
      .DOWN_PORT (opposite(port_e'(o))),
      .VA_SCHEME (VA_SCHEME)
    ) u_ou (
      .clk       (clk),
      .rst_n     (rst_n),
      .gnt_valid (out_gnt[o]),
      .gnt_head  (og_head[o]),
      .gnt_tail  (og_tail[o]),
      .gnt_dir   (og_dir[o]),
      .gnt_vc    (og_vc[o]),
      .out_vc    (out_vc[o]),
      .credit_in (credit_in[o]),
      .cand_ok   (cand_ok[o]),
      .credit_ok (credit_ok[o]),
      .credits   ()
    );
  end

  // stage-1 -> stage-2 registers
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int p = 0; p < NUM_PORTS; p++) begin
        br_addr[p]  <= '0;
        st_valid[p] <= 1'b0;
        st_in[p]    <= '0;
        st_vc[p]    <= '0;
        st_head[p]  <= 1'b0;
        st_op[p]    <= P_LOCAL;
      end
    end else begin
      for (int p = 0; p < NUM_PORTS; p++) begin
        if (in_gnt[p]) br_addr[p] <= rd_addr[p];
        st_valid[p] <= out_gnt[p];
        st_in[p]    <= out_gnt_in[p];
        st_vc[p]    <= out_vc[p];
        st_head[p]  <= og_head[p];
        st_op[p]    <= og_dir[p];
      end
    end
  end

  // ---------------- stage 2: BR + ST ----------------
  crossbar u_xbar (
    .in_flit   (buf_rdata),
    .sel       (st_in),
    .sel_valid (st_valid),
    .out_flit  (xbar_out)
  );

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int o = 0; o < NUM_PORTS; o++) begin
        out_valid[o] <= 1'b0;
        out_flit[o]  <= '0;
      end
    end else begin
      for (int o = 0; o < NUM_PORTS; o++) begin
        flit_t f;
        f    = xbar_out[o];
        f.vc = st_vc[o];
        if (st_head[o]) f.op = st_op[o];
        out_valid[o] <= st_valid[o];
        out_flit[o]  <= f;
      end
    end
  end

endmodule
