// output_unit: state of the VCs of the downstream input port reached through
// one output port, and the VC allocation logic for that port.
//
// For each downstream VC it keeps a credit counter (free slots, credit-based
// flow control: decremented when a flit is granted the switch towards it,
// incremented when the downstream router returns a credit) and a 'reserved'
// bit (a head flit was assigned the VC and its tail has not been sent yet;
// no other packet may enter the VC before that tail, so that packets do not
// interleave, but whole packets may queue one behind the other in a VC). The
// VC Selection logic, FVADA or AVADA by the VA_SCHEME parameter, prepares one
// candidate VC per direction of the next router; AVADA adds the CAM mapping
// table and the free-VC queue. The VC Assignment multiplexer picks the
// candidate for the granted head flit's pre-route.
//
// Timing: selection and 'cand_ok' are combinational from the registered
// state, so the switch allocator can mask head flits whose candidate is not
// usable. The grant ('gnt_*') arrives in the same cycle; 'out_vc' is the VC
// written into the departing flit (the assigned one for a head, the held
// 'gnt_vc' for body and tail). State updates at the clock edge. A credit
// arriving in the same cycle as a grant on the same VC cancels out. An AVADA
// mapping returns to NULL when its VC holds all its credits and is not
// reserved (it is empty downstream).
module output_unit
  import noc_pkg::*;
#(
  parameter int unsigned NUM_VC    = 4,
  parameter int unsigned VC_DEPTH  = 5,
  parameter port_e       DOWN_PORT = P_WEST,
  parameter va_scheme_e  VA_SCHEME = VA_FVADA,
  localparam int unsigned CRW      = $clog2(VC_DEPTH + 1)
) (
  input  logic              clk,
  input  logic              rst_n,
  // switch grant for this output
  input  logic              gnt_valid,
  input  logic              gnt_head,
  input  logic              gnt_tail,
  input  port_e             gnt_dir,
  input  vcid_t             gnt_vc,
  output vcid_t             out_vc,
  // credit returned by the downstream router
  input  credit_t           credit_in,
  // to the switch allocator
  output logic              cand_ok   [NUM_PORTS],
  output logic [NUM_VC-1:0] credit_ok,
  output logic [CRW-1:0]    credits   [NUM_VC]
);
  logic [CRW-1:0]    cred [NUM_VC];
  logic [NUM_VC-1:0] reserved;
  logic [NUM_VC-1:0] avail;
  vcid_t             cand_vc [NUM_PORTS];
  vcid_t             asg_vc;
  logic              asg_ok;
  logic              take;

  always_comb begin
    for (int v = 0; v < NUM_VC; v++) begin
      credit_ok[v] = (cred[v] != '0);
      avail[v]     = !reserved[v] && (cred[v] != '0);
      credits[v]   = cred[v];
    end
  end

  if (VA_SCHEME == VA_FVADA) begin : g_fvada
    vc_select_fvada #(.NUM_VC(NUM_VC), .DOWN_PORT(DOWN_PORT)) u_sel (
      .avail   (avail),
      .cand_vc (cand_vc),
      .cand_ok (cand_ok)
    );
  end else begin : g_avada
    logic [NUM_VC-1:0] hit [NUM_PORTS];
    logic [NUM_VC-1:0] unmapped;
    logic [NUM_VC-1:0] clear;
    logic              cand_new [NUM_PORTS];
    logic              fifo_valid;
    vcid_t             fifo_vc;

    always_comb begin
      for (int v = 0; v < NUM_VC; v++)
        clear[v] = !reserved[v] && (int'(cred[v]) == VC_DEPTH);
    end

    vc_mapping_table #(.NUM_VC(NUM_VC)) u_map (
      .clk       (clk),
      .rst_n     (rst_n),
      .set_valid (take && unmapped[asg_vc]),
      .set_vc    (asg_vc),
      .set_dir   (gnt_dir),
      .clear     (clear),
      .hit       (hit),
      .unmapped  (unmapped)
    );

    free_vc_queue #(.NUM_VC(NUM_VC)) u_fifo (
      .clk           (clk),
      .rst_n         (rst_n),
      .take_valid    (take),
      .take_vc       (asg_vc),
      .release_valid (gnt_valid && gnt_tail),
      .release_vc    (out_vc),
      .head_valid    (fifo_valid),
      .head_vc       (fifo_vc),
      .count         ()
    );

    vc_select_avada #(.NUM_VC(NUM_VC)) u_sel (
      .avail       (avail),
      .hit         (hit),
      .unmapped    (unmapped),
      .vfifo_valid (fifo_valid),
      .vfifo       (fifo_vc),
      .cand_vc     (cand_vc),
      .cand_ok     (cand_ok),
      .cand_new    (cand_new)
    );
  end

  vc_assign u_asg (
    .cand_vc (cand_vc),
    .cand_ok (cand_ok),
    .dir     (gnt_dir),
    .vc      (asg_vc),
    .ok      (asg_ok)
  );

  assign take   = gnt_valid && gnt_head;
  assign out_vc = gnt_head ? asg_vc : gnt_vc;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int v = 0; v < NUM_VC; v++) cred[v] <= CRW'(VC_DEPTH);
      reserved <= '0;
    end else begin
      for (int v = 0; v < NUM_VC; v++) begin
        logic dec, inc;
        dec = gnt_valid && (int'(out_vc) == v);
        inc = credit_in.valid && (int'(credit_in.vc) == v);
        cred[v] <= cred[v] - CRW'(dec) + CRW'(inc);
        if (dec && gnt_head && !gnt_tail) reserved[v] <= 1'b1;
        else if (dec && gnt_tail)         reserved[v] <= 1'b0;
      end
    end
  end

  // A head is only granted when its VC is usable, and no flit is sent
  // without a credit.
  a_head_has_vc: assert property (@(posedge clk) disable iff (!rst_n)
    take |-> asg_ok);
  a_has_credit: assert property (@(posedge clk) disable iff (!rst_n)
    gnt_valid |-> credit_ok[out_vc]);
  a_credit_bound: assert property (@(posedge clk) disable iff (!rst_n)
    credit_in.valid |-> int'(cred[credit_in.vc]) < VC_DEPTH
                        || (gnt_valid && out_vc == credit_in.vc));

endmodule
