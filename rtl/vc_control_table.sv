// vc_control_table: control state of the virtual channels of one input port.
//
// For every VC it keeps the write pointer (WP), read pointer (RP) and flit
// count of its slice of the flit buffer, the output VC (OVC) assigned to the
// packet that is currently leaving, and an 'active' bit that is set when that
// packet's head has won switch allocation and cleared when its tail does.
// Because a VC is a FIFO that may hold several whole packets one behind the
// other, the per-flit header fields the allocator needs (flit type, output
// port OP, destination) are kept here for every slot, so that the fields of
// the flit at the front of each VC are visible without reading the flit
// buffer. Only head flits carry a valid OP: the OP of a head is latched per
// VC when the head leaves, and body and tail flits of that packet are steered
// by the latched value. The Status field of the table is derived: IDLE (empty), VA (a head
// at the front waits for a VC and the switch) or ACTIVE (a packet holds an
// OVC; its body and tail flits only need the switch). The Pre-route field is
// produced combinationally by the look-ahead routing unit of the router.
//
// Write side (BW): 'wr_valid' writes the arriving flit into VC 'wr_flit.vc'
// at WP; 'wr_addr' is the flit-buffer word for it. Read side: 'rd_valid'
// (the switch allocation grant of this port) pops the front flit of 'rd_vc';
// 'rd_addr' is its buffer word, 'rd_ovc' the VC assigned to a head. The
// credit for the popped slot is sent upstream from a register one cycle
// later, while the flit is read out and crosses the switch. Full and empty
// detection uses a counter instead of comparing RP with WP (the text uses
// the pointer comparison plus the last operation), which gives the same
// answer.
module vc_control_table
  import noc_pkg::*;
#(
  parameter int unsigned NUM_VC   = 4,
  parameter int unsigned VC_DEPTH = 5,
  localparam int unsigned AW      = $clog2(NUM_VC * VC_DEPTH),
  localparam int unsigned PW      = (VC_DEPTH > 1) ? $clog2(VC_DEPTH) : 1,
  localparam int unsigned CW      = $clog2(VC_DEPTH + 1)
) (
  input  logic              clk,
  input  logic              rst_n,
  // buffer write
  input  logic              wr_valid,
  input  flit_t             wr_flit,
  output logic [AW-1:0]     wr_addr,
  // buffer read / switch grant
  input  logic              rd_valid,
  input  vcid_t             rd_vc,
  input  vcid_t             rd_ovc,
  output logic [AW-1:0]     rd_addr,
  // state of each VC
  output logic [NUM_VC-1:0] vc_nonempty,
  output logic [NUM_VC-1:0] vc_active,
  output vcid_t             vc_ovc     [NUM_VC],
  output flit_type_e        front_type [NUM_VC],
  output port_e             front_op   [NUM_VC],
  output coord_t            front_dx   [NUM_VC],
  output coord_t            front_dy   [NUM_VC],
  output logic [CW-1:0]     vc_count   [NUM_VC],
  output vc_status_e        status     [NUM_VC],
  // credit to the upstream router
  output credit_t           credit_out
);

  logic [PW-1:0] wp  [NUM_VC];
  logic [PW-1:0] rp  [NUM_VC];
  logic [CW-1:0] cnt [NUM_VC];
  vcid_t         ovc [NUM_VC];
  port_e         pkt_op [NUM_VC];
  logic [NUM_VC-1:0] active;

  flit_type_e    m_type [NUM_VC][VC_DEPTH];
  port_e         m_op   [NUM_VC][VC_DEPTH];
  coord_t        m_dx   [NUM_VC][VC_DEPTH];
  coord_t        m_dy   [NUM_VC][VC_DEPTH];


  function automatic logic [PW-1:0] incr(logic [PW-1:0] p);
    return (int'(p) == VC_DEPTH - 1) ? '0 : p + 1'b1;
  endfunction

  assign wr_addr = AW'(int'(wr_flit.vc) * VC_DEPTH + int'(wp[wr_flit.vc]));
  assign rd_addr = AW'(int'(rd_vc) * VC_DEPTH + int'(rp[rd_vc]));

  always_comb begin
    for (int v = 0; v < NUM_VC; v++) begin
      vc_nonempty[v] = (cnt[v] != '0);
      vc_active[v]   = active[v];
      vc_ovc[v]      = ovc[v];
      vc_count[v]    = cnt[v];
      front_type[v]  = m_type[v][rp[v]];
      front_op[v]    = is_head(m_type[v][rp[v]]) ? m_op[v][rp[v]] : pkt_op[v];
      front_dx[v]    = m_dx[v][rp[v]];
      front_dy[v]    = m_dy[v][rp[v]];
      if (active[v])         status[v] = VC_ACTIVE;
      else if (cnt[v] != '0) status[v] = VC_VA;
      else                   status[v] = VC_IDLE;
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int v = 0; v < NUM_VC; v++) begin
        wp[v]  <= '0;
        rp[v]  <= '0;
        cnt[v] <= '0;
        ovc[v] <= '0;
        pkt_op[v] <= P_LOCAL;
      end
      active     <= '0;
      credit_out <= '0;
    end else begin
      for (int v = 0; v < NUM_VC; v++) begin
        logic w, r;
        w = wr_valid && (int'(wr_flit.vc) == v);
        r = rd_valid && (int'(rd_vc) == v);
        if (w) wp[v] <= incr(wp[v]);
        if (r) begin
          rp[v] <= incr(rp[v]);
          if (is_head(front_type[v])) begin
            ovc[v]    <= rd_ovc;
            pkt_op[v] <= front_op[v];
            active[v] <= !is_tail(front_type[v]);
          end else if (is_tail(front_type[v])) begin
            active[v] <= 1'b0;
          end
        end
        cnt[v] <= cnt[v] + CW'(w) - CW'(r);
      end
      credit_out.valid <= rd_valid;
      credit_out.vc    <= rd_vc;
    end
  end

  // per-slot header fields, written with the flit
  always_ff @(posedge clk) begin
    if (wr_valid) begin
      m_type[wr_flit.vc][wp[wr_flit.vc]] <= wr_flit.ftype;
      m_op  [wr_flit.vc][wp[wr_flit.vc]] <= wr_flit.op;
      m_dx  [wr_flit.vc][wp[wr_flit.vc]] <= wr_flit.dst_x;
      m_dy  [wr_flit.vc][wp[wr_flit.vc]] <= wr_flit.dst_y;
    end
  end

  // Flow-control rules: credits keep writes out of full VCs and the
  // allocator only reads VCs that hold a flit.
  a_no_overflow: assert property (@(posedge clk) disable iff (!rst_n)
    wr_valid |-> (int'(wr_flit.vc) < NUM_VC) && (int'(cnt[wr_flit.vc]) < VC_DEPTH
                  || (rd_valid && rd_vc == wr_flit.vc)));
  a_no_underflow: assert property (@(posedge clk) disable iff (!rst_n)
    rd_valid |-> vc_nonempty[rd_vc]);

endmodule
