// noc_traffic: processing-element models and scoreboard for the whole mesh
// (testbench only).
//
// Source side: when 'gen_en' is high every node creates a new packet of
// PKT_LEN flits with probability rate_pm/1000 per cycle and queues it. The
// destination follows the synthetic pattern 'pattern': 0 uniform random,
// 1 bit-complement, 2 transpose, 3 tornado, 4 bit-reversal, 5 shuffle,
// 6 butterfly (node id = y*MESH_X + x; nodes whose destination is
// themselves send nothing). One packet at a time is sent per node: on the
// home VC of its first output port when that VC is free, otherwise on any
// VC with a credit, one flit per cycle while credits last.
// Sink side: every ejected flit is checked (right node, packets whole and in
// order on each VC, no packet delivered twice, payload check word) and its credit is
// returned with probability accept_pm/1000 per cycle, which lets the
// testbench throttle the sinks to create back-pressure.
// Counters: packets created, injected, delivered; total packet latency
// (creation to tail delivery); checks and errors.
module noc_traffic
  import noc_pkg::*;
#(
  parameter int MESH_X  = 8,
  parameter int MESH_Y  = 8,
  parameter int NUM_VC  = 4,
  parameter int VC_DEPTH = 5,
  parameter int PKT_LEN = 5,
  localparam int NODES  = MESH_X * MESH_Y
) (
  input  logic    clk,
  input  logic    rst_n,
  input  logic    gen_en,
  input  int      pattern,
  input  int      rate_pm,
  input  int      accept_pm,
  output flit_t   inj_flit   [NODES],
  output logic    inj_valid  [NODES],
  input  credit_t inj_credit [NODES],
  input  flit_t   ej_flit    [NODES],
  input  logic    ej_valid   [NODES],
  output credit_t ej_credit  [NODES],
  output int      created,
  output int      injected,
  output int      delivered,
  output longint  lat_sum,
  output int      checks,
  output int      errors
);
  localparam int BITS = $clog2(NODES);

  typedef struct {
    int dst;
    int seq;
    int born;
  } pkt_t;

  pkt_t q [NODES][$];
  int   cred [NODES][NUM_VC];
  int   cur_vc [NODES], cur_idx [NODES];
  pkt_t cur [NODES];
  int   seq_next [NODES];
  // sink reassembly per node and VC
  int   rx_idx [NODES][NUM_VC];
  int   rx_src [NODES][NUM_VC];
  int   rx_seq [NODES][NUM_VC];
  int   rx_pend [NODES];
  bit   got [longint];
  int   cyc;

  function automatic int dest_of(int s, int pat);
    int x, y, d;
    x = s % MESH_X;
    y = s / MESH_X;
    case (pat)
      1: d = (NODES - 1) - s;
      2: d = x * MESH_X + y;
      3: d = ((y + MESH_Y / 2 - 1) % MESH_Y) * MESH_X + (x + MESH_X / 2 - 1) % MESH_X;
      4: begin d = 0; for (int b = 0; b < BITS; b++) d |= ((s >> b) & 1) << (BITS - 1 - b); end
      5: d = ((s << 1) | (s >> (BITS - 1))) & (NODES - 1);
      6: d = (s & ~((1 << (BITS - 1)) | 1)) | (((s >> (BITS - 1)) & 1)) | ((s & 1) << (BITS - 1));
      default: begin
        d = $urandom_range(0, NODES - 2);
        if (d >= s) d++;
      end
    endcase
    return d;
  endfunction

  function automatic void err(string msg);
    errors++;
    if (errors < 20) $display("TRAFFIC ERROR %s", msg);
  endfunction

  initial begin
    created = 0; injected = 0; delivered = 0; lat_sum = 0; checks = 0; errors = 0; cyc = 0;
    for (int n = 0; n < NODES; n++) begin
      inj_valid[n] = 0; inj_flit[n] = '0; ej_credit[n] = '0;
      cur_vc[n] = -1; cur_idx[n] = 0; seq_next[n] = 0; rx_pend[n] = 0;
      for (int v = 0; v < NUM_VC; v++) begin cred[n][v] = VC_DEPTH; rx_idx[n][v] = 0; end
    end
  end

  always @(negedge clk) if (rst_n) begin
    cyc++;
    for (int n = 0; n < NODES; n++) begin
      coord_t sx, sy, dx, dy;
      // credits from the router's LOCAL input
      if (inj_credit[n].valid) cred[n][inj_credit[n].vc]++;
      // packet creation
      if (gen_en && $urandom_range(0, 999) < rate_pm) begin
        pkt_t p;
        p.dst = dest_of(n, pattern);
        if (p.dst != n) begin
          p.seq = seq_next[n]++;
          p.born = cyc;
          q[n].push_back(p);
          created++;
        end
      end
      sx = coord_t'(n % MESH_X); sy = coord_t'(n / MESH_X);
      inj_valid[n] = 0;
      // start a packet
      if (cur_vc[n] < 0 && q[n].size() != 0) begin
        int h;
        cur[n] = q[n][0];
        dx = coord_t'(cur[n].dst % MESH_X); dy = coord_t'(cur[n].dst / MESH_X);
        h = home_vc(P_LOCAL, xy_route(sx, sy, dx, dy)) % NUM_VC;
        if (cred[n][h] > 0) cur_vc[n] = h;
        else for (int v = 0; v < NUM_VC; v++) if (cur_vc[n] < 0 && cred[n][v] > 0) cur_vc[n] = v;
        if (cur_vc[n] >= 0) begin
          void'(q[n].pop_front());
          cur_idx[n] = 0;
        end
      end
      // send one flit
      if (cur_vc[n] >= 0 && cred[n][cur_vc[n]] > 0) begin
        flit_t f;
        dx = coord_t'(cur[n].dst % MESH_X); dy = coord_t'(cur[n].dst / MESH_X);
        f = '0;
        f.vc = vcid_t'(cur_vc[n]);
        f.ftype = (PKT_LEN == 1) ? FT_HEADTAIL : (cur_idx[n] == 0) ? FT_HEAD
                : (cur_idx[n] == PKT_LEN - 1) ? FT_TAIL : FT_BODY;
        f.op = xy_route(sx, sy, dx, dy);
        f.dst_x = dx; f.dst_y = dy; f.src_x = sx; f.src_y = sy;
        f.payload[7:0]   = 8'(cur_idx[n]);
        f.payload[39:8]  = 32'(cur[n].seq);
        f.payload[71:40] = 32'(cur[n].born);
        f.payload[103:72] = 32'(cur[n].seq * 7919 + n * 31 + cur_idx[n]);
        inj_flit[n] = f;
        inj_valid[n] = 1;
        cred[n][cur_vc[n]]--;
        cur_idx[n]++;
        if (cur_idx[n] == PKT_LEN) begin
          cur_vc[n] = -1;
          injected++;
        end
      end
    end
  end

  // sink: check flits, queue credits
  int cq [NODES][$];
  always @(posedge clk) if (rst_n) begin
    for (int n = 0; n < NODES; n++) begin
      if (ej_valid[n]) begin
        flit_t f;
        int v, src, idx, seq;
        f = ej_flit[n];
        v = int'(f.vc);
        src = int'(f.src_y) * MESH_X + int'(f.src_x);
        idx = int'(f.payload[7:0]);
        seq = int'(f.payload[39:8]);
        checks++;
        if (int'(f.dst_x) != n % MESH_X || int'(f.dst_y) != n / MESH_X) err($sformatf("flit for (%0d,%0d) at node %0d", f.dst_x, f.dst_y, n));
        checks++;
        if (idx != rx_idx[n][v]) err($sformatf("node %0d vc %0d flit %0d, expected %0d", n, v, idx, rx_idx[n][v]));
        checks++;
        if (f.payload[103:72] != 32'(seq * 7919 + src * 31 + idx)) err("payload corrupted");
        if (is_head(f.ftype)) begin
          rx_src[n][v] = src;
          rx_seq[n][v] = seq;
          checks++;
          if (got.exists(longint'(src) * 64'h1_0000_0000 + longint'(seq)))
            err($sformatf("node %0d: packet %0d from %0d delivered twice", n, seq, src));
          got[longint'(src) * 64'h1_0000_0000 + longint'(seq)] = 1'b1;
        end else begin
          checks++;
          if (src != rx_src[n][v] || seq != rx_seq[n][v]) err("packets interleaved in a VC");
        end
        rx_idx[n][v] = is_tail(f.ftype) ? 0 : idx + 1;
        if (is_tail(f.ftype)) begin
          delivered++;
          lat_sum += longint'(cyc - int'(f.payload[71:40]));
        end
        cq[n].push_back(v);
      end
    end
  end

  always @(negedge clk) if (rst_n) begin
    for (int n = 0; n < NODES; n++) begin
      ej_credit[n] = '0;
      if (cq[n].size() != 0 && $urandom_range(0, 999) < accept_pm) begin
        ej_credit[n].valid = 1;
        ej_credit[n].vc = vcid_t'(cq[n].pop_front());
      end
    end
  end

endmodule
