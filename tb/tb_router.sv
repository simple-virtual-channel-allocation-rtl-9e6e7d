// tb_router: one FVADA router at (1,1) of a 3x3 neighbourhood. Every input
// port is fed by an upstream model that keeps credits per VC and sends
// five-flit packets (random destinations reachable from that side) on a
// free VC; every output port has a downstream model that returns credits
// after a random delay. Checks: each flit leaves through the port given by
// X-then-Y routing, packets stay whole and in order on each output VC, the
// head carries the right next-router port, the payload is intact, a lone
// head crosses the router in exactly 3 cycles (BW, SA+VA, BR+ST), and every
// packet is delivered. Also counted: heads that waited for a VC, body/tail
// flits that waited for a credit.
module tb_router;
  import noc_pkg::*;
  localparam int NV = 4, D = 5, PL = 5, PKTS = 40;
  logic clk = 0, rst_n = 0;
  flit_t   in_flit [NUM_PORTS], out_flit [NUM_PORTS];
  logic    in_valid [NUM_PORTS], out_valid [NUM_PORTS];
  credit_t credit_out [NUM_PORTS], credit_in [NUM_PORTS];
  int checks = 0, failures = 0, cyc = 0;

  router #(.NUM_VC(NV), .VC_DEPTH(D), .VA_SCHEME(VA_FVADA), .MY_X(1), .MY_Y(1)) dut (.*);

  always #5 clk = ~clk;
  always @(posedge clk) cyc <= cyc + 1;

  initial begin
    #200000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(bit c, string msg);
    checks++;
    if (!c) begin
      failures++;
      if (failures < 20) $display("FAIL %s", msg);
    end
  endtask

  // upstream state per input port
  int up_cred [NUM_PORTS][NV];
  int up_vc [NUM_PORTS], up_idx [NUM_PORTS], up_sent [NUM_PORTS];
  int up_dx [NUM_PORTS], up_dy [NUM_PORTS];
  // downstream state per output port
  int dn_exp_idx [NUM_PORTS][NV];
  int dn_src [NUM_PORTS][NV];
  int dn_pend [NUM_PORTS][$];
  int delivered = 0, head_wait = 0, credit_wait = 0;
  int first_in = -1, first_out = -1;

  // choose a destination in the 3x3 block that a packet arriving on port p
  // may have under X-then-Y routing
  task automatic pick_dst(int p, output int dx, output int dy);
    do begin
      dx = $urandom_range(0, 2);
      dy = $urandom_range(0, 2);
    end while ((p == int'(P_EAST) && dx > 1) || (p == int'(P_WEST) && dx < 1) ||
               (p == int'(P_NORTH) && (dx != 1 || dy > 1)) ||
               (p == int'(P_SOUTH) && (dx != 1 || dy < 1)));
  endtask

  initial begin
    for (int p = 0; p < NUM_PORTS; p++) begin
      in_valid[p] = 0; in_flit[p] = '0; credit_in[p] = '0;
      up_vc[p] = -1; up_idx[p] = 0; up_sent[p] = 0;
      for (int v = 0; v < NV; v++) begin up_cred[p][v] = D; dn_exp_idx[p][v] = 0; end
    end
    repeat (2) @(posedge clk);
    rst_n = 1;
    // phase 1: one lone packet from WEST to EAST for the latency check
    @(negedge clk);
    in_flit[P_WEST] = '0;
    in_flit[P_WEST].ftype = FT_HEADTAIL;
    in_flit[P_WEST].op = P_EAST;
    in_flit[P_WEST].dst_x = 2; in_flit[P_WEST].dst_y = 1;
    in_valid[P_WEST] = 1;
    first_in = cyc;
    @(negedge clk);
    in_valid[P_WEST] = 0;
    repeat (6) @(negedge clk);
    check(first_out - first_in == 3, $sformatf("lone flit latency %0d cycles, expected 3", first_out - first_in));
    // phase 2: all ports at full load
    while (delivered < 1 + PKTS * NUM_PORTS && cyc < 15000) begin
      @(negedge clk);
      for (int p = 0; p < NUM_PORTS; p++) begin
        in_valid[p] = 0;
        if (credit_out[p].valid) up_cred[p][credit_out[p].vc]++;
        if (up_vc[p] < 0 && up_sent[p] < PKTS) begin
          // a VC that holds no unfinished packet of ours and has a credit
          int start;
          start = $urandom_range(0, NV - 1);
          for (int k = 0; k < NV; k++)
            if (up_vc[p] < 0 && up_cred[p][(start + k) % NV] > 0) up_vc[p] = (start + k) % NV;
          if (up_vc[p] >= 0) begin
            up_idx[p] = 0;
            pick_dst(p, up_dx[p], up_dy[p]);
          end
        end
        if (up_vc[p] >= 0 && up_cred[p][up_vc[p]] > 0 && $urandom_range(0, 3) != 0) begin
          flit_t f;
          f = flit_t'({$urandom, $urandom, $urandom, $urandom});
          f.vc = vcid_t'(up_vc[p]);
          f.ftype = (up_idx[p] == 0) ? FT_HEAD : (up_idx[p] == PL - 1) ? FT_TAIL : FT_BODY;
          f.op = xy_route(1, 1, coord_t'(up_dx[p]), coord_t'(up_dy[p]));
          f.dst_x = coord_t'(up_dx[p]); f.dst_y = coord_t'(up_dy[p]);
          f.src_x = coord_t'(p); f.src_y = coord_t'(up_sent[p]);
          f.payload[7:0] = 8'(up_idx[p]);
          f.payload[15:8] = 8'(p);
          in_flit[p] = f; in_valid[p] = 1;
          up_cred[p][up_vc[p]]--;
          up_idx[p]++;
          if (up_idx[p] == PL) begin up_vc[p] = -1; up_sent[p]++; end
        end
        // downstream credit return, random pace
        credit_in[p] = '0;
        if (dn_pend[p].size() != 0 && $urandom_range(0, 2) == 0) begin
          credit_in[p].valid = 1;
          credit_in[p].vc = vcid_t'(dn_pend[p].pop_front());
        end
      end
    end
    check(delivered == 1 + PKTS * NUM_PORTS, $sformatf("delivered %0d packets", delivered));
    check(head_wait > 0 && credit_wait > 0, "no VC wait or no credit wait seen");
    $display("packets %0d, head waits %0d, credit waits %0d", delivered, head_wait, credit_wait);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // output side: check every flit that leaves
  always @(posedge clk) if (rst_n) begin
    for (int o = 0; o < NUM_PORTS; o++) if (out_valid[o]) begin
      flit_t f;
      int v, nx, ny;
      f = out_flit[o];
      v = int'(f.vc);
      dn_pend[o].push_back(v);
      nx = 1 + (o == int'(P_EAST)) - (o == int'(P_WEST));
      ny = 1 + (o == int'(P_NORTH)) - (o == int'(P_SOUTH));
      if (first_out < 0) first_out = cyc;
      check(xy_route(1, 1, f.dst_x, f.dst_y) == port_e'(o), $sformatf("flit left on port %0d", o));
      check(int'(f.payload[7:0]) == dn_exp_idx[o][v], $sformatf("order on port %0d vc %0d", o, v));
      if (is_head(f.ftype)) begin
        dn_src[o][v] = int'(f.payload[15:8]) * 256 + int'(f.src_y);
        check(o == int'(P_LOCAL) ? f.op == P_LOCAL : f.op == xy_route(coord_t'(nx), coord_t'(ny), f.dst_x, f.dst_y),
              "head next-router port");
      end else begin
        check(dn_src[o][v] == int'(f.payload[15:8]) * 256 + int'(f.src_y), "packets interleaved on a VC");
      end
      dn_exp_idx[o][v] = is_tail(f.ftype) ? 0 : dn_exp_idx[o][v] + 1;
      if (is_tail(f.ftype)) delivered++;
    end
    for (int p = 0; p < NUM_PORTS; p++)
      for (int v = 0; v < NV; v++)
        if (dut.vc_nonempty[p][v] && !dut.sa_req[p][v]) begin
          if (is_head(dut.front_type[p][v])) head_wait++;
          else credit_wait++;
        end
  end
endmodule
