// tb_noc_mesh_avada10: end-to-end test of a 4x4 AVADA mesh with the smallest
// buffer of the buffer-size study: 2 VCs of 5 flits, 10 flit slots per input
// port instead of 20 (NUM_VC=2, VC_DEPTH=5 on the top). With fewer VCs than
// directions, AVADA must share VCs between directions, which is what this test
// exercises. The PE models in noc_traffic run uniform random traffic at
// rising rates (each a generation window followed by a drain) and then a
// phase with slow sinks that back-pressures the network. Every packet must
// arrive once, whole, in order and at the right node, and every phase must
// drain. The mean latency of each phase is printed. The same mechanism probes
// as in tb_noc_mesh_avada count how often each mechanism acted; a mechanism
// that never acted counts as a failure:
//   map          a free, unmapped VC was mapped to a direction (AVADA CAM)
//   unmap        a drained VC returned to NULL in the CAM
//   mingle       a head was put in a VC mapped to another direction
//   stacked      a head entered a VC that still held another packet
//   prio         body/tail requests and head requests met in one input port
//   head_wait    a head at the front of a VC had no usable VC downstream
//   credit_wait  a body/tail flit waited for a credit
//   sa_lost      a VC requested the switch and lost arbitration
module tb_noc_mesh_avada10;
  import noc_pkg::*;
  localparam int MX = 4, MY = 4, NODES = MX * MY, NV = 2, D = 5;
  logic clk = 0, rst_n = 0;
  flit_t   inj_flit [NODES], ej_flit [NODES];
  logic    inj_valid [NODES], ej_valid [NODES];
  credit_t inj_credit [NODES], ej_credit [NODES];
  logic gen_en = 0;
  int pattern = 0, rate_pm = 0, accept_pm = 1000;
  int created, injected, delivered, tchecks, terrors;
  longint lat_sum;
  int checks = 0, failures = 0, cyc = 0;

  noc_mesh #(.MESH_X(MX), .MESH_Y(MY), .NUM_VC(NV), .VC_DEPTH(D), .VA_SCHEME(VA_AVADA)) dut (.*);

  noc_traffic #(.MESH_X(MX), .MESH_Y(MY), .NUM_VC(NV), .VC_DEPTH(D), .PKT_LEN(5)) u_traffic (
    .clk(clk), .rst_n(rst_n), .gen_en(gen_en), .pattern(pattern), .rate_pm(rate_pm),
    .accept_pm(accept_pm), .inj_flit(inj_flit), .inj_valid(inj_valid), .inj_credit(inj_credit),
    .ej_flit(ej_flit), .ej_valid(ej_valid), .ej_credit(ej_credit), .created(created),
    .injected(injected), .delivered(delivered), .lat_sum(lat_sum), .checks(tchecks), .errors(terrors));

  always #5 clk = ~clk;
  always @(posedge clk) cyc <= cyc + 1;

  initial begin
    #2000000;
    failures++;
    $display("watchdog expired at cycle %0d", cyc);
    $display("TB_RESULT checks=%0d failures=%0d", checks + tchecks, failures + terrors);
    $finish;
  end

  // ---- mechanism probes ----
  int n_map [NODES], n_unmap [NODES], n_mingle [NODES], n_stacked [NODES], n_prio [NODES];
  int n_head_wait [NODES], n_credit_wait [NODES], n_sa_lost [NODES];

  for (genvar y = 0; y < MY; y++) begin : g_py
    for (genvar x = 0; x < MX; x++) begin : g_px
      localparam int N = y * MX + x;
      initial begin
        n_map[N] = 0; n_unmap[N] = 0; n_mingle[N] = 0; n_stacked[N] = 0; n_prio[N] = 0;
        n_head_wait[N] = 0; n_credit_wait[N] = 0; n_sa_lost[N] = 0;
      end
      for (genvar o = 0; o < NUM_PORTS; o++) begin : g_po
        always @(posedge clk) if (rst_n) begin
          if (dut.g_y[y].g_x[x].u_router.g_out[o].u_ou.g_avada.u_map.set_valid) n_map[N]++;
          if ((dut.g_y[y].g_x[x].u_router.g_out[o].u_ou.g_avada.clear &
               ~dut.g_y[y].g_x[x].u_router.g_out[o].u_ou.g_avada.unmapped) != 0) n_unmap[N]++;
          if (dut.g_y[y].g_x[x].u_router.g_out[o].u_ou.take &&
              !dut.g_y[y].g_x[x].u_router.g_out[o].u_ou.g_avada.unmapped[dut.g_y[y].g_x[x].u_router.g_out[o].u_ou.asg_vc] &&
              !dut.g_y[y].g_x[x].u_router.g_out[o].u_ou.g_avada.hit[dut.g_y[y].g_x[x].u_router.g_out[o].u_ou.gnt_dir][dut.g_y[y].g_x[x].u_router.g_out[o].u_ou.asg_vc])
            n_mingle[N]++;
        end
      end
      always @(posedge clk) if (rst_n) begin
        for (int p = 0; p < NUM_PORTS; p++) begin
          if (dut.r_in_valid[N][p] && is_head(dut.r_in_flit[N][p].ftype) &&
              dut.g_y[y].g_x[x].u_router.vc_count[p][dut.r_in_flit[N][p].vc] != 0)
            n_stacked[N]++;
          if ((dut.g_y[y].g_x[x].u_router.sa_req[p] & dut.g_y[y].g_x[x].u_router.sa_prio[p]) != 0 &&
              (dut.g_y[y].g_x[x].u_router.sa_req[p] & ~dut.g_y[y].g_x[x].u_router.sa_prio[p]) != 0)
            n_prio[N]++;
          for (int v = 0; v < NV; v++) begin
            if (dut.g_y[y].g_x[x].u_router.vc_nonempty[p][v] && !dut.g_y[y].g_x[x].u_router.sa_req[p][v]) begin
              if (is_head(dut.g_y[y].g_x[x].u_router.front_type[p][v])) n_head_wait[N]++;
              else n_credit_wait[N]++;
            end
            if (dut.g_y[y].g_x[x].u_router.sa_req[p][v] &&
                !(dut.g_y[y].g_x[x].u_router.in_gnt[p] && int'(dut.g_y[y].g_x[x].u_router.in_gnt_vc[p]) == v))
              n_sa_lost[N]++;
          end
        end
      end
    end
  end

  function automatic int total(int a [NODES]);
    int s = 0;
    foreach (a[i]) s += a[i];
    return s;
  endfunction

  task automatic run_phase(int pat, int rate, int accept, int gen_cycles);
    int start_created, start_delivered, start_cyc;
    longint start_lat;
    start_created = created; start_delivered = delivered; start_lat = lat_sum; start_cyc = cyc;
    pattern = pat; rate_pm = rate; accept_pm = accept;
    gen_en = 1;
    repeat (gen_cycles) @(posedge clk);
    gen_en = 0;
    while (delivered != created && cyc - start_cyc < gen_cycles + 4000) @(posedge clk);
    checks++;
    if (delivered != created) begin
      failures++;
      $display("FAIL pattern %0d: %0d of %0d packets delivered", pat, delivered, created);
    end
    $display("pattern %0d rate %0d/1000 pkt/node/cycle: %0d packets, mean latency %0d cycles, %0d cycles",
             pat, rate, delivered - start_delivered,
             (delivered > start_delivered) ? int'((lat_sum - start_lat) / (delivered - start_delivered)) : 0,
             cyc - start_cyc);
  endtask

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1;
    repeat (2) @(posedge clk);
    run_phase(0, 20, 1000, 300);
    run_phase(0, 40, 1000, 300);
    run_phase(0, 60, 1000, 300);
    run_phase(0, 60, 250, 300);
    begin
      string names [8] = '{"map", "unmap", "mingle", "stacked", "prio", "head_wait", "credit_wait", "sa_lost"};
      int counts [8];
      counts = '{total(n_map), total(n_unmap), total(n_mingle), total(n_stacked), total(n_prio),
                 total(n_head_wait), total(n_credit_wait), total(n_sa_lost)};
      for (int m = 0; m < 8; m++) begin
        $display("mechanism %s: %0d", names[m], counts[m]);
        checks++;
        if (counts[m] == 0) begin
          failures++;
          $display("FAIL mechanism %s never happened", names[m]);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks + tchecks, failures + terrors);
    $finish;
  end
endmodule
