// tb_output_unit: drives one FVADA and one AVADA output unit (both feeding a
// WEST input port, 4 VCs of 5 flits) with random but legal traffic: heads
// start packets of 1..5 flits towards random next-router directions when
// the unit offers a usable VC, body and tail flits follow when their VC has a
// credit, and the downstream router returns credits after a random delay.
// A reference model of credits, reservations, the AVADA mapping table and
// free-VC queue predicts the VC given to every head and the credit state.
// The run must see FVADA fall back from a home VC and AVADA use a newly
// mapped VC, a mapped VC and a VC with room of another direction.
module tb_output_unit;
  import noc_pkg::*;
  localparam int NV = 4, D = 5;
  logic clk = 0, rst_n = 0;
  int checks = 0, failures = 0;

  // per DUT signals, index 0 = FVADA, 1 = AVADA
  logic       gnt_valid [2], gnt_head [2], gnt_tail [2];
  port_e      gnt_dir [2];
  vcid_t      gnt_vc [2], out_vc [2];
  credit_t    credit_in [2];
  logic       cand_ok [2][NUM_PORTS];
  logic [NV-1:0] credit_ok [2];
  logic [2:0] credits [2][NV];

  output_unit #(.NUM_VC(NV), .VC_DEPTH(D), .DOWN_PORT(P_WEST), .VA_SCHEME(VA_FVADA)) u_f (
    .clk(clk), .rst_n(rst_n), .gnt_valid(gnt_valid[0]), .gnt_head(gnt_head[0]),
    .gnt_tail(gnt_tail[0]), .gnt_dir(gnt_dir[0]), .gnt_vc(gnt_vc[0]), .out_vc(out_vc[0]),
    .credit_in(credit_in[0]), .cand_ok(cand_ok[0]), .credit_ok(credit_ok[0]), .credits(credits[0]));
  output_unit #(.NUM_VC(NV), .VC_DEPTH(D), .DOWN_PORT(P_WEST), .VA_SCHEME(VA_AVADA)) u_a (
    .clk(clk), .rst_n(rst_n), .gnt_valid(gnt_valid[1]), .gnt_head(gnt_head[1]),
    .gnt_tail(gnt_tail[1]), .gnt_dir(gnt_dir[1]), .gnt_vc(gnt_vc[1]), .out_vc(out_vc[1]),
    .credit_in(credit_in[1]), .cand_ok(cand_ok[1]), .credit_ok(credit_ok[1]), .credits(credits[1]));

  always #5 clk = ~clk;

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // model state
  int cred [2][NV];
  int resv [2][NV];
  int left [2][NV];         // flits still to send of the packet holding a VC
  int map [NV];             // AVADA table, -1 = NULL
  int fq [$];               // AVADA free queue
  int pend [2][$];          // flits sitting downstream, by VC
  int home [NUM_PORTS] = '{0, 0, 1, 2, 3};
  int fallback = 0, r_new = 0, r_mapped = 0, r_other = 0;

  task automatic check(bit c, string msg);
    checks++;
    if (!c) begin
      failures++;
      if (failures < 20) $display("FAIL %s", msg);
    end
  endtask

  function automatic int avail(int u, int v);
    return (resv[u][v] == 0 && cred[u][v] > 0);
  endfunction

  // expected candidate, and which AVADA rule chose it
  function automatic int expect_vc(int u, int d, output int rule);
    int vf, vd, vdr, ve;
    vf = -1; vd = -1; vdr = -1; ve = -1;
    for (int v = NV - 1; v >= 0; v--) if (avail(u, v)) vf = v;
    rule = 0;
    if (u == 0) begin
      if (!avail(0, home[d]) && vf >= 0) return vf;
      return home[d];
    end
    for (int v = NV - 1; v >= 0; v--) begin
      if (map[v] == d) vd = v;
      if (map[v] == d && avail(1, v)) vdr = v;
      if (map[v] < 0 && avail(1, v)) ve = v;
    end
    if (vdr >= 0) vd = vdr;
    if (vd >= 0 && (vdr >= 0 || vf < 0)) begin rule = 1; return vd; end
    if (ve >= 0) begin rule = 2; return ve; end
    if (vf >= 0) begin rule = 3; return vf; end
    rule = 4;
    return (fq.size() != 0) ? fq[0] : 0;
  endfunction

  initial begin
    for (int u = 0; u < 2; u++) begin
      gnt_valid[u] = 0; gnt_head[u] = 0; gnt_tail[u] = 0; gnt_dir[u] = P_EAST;
      gnt_vc[u] = 0; credit_in[u] = '0;
      for (int v = 0; v < NV; v++) begin cred[u][v] = D; resv[u][v] = 0; left[u][v] = 0; end
    end
    for (int v = 0; v < NV; v++) begin map[v] = -1; fq.push_back(v); end
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int c = 0; c < 3000; c++) begin
      int sent_vc [2], rule [2];
      bit  sent_head [2], sent_tail [2];
      int  dirs [2];
      @(negedge clk);
      for (int u = 0; u < 2; u++) begin
        int cands [$];
        sent_vc[u] = -1; sent_head[u] = 0; sent_tail[u] = 0; rule[u] = 0;
        gnt_valid[u] = 0; gnt_head[u] = 0; gnt_tail[u] = 0;
        // state checks
        for (int v = 0; v < NV; v++) begin
          check(int'(credits[u][v]) == cred[u][v], $sformatf("unit %0d credits vc %0d", u, v));
          check(credit_ok[u][v] == (cred[u][v] > 0), "credit_ok");
        end
        for (int d = 0; d < NUM_PORTS; d++) begin
          int r, e;
          e = expect_vc(u, d, r);
          check(cand_ok[u][d] == avail(u, e), $sformatf("unit %0d cand_ok dir %0d", u, d));
        end
        // choose a flit: continue an open packet or start one
        cands.delete();
        for (int v = 0; v < NV; v++) if (left[u][v] > 0 && cred[u][v] > 0) cands.push_back(v);
        if (cands.size() != 0 && $urandom_range(0, 2) != 0) begin
          int v;
          v = cands[$urandom_range(0, cands.size() - 1)];
          gnt_valid[u] = 1; gnt_vc[u] = vcid_t'(v);
          gnt_tail[u] = (left[u][v] == 1);
          gnt_dir[u] = port_e'($urandom_range(0, 4));
          sent_vc[u] = v; sent_tail[u] = gnt_tail[u];
        end else if ($urandom_range(0, 1)) begin
          int d;
          d = (u == 1 && $urandom_range(0, 2) != 0) ? $urandom_range(0, 1) : $urandom_range(0, 4);
          if (cand_ok[u][d]) begin
            gnt_valid[u] = 1; gnt_head[u] = 1; gnt_dir[u] = port_e'(d);
            gnt_vc[u] = vcid_t'($urandom_range(0, 3));
            gnt_tail[u] = ($urandom_range(0, 4) == 0);
            sent_head[u] = 1; sent_tail[u] = gnt_tail[u]; dirs[u] = d;
            sent_vc[u] = expect_vc(u, d, rule[u]);
          end
        end
        // downstream returns a credit now and then
        credit_in[u] = '0;
        if (pend[u].size() != 0 && $urandom_range(0, 2) == 0) begin
          int k;
          k = $urandom_range(0, pend[u].size() - 1);
          credit_in[u].valid = 1; credit_in[u].vc = vcid_t'(pend[u][k]);
          pend[u].delete(k);
        end
      end
      #1;
      for (int u = 0; u < 2; u++)
        if (gnt_valid[u]) check(int'(out_vc[u]) == sent_vc[u],
                                $sformatf("unit %0d out_vc %0d exp %0d head %0d", u, out_vc[u], sent_vc[u], sent_head[u]));
      @(posedge clk);
      // AVADA: drained, unreserved VCs return to NULL at the edge (a new
      // mapping made at the same edge wins)
      for (int v = 0; v < NV; v++)
        if (resv[1][v] == 0 && cred[1][v] == D &&
            !(sent_head[1] && sent_vc[1] == v && map[v] < 0)) map[v] = -1;
      // model update
      for (int u = 0; u < 2; u++) begin
        if (credit_in[u].valid) cred[u][credit_in[u].vc]++;
        if (sent_vc[u] >= 0) begin
          int v;
          v = sent_vc[u];
          cred[u][v]--;
          pend[u].push_back(v);
          if (sent_head[u]) begin
            if (u == 0 && v != home[dirs[u]]) fallback++;
            if (u == 1) begin
              if (rule[u] == 1) r_mapped++;
              if (rule[u] == 2) r_new++;
              if (rule[u] == 3) r_other++;
              if (map[v] < 0) map[v] = dirs[u];
              for (int k = 0; k < fq.size(); k++) if (fq[k] == v) begin fq.delete(k); break; end
            end
            resv[u][v] = !sent_tail[u];
            left[u][v] = sent_tail[u] ? 0 : $urandom_range(1, 4);
          end else begin
            left[u][v]--;
            if (sent_tail[u]) resv[u][v] = 0;
          end
          if (u == 1 && sent_tail[u]) fq.push_back(v);
        end
      end
    end
    check(fallback > 0, "FVADA never fell back from a home VC");
    check(r_new > 0 && r_mapped > 0 && r_other > 0, "an AVADA rule was never used");
    $display("FVADA fallbacks %0d; AVADA mapped %0d new %0d other %0d", fallback, r_mapped, r_new, r_other);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
