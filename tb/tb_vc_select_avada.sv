// tb_vc_select_avada: AVADA VC Selection with random mapping-table contents,
// availability and free-queue head. The expected candidate is computed here
// from the four rules (mapped VC with room; else empty unmapped VC; else any
// VC with room; else free-queue head), and the run counts that every rule
// was exercised.
module tb_vc_select_avada;
  import noc_pkg::*;
  localparam int NV = 4;
  logic [NV-1:0] avail, unmapped;
  logic [NV-1:0] hit [NUM_PORTS];
  logic  vfifo_valid;
  vcid_t vfifo;
  vcid_t cand_vc  [NUM_PORTS];
  logic  cand_ok  [NUM_PORTS];
  logic  cand_new [NUM_PORTS];
  int checks = 0, failures = 0;
  int rule_seen [4] = '{0, 0, 0, 0};

  vc_select_avada #(.NUM_VC(NV)) dut (.*);

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int c = 0; c < 2000; c++) begin
      int map [NV];
      // random table: each VC NULL (-1) or mapped to one direction
      for (int v = 0; v < NV; v++) begin
        map[v] = $urandom_range(0, 5) - 1;
        unmapped[v] = (map[v] < 0);
        avail[v] = $urandom_range(0, 2) != 0;
      end
      for (int d = 0; d < NUM_PORTS; d++)
        for (int v = 0; v < NV; v++) hit[d][v] = (map[v] == d);
      vfifo_valid = 1'($urandom);
      vfifo = vcid_t'($urandom_range(0, NV - 1));
      #1;
      for (int d = 0; d < NUM_PORTS; d++) begin
        int vd, vd_room, ve, vf, exp, rule;
        vd = -1; vd_room = -1; ve = -1; vf = -1;
        for (int v = NV - 1; v >= 0; v--) begin
          if (map[v] == d) vd = v;
          if (map[v] == d && avail[v]) vd_room = v;
          if (map[v] < 0 && avail[v]) ve = v;
          if (avail[v]) vf = v;
        end
        if (vd_room >= 0) vd = vd_room;
        if (vd >= 0 && (vd_room >= 0 || vf < 0)) begin exp = vd; rule = 0; end
        else if (ve >= 0) begin exp = ve; rule = 1; end
        else if (vf >= 0) begin exp = vf; rule = 2; end
        else begin exp = vfifo_valid ? int'(vfifo) : 0; rule = 3; end
        rule_seen[rule]++;
        checks++;
        if (int'(cand_vc[d]) != exp || cand_ok[d] != avail[exp] || cand_new[d] != (map[exp] < 0)) begin
          failures++;
          if (failures < 10)
            $display("FAIL dir %0d: got %0d exp %0d (rule %0d)", d, cand_vc[d], exp, rule + 1);
        end
      end
    end
    for (int r = 0; r < 4; r++) begin
      checks++;
      if (rule_seen[r] == 0) begin
        failures++;
        $display("FAIL rule %0d never used", r + 1);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
