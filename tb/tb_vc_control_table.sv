// tb_vc_control_table: random writes into VCs with room and random pops of
// non-empty VCs of a 4 x 5 control table. A per-VC queue model checks the
// front header fields (a body or tail flit carries a random OP and must be
// steered by the OP its head left behind), counts, buffer addresses (vc*5 + pointer), the OVC
// and active bit set by a head and cleared by a tail, and the credit sent
// upstream one cycle after each pop.
module tb_vc_control_table;
  import noc_pkg::*;
  localparam int NV = 4, D = 5;
  logic clk = 0, rst_n = 0;
  logic wr_valid, rd_valid;
  flit_t wr_flit;
  vcid_t rd_vc, rd_ovc;
  logic [4:0] wr_addr, rd_addr;
  logic [NV-1:0] vc_nonempty, vc_active;
  vcid_t vc_ovc [NV];
  flit_type_e front_type [NV];
  port_e front_op [NV];
  coord_t front_dx [NV], front_dy [NV];
  logic [2:0] vc_count [NV];
  vc_status_e status [NV];
  credit_t credit_out;

  flit_t q [NV][$];
  int wp [NV], rp [NV];
  int act [NV], ovc [NV], hop [NV];
  int pkt_open [NV];   // a packet is being written into this VC
  int checks = 0, failures = 0;
  logic exp_cred; int exp_cred_vc;

  vc_control_table #(.NUM_VC(NV), .VC_DEPTH(D)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    #100000;
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

  initial begin
    wr_valid = 0; rd_valid = 0; wr_flit = '0; rd_vc = 0; rd_ovc = 0;
    exp_cred = 0; exp_cred_vc = 0;
    for (int v = 0; v < NV; v++) begin wp[v] = 0; rp[v] = 0; act[v] = 0; ovc[v] = 0; pkt_open[v] = 0; end
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int c = 0; c < 1500; c++) begin
      int wv, rv;
      @(negedge clk);
      // compare state
      check(credit_out.valid == exp_cred && (!exp_cred || int'(credit_out.vc) == exp_cred_vc), "credit");
      for (int v = 0; v < NV; v++) begin
        check(int'(vc_count[v]) == q[v].size(), $sformatf("count vc %0d", v));
        check(vc_active[v] == act[v], $sformatf("active vc %0d", v));
        if (act[v] != 0) check(int'(vc_ovc[v]) == ovc[v], $sformatf("ovc vc %0d", v));
        check(status[v] == (act[v] != 0 ? VC_ACTIVE : (q[v].size() != 0 ? VC_VA : VC_IDLE)), "status");
        if (q[v].size() != 0)
          check(front_type[v] == q[v][0].ftype
                && int'(front_op[v]) == (is_head(q[v][0].ftype) ? int'(q[v][0].op) : hop[v])
                && front_dx[v] == q[v][0].dst_x && front_dy[v] == q[v][0].dst_y,
                $sformatf("front fields vc %0d", v));
      end
      // stimulus
      wr_valid = 0; rd_valid = 0;
      wv = $urandom_range(0, NV - 1);
      if (q[wv].size() < D && $urandom_range(0, 2) != 0) begin
        wr_valid = 1;
        wr_flit = flit_t'({$urandom, $urandom, $urandom, $urandom});
        wr_flit.vc = vcid_t'(wv);
        // well-formed packets of 1..5 flits per VC
        if (pkt_open[wv] == 0) begin
          wr_flit.ftype = ($urandom_range(0, 4) == 0) ? FT_HEADTAIL : FT_HEAD;
          pkt_open[wv] = (wr_flit.ftype == FT_HEAD) ? 1 : 0;
        end else begin
          wr_flit.ftype = ($urandom_range(0, 2) == 0) ? FT_TAIL : FT_BODY;
          if (wr_flit.ftype == FT_TAIL) pkt_open[wv] = 0;
        end
        wr_flit.op = port_e'($urandom_range(0, 4));
      end
      rv = $urandom_range(0, NV - 1);
      if (q[rv].size() != 0 && $urandom_range(0, 1)) begin
        rd_valid = 1; rd_vc = vcid_t'(rv); rd_ovc = vcid_t'($urandom_range(0, 3));
      end
      #1;
      if (wr_valid) check(int'(wr_addr) == wv * D + wp[wv], "wr_addr");
      if (rd_valid) check(int'(rd_addr) == rv * D + rp[rv], "rd_addr");
      @(posedge clk);
      exp_cred = rd_valid; exp_cred_vc = rv;
      if (rd_valid) begin
        flit_t f;
        f = q[rv].pop_front();
        rp[rv] = (rp[rv] + 1) % D;
        if (is_head(f.ftype)) begin ovc[rv] = int'(rd_ovc); act[rv] = !is_tail(f.ftype); hop[rv] = int'(f.op); end
        else if (is_tail(f.ftype)) act[rv] = 0;
      end
      if (wr_valid) begin
        q[wv].push_back(wr_flit);
        wp[wv] = (wp[wv] + 1) % D;
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
