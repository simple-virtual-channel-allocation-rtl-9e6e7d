// tb_switch_allocator: random requests (VC, wanted output, body/tail flag)
// into the 5-port, 4-VC separable allocator. A reference model with its own
// round-robin pointers predicts every grant, including the rule that body
// and tail requests beat head requests in both stages. The run also counts
// the cycles in which that rule decided a grant.
module tb_switch_allocator;
  import noc_pkg::*;
  localparam int NV = 4, NP = NUM_PORTS;
  logic clk = 0, rst_n = 0;
  logic [NV-1:0] req [NP], prio [NP];
  port_e req_port [NP][NV];
  logic in_gnt [NP];
  vcid_t in_gnt_vc [NP];
  logic out_gnt [NP];
  logic [2:0] out_gnt_in [NP];
  int p1 [NP], p2 [NP];
  int checks = 0, failures = 0, prio_used = 0;

  switch_allocator #(.NUM_VC(NV)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < NP; i++) begin req[i] = '0; prio[i] = '0; p1[i] = 0; p2[i] = 0; end
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int c = 0; c < 1000; c++) begin
      int lw [NP], lwp [NP], gi [NP], eg [NP];
      @(negedge clk);
      for (int i = 0; i < NP; i++) begin
        req[i]  = NV'($urandom) & NV'($urandom | $urandom);
        prio[i] = NV'($urandom) & NV'($urandom);
        for (int v = 0; v < NV; v++) req_port[i][v] = port_e'($urandom_range(0, NP - 1));
      end
      #1;
      // stage 1 model
      for (int i = 0; i < NP; i++) begin
        logic [NV-1:0] r;
        r = ((req[i] & prio[i]) != 0) ? (req[i] & prio[i]) : req[i];
        lw[i] = -1;
        for (int k = 0; k < NV; k++)
          if (lw[i] < 0 && r[(p1[i] + k) % NV]) lw[i] = (p1[i] + k) % NV;
        lwp[i] = (lw[i] >= 0) ? int'(req_port[i][lw[i]]) : -1;
      end
      // stage 2 model
      for (int o = 0; o < NP; o++) begin
        logic [NP-1:0] r, p;
        for (int i = 0; i < NP; i++) begin
          r[i] = (lwp[i] == o);
          p[i] = r[i] && prio[i][lw[i]];
        end
        if (p != 0 && p != r) prio_used++;
        if (p != 0) r = p;
        gi[o] = -1;
        for (int k = 0; k < NP; k++)
          if (gi[o] < 0 && r[(p2[o] + k) % NP]) gi[o] = (p2[o] + k) % NP;
      end
      for (int i = 0; i < NP; i++) eg[i] = (lw[i] >= 0 && gi[lwp[i]] == i);
      for (int o = 0; o < NP; o++) begin
        checks++;
        if (out_gnt[o] != (gi[o] >= 0) || (gi[o] >= 0 && int'(out_gnt_in[o]) != gi[o])) begin
          failures++;
          $display("FAIL cycle %0d output %0d: got %0d/%0d exp %0d", c, o, out_gnt[o], out_gnt_in[o], gi[o]);
        end
      end
      for (int i = 0; i < NP; i++) begin
        checks++;
        if (in_gnt[i] != eg[i] || (eg[i] && int'(in_gnt_vc[i]) != lw[i])) begin
          failures++;
          $display("FAIL cycle %0d input %0d: got %0d/%0d exp %0d/%0d", c, i, in_gnt[i], in_gnt_vc[i], eg[i], lw[i]);
        end
      end
      // pointer updates
      for (int o = 0; o < NP; o++) if (gi[o] >= 0) p2[o] = (gi[o] + 1) % NP;
      for (int i = 0; i < NP; i++) if (eg[i]) p1[i] = (lw[i] + 1) % NV;
    end
    checks++;
    if (prio_used == 0) begin
      failures++;
      $display("FAIL body/tail priority never decided a grant");
    end
    $display("priority rule decided %0d grants", prio_used);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
