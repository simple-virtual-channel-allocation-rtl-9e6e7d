// tb_vc_assign: random candidate sets; the output must be the candidate of
// the direction named by 'dir'.
module tb_vc_assign;
  import noc_pkg::*;
  vcid_t cand_vc [NUM_PORTS];
  logic  cand_ok [NUM_PORTS];
  port_e dir;
  vcid_t vc;
  logic  ok;
  int checks = 0, failures = 0;

  vc_assign dut (.*);

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int c = 0; c < 300; c++) begin
      int d;
      for (int p = 0; p < NUM_PORTS; p++) begin
        cand_vc[p] = vcid_t'($urandom_range(0, 3));
        cand_ok[p] = 1'($urandom);
      end
      d = $urandom_range(0, NUM_PORTS - 1);
      dir = port_e'(d);
      #1;
      checks++;
      if (vc != cand_vc[d] || ok != cand_ok[d]) begin
        failures++;
        $display("FAIL dir %0d: got vc %0d ok %0d", d, vc, ok);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
