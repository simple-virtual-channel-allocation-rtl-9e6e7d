// tb_vc_select_fvada: FVADA VC Selection for the output that feeds a WEST
// input port (home VCs there: EAST 0, SOUTH 1, NORTH 2, LOCAL 3, U-turn 0).
// All 16 availability patterns are applied; the expected candidate follows
// the rule "home VC unless it is unusable and another VC is usable".
module tb_vc_select_fvada;
  import noc_pkg::*;
  logic [3:0] avail;
  vcid_t cand_vc [NUM_PORTS];
  logic  cand_ok [NUM_PORTS];
  int checks = 0, failures = 0;
  int home [NUM_PORTS] = '{0, 0, 1, 2, 3};

  vc_select_fvada #(.NUM_VC(4), .DOWN_PORT(P_WEST)) dut (.*);

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int a = 0; a < 16; a++) begin
      avail = 4'(a);
      #1;
      for (int d = 0; d < NUM_PORTS; d++) begin
        int exp;
        exp = home[d];
        if (!avail[exp] && avail != 0) begin
          exp = 0;
          while (!avail[exp]) exp++;
        end
        checks++;
        if (int'(cand_vc[d]) != exp || cand_ok[d] != avail[exp]) begin
          failures++;
          $display("FAIL avail=%b dir %0d: got %0d/%0d exp %0d", avail, d, cand_vc[d], cand_ok[d], exp);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
