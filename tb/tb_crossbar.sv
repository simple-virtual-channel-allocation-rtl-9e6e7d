// tb_crossbar: random flits and random crossbar settings; each output must
// carry the selected input's flit, or zero when it is not selected.
module tb_crossbar;
  import noc_pkg::*;
  flit_t      in_flit   [NUM_PORTS];
  logic [2:0] sel       [NUM_PORTS];
  logic       sel_valid [NUM_PORTS];
  flit_t      out_flit  [NUM_PORTS];
  int checks = 0, failures = 0;

  crossbar dut (.*);

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int c = 0; c < 300; c++) begin
      for (int p = 0; p < NUM_PORTS; p++) begin
        in_flit[p]   = flit_t'({$urandom, $urandom, $urandom, $urandom});
        sel[p]       = 3'($urandom_range(0, NUM_PORTS - 1));
        sel_valid[p] = $urandom_range(0, 3) != 0;
      end
      #1;
      for (int o = 0; o < NUM_PORTS; o++) begin
        flit_t exp;
        exp = sel_valid[o] ? in_flit[sel[o]] : '0;
        checks++;
        if (out_flit[o] !== exp) begin
          failures++;
          $display("FAIL output %0d sel %0d valid %0d", o, sel[o], sel_valid[o]);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
