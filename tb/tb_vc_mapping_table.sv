// tb_vc_mapping_table: random map and clear operations on the AVADA CAM;
// the hit matrix and NULL vector are compared with a model every cycle.
module tb_vc_mapping_table;
  import noc_pkg::*;
  localparam int NV = 4;
  logic clk = 0, rst_n = 0;
  logic set_valid;
  vcid_t set_vc;
  port_e set_dir;
  logic [NV-1:0] clear, unmapped;
  logic [NV-1:0] hit [NUM_PORTS];
  int model [NV];
  int checks = 0, failures = 0;

  vc_mapping_table #(.NUM_VC(NV)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic compare();
    for (int v = 0; v < NV; v++) begin
      checks++;
      if (unmapped[v] != (model[v] < 0)) begin
        failures++;
        $display("FAIL VC %0d NULL flag", v);
      end
      for (int d = 0; d < NUM_PORTS; d++) begin
        checks++;
        if (hit[d][v] != (model[v] == d)) begin
          failures++;
          $display("FAIL VC %0d dir %0d hit", v, d);
        end
      end
    end
  endtask

  initial begin
    set_valid = 0; set_vc = 0; set_dir = P_EAST; clear = '0;
    for (int v = 0; v < NV; v++) model[v] = -1;
    repeat (2) @(posedge clk);
    rst_n = 1;
    #1 compare();
    for (int c = 0; c < 300; c++) begin
      @(negedge clk);
      set_valid = 1'($urandom);
      set_vc    = vcid_t'($urandom_range(0, NV - 1));
      set_dir   = port_e'($urandom_range(0, NUM_PORTS - 1));
      clear     = NV'($urandom) & NV'($urandom);
      @(posedge clk);
      for (int v = 0; v < NV; v++) begin
        if (set_valid && int'(set_vc) == v) model[v] = int'(set_dir);
        else if (clear[v])                  model[v] = -1;
      end
      #1 compare();
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
