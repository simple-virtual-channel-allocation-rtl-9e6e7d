// tb_free_vc_queue: takes free VCs from random positions and releases taken
// ones, and checks head and count against a queue model.
module tb_free_vc_queue;
  import noc_pkg::*;
  localparam int NV = 4;
  logic clk = 0, rst_n = 0;
  logic take_valid, release_valid, head_valid;
  vcid_t take_vc, release_vc, head_vc;
  logic [2:0] count;
  int q [$];
  int busy [$];
  int checks = 0, failures = 0;

  free_vc_queue #(.NUM_VC(NV)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic compare();
    checks++;
    if (int'(count) != q.size() || head_valid != (q.size() != 0)
        || (q.size() != 0 && int'(head_vc) != q[0])) begin
      failures++;
      $display("FAIL count %0d/%0d head %0d/%0d", count, q.size(), head_vc, (q.size() != 0) ? q[0] : -1);
    end
  endtask

  initial begin
    take_valid = 0; release_valid = 0; take_vc = 0; release_vc = 0;
    for (int v = 0; v < NV; v++) q.push_back(v);
    repeat (2) @(posedge clk);
    rst_n = 1;
    #1 compare();
    for (int c = 0; c < 400; c++) begin
      int ti, ri;
      @(negedge clk);
      take_valid = 0; release_valid = 0;
      ti = -1; ri = -1;
      if (q.size() != 0 && $urandom_range(0, 1)) begin
        ti = $urandom_range(0, q.size() - 1);
        take_valid = 1; take_vc = vcid_t'(q[ti]);
      end
      if (busy.size() != 0 && $urandom_range(0, 1)) begin
        ri = $urandom_range(0, busy.size() - 1);
        release_valid = 1; release_vc = vcid_t'(busy[ri]);
      end
      @(posedge clk);
      if (ri >= 0) busy.delete(ri);
      if (ti >= 0) begin
        busy.push_back(q[ti]);
        q.delete(ti);
      end
      if (release_valid) q.push_back(int'(release_vc));
      #1 compare();
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
