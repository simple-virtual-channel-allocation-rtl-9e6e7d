// tb_rr_arbiter: random requests and advance pulses into a 4:1 round-robin
// arbiter; grant, index and valid are compared every cycle with a reference
// pointer model kept in the testbench.
module tb_rr_arbiter;
  localparam int N = 4;
  logic clk = 0, rst_n = 0;
  logic [N-1:0] req, gnt;
  logic [1:0] gnt_idx;
  logic advance, gnt_valid;
  int checks = 0, failures = 0;
  int ptr;

  rr_arbiter #(.N(N)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    #20000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    req = '0; advance = 0; ptr = 0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int c = 0; c < 500; c++) begin
      int exp_idx;
      @(negedge clk);
      req     = N'($urandom);
      advance = $urandom_range(0, 3) != 0;
      #1;
      exp_idx = -1;
      for (int k = 0; k < N; k++)
        if (exp_idx < 0 && req[(ptr + k) % N]) exp_idx = (ptr + k) % N;
      checks++;
      if (exp_idx < 0) begin
        if (gnt_valid || gnt != '0) begin
          failures++;
          $display("FAIL cycle %0d: grant without request", c);
        end
      end else if (!gnt_valid || int'(gnt_idx) != exp_idx || gnt != N'(1 << exp_idx)) begin
        failures++;
        $display("FAIL cycle %0d: req=%b ptr=%0d exp=%0d got=%0d/%b", c, req, ptr, exp_idx, gnt_idx, gnt);
      end
      if (advance && exp_idx >= 0) ptr = (exp_idx + 1) % N;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
