// tb_flit_sram: writes random flits to random words of the 20-word flit
// buffer and checks every asynchronous read against a shadow copy.
module tb_flit_sram;
  import noc_pkg::*;
  logic clk = 0;
  logic we;
  logic [4:0] waddr, raddr;
  flit_t wdata, rdata;
  flit_t shadow [20];
  logic  written [20];
  int checks = 0, failures = 0;

  flit_sram dut (.*);

  always #5 clk = ~clk;

  initial begin
    #50000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    we = 0; waddr = 0; raddr = 0; wdata = '0;
    for (int i = 0; i < 20; i++) written[i] = 0;
    for (int c = 0; c < 600; c++) begin
      @(negedge clk);
      we    = $urandom_range(0, 1);
      waddr = 5'($urandom_range(0, 19));
      wdata = flit_t'({$urandom, $urandom, $urandom, $urandom});
      raddr = 5'($urandom_range(0, 19));
      #1;
      if (written[raddr]) begin
        checks++;
        if (rdata !== shadow[raddr]) begin
          failures++;
          $display("FAIL read word %0d", raddr);
        end
      end
      @(posedge clk);
      if (we) begin
        shadow[waddr]  = wdata;
        written[waddr] = 1;
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
