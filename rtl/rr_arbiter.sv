// rr_arbiter: N:1 round-robin arbiter, the arbiter used in both switch
// allocation stages.
//
// A priority pointer names the requester that is served first; the grant goes
// to the first requester at or after the pointer (wrapping). The grant is
// combinational. The pointer moves one past the winner at the clock edge when
// 'advance' is high, so the last winner has the lowest priority next time; a
// caller that only wants to rotate when its winner was really used (for
// example when a local winner also wins the second SA stage) ties 'advance'
// to that condition. Round-robin priority update follows the design
// description; N defaults to its 4:1 arbiter.
module rr_arbiter #(
  parameter int unsigned N = 4,
  localparam int unsigned IW = (N > 1) ? $clog2(N) : 1
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic [N-1:0]         req,
  input  logic                 advance,
  output logic [N-1:0]         gnt,
  output logic [IW-1:0]        gnt_idx,
  output logic                 gnt_valid
);
  logic [IW-1:0] ptr;

  always_comb begin
    gnt       = '0;
    gnt_idx   = '0;
    gnt_valid = 1'b0;
    for (int unsigned k = 0; k < N; k++) begin
      int unsigned i;
      i = (int'(ptr) + k) % N;
      if (!gnt_valid && req[i]) begin
        gnt_valid = 1'b1;
        gnt[i]    = 1'b1;
        gnt_idx   = i[IW-1:0];
      end
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) ptr <= '0;
    else if (advance && gnt_valid)
      ptr <= (int'(gnt_idx) == N - 1) ? '0 : gnt_idx + 1'b1;
  end

endmodule
