// free_vc_queue: ordered list of the VCs of a downstream input port that no
// packet holds, oldest released first. Its head is the VFIFO candidate of the
// AVADA selection. A VC leaves the list when it is assigned to a head flit
// ('take', from any position, since the other selection rules may pick any
// free VC) and is appended when the tail flit of its packet has been sent
// ('release'). Take is applied before release, so a single-flit packet that
// takes and releases the same VC in one cycle moves it to the back. After
// reset the list holds all VCs in index order. The design description names
// this queue but does not give its insides; the ordered list is this design's
// choice.
module free_vc_queue
  import noc_pkg::*;
#(
  parameter int unsigned NUM_VC = 4,
  localparam int unsigned CW    = $clog2(NUM_VC + 1)
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          take_valid,
  input  vcid_t         take_vc,
  input  logic          release_valid,
  input  vcid_t         release_vc,
  output logic          head_valid,
  output vcid_t         head_vc,
  output logic [CW-1:0] count
);
  vcid_t         q [NUM_VC];
  logic [CW-1:0] n;

  assign head_valid = (n != '0);
  assign head_vc    = q[0];
  assign count      = n;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int i = 0; i < NUM_VC; i++) q[i] <= vcid_t'(i);
      n <= CW'(NUM_VC);
    end else begin
      vcid_t         nq [NUM_VC];
      logic [CW-1:0] nn;
      logic          found;
      nq    = q;
      nn    = n;
      found = 1'b0;
      if (take_valid) begin
        for (int i = 0; i < NUM_VC; i++) begin
          if (i < int'(n) && q[i] == take_vc) found = 1'b1;
          if (found && i < NUM_VC - 1) nq[i] = q[i+1];
        end
        if (found) nn = n - 1'b1;
      end
      if (release_valid && int'(nn) < NUM_VC) begin
        nq[nn] = release_vc;
        nn     = nn + 1'b1;
      end
      q <= nq;
      n <= nn;
    end
  end

endmodule
