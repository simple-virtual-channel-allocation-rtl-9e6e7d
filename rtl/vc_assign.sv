// vc_assign: VC Assignment of one output port.
//
// VC Selection has prepared one candidate output VC for each direction the
// packet may take in the next router. Once switch allocation has named the
// winning flit and look-ahead routing its direction there ('dir'), this
// multiplexer picks that direction's candidate. It is the only part of VC
// allocation that waits for switch allocation, which keeps the combined
// SA+VA stage short. Purely combinational.
module vc_assign
  import noc_pkg::*;
(
  input  vcid_t cand_vc [NUM_PORTS],
  input  logic  cand_ok [NUM_PORTS],
  input  port_e dir,
  output vcid_t vc,
  output logic  ok
);
  always_comb begin
    vc = '0;
    ok = 1'b0;
    for (int d = 0; d < NUM_PORTS; d++) begin
      if (dir == port_e'(d)) begin
        vc = cand_vc[d];
        ok = cand_ok[d];
      end
    end
  end

endmodule
