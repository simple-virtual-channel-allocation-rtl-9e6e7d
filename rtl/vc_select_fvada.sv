// vc_select_fvada: VC Selection of the FVADA scheme (fixed VC assignment with
// dynamic VC allocation) for one output port.
//
// The downstream input port reached through this output has NUM_VC VCs; each
// is "home" to one output direction of the downstream router by a fixed map
// (noc_pkg::home_vc). Selection runs before the switch allocation result is
// known, so it prepares one candidate for every direction d the packet could
// take in the next router: the home VC of d if it is available, otherwise
// another available VC, otherwise the home VC anyway (the packet then waits
// for it). Available means not reserved by an unfinished packet and holding at
// least one credit. Among several other available VCs the lowest index is
// taken (the text does not say which). 'cand_ok[d]' tells whether the
// candidate can be used now. Purely combinational.
module vc_select_fvada
  import noc_pkg::*;
#(
  parameter int unsigned NUM_VC    = 4,
  parameter port_e       DOWN_PORT = P_WEST
) (
  input  logic [NUM_VC-1:0] avail,
  output vcid_t             cand_vc [NUM_PORTS],
  output logic              cand_ok [NUM_PORTS]
);
  logic  vf_found;
  vcid_t vf;

  always_comb begin
    vf_found = 1'b0;
    vf       = '0;
    for (int v = 0; v < NUM_VC; v++) begin
      if (!vf_found && avail[v]) begin
        vf_found = 1'b1;
        vf       = vcid_t'(v);
      end
    end
    for (int d = 0; d < NUM_PORTS; d++) begin
      int unsigned vd;
      vd = home_vc(DOWN_PORT, port_e'(d)) % NUM_VC;
      if (!avail[vd] && vf_found) cand_vc[d] = vf;
      else                        cand_vc[d] = vcid_t'(vd);
      cand_ok[d] = avail[cand_vc[d]];
    end
  end

endmodule
