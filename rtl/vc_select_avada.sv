// vc_select_avada: VC Selection of the AVADA scheme (adjustable VC assignment
// with dynamic VC allocation) for one output port.
//
// The mapping between the downstream VCs and the downstream output
// directions is not fixed but held in a small CAM (vc_mapping_table). For
// every direction d the packet may take in the next router one candidate is
// prepared, with these rules in order:
//   1. a VC mapped to d (VD) exists and has room, or no VC has room: take VD;
//   2. otherwise an unmapped, empty VC (VE) exists: take VE (the mapping
//      table then maps it to d);
//   3. otherwise another VC with room (VF) exists: take VF;
//   4. otherwise take the head of the free-VC queue (VFIFO).
// "Has room" means not reserved by an unfinished packet and holding a
// credit. Among several VCs mapped to d one with room is preferred; among
// equal choices the lowest index wins (the text does not say). 'cand_ok[d]'
// tells whether the candidate can be used now; 'cand_new[d]' that it is an
// unmapped VC. Purely combinational.
module vc_select_avada
  import noc_pkg::*;
#(
  parameter int unsigned NUM_VC = 4
) (
  input  logic [NUM_VC-1:0] avail,
  input  logic [NUM_VC-1:0] hit [NUM_PORTS],
  input  logic [NUM_VC-1:0] unmapped,
  input  logic              vfifo_valid,
  input  vcid_t             vfifo,
  output vcid_t             cand_vc  [NUM_PORTS],
  output logic              cand_ok  [NUM_PORTS],
  output logic              cand_new [NUM_PORTS]
);
  // lowest set bit of a VC vector
  function automatic logic [VCID_W:0] first(logic [NUM_VC-1:0] m);
    for (int v = 0; v < NUM_VC; v++)
      if (m[v]) return {1'b1, vcid_t'(v)};
    return '0;
  endfunction

  logic [VCID_W:0] vf, ve;

  always_comb begin
    vf = first(avail);
    ve = first(unmapped & avail);
    for (int d = 0; d < NUM_PORTS; d++) begin
      logic [VCID_W:0] vd_room, vd_any, vd;
      logic            vd_ok;
      vd_room = first(hit[d] & avail);
      vd_any  = first(hit[d]);
      vd      = vd_room[VCID_W] ? vd_room : vd_any;
      vd_ok   = vd_room[VCID_W];
      if (vd[VCID_W] && (vd_ok || !vf[VCID_W]))
        cand_vc[d] = vd[VCID_W-1:0];
      else if (ve[VCID_W])
        cand_vc[d] = ve[VCID_W-1:0];
      else if (vf[VCID_W])
        cand_vc[d] = vf[VCID_W-1:0];
      else
        cand_vc[d] = vfifo_valid ? vfifo : '0;
      cand_ok[d]  = avail[cand_vc[d]];
      cand_new[d] = unmapped[cand_vc[d]];
    end
  end

endmodule
