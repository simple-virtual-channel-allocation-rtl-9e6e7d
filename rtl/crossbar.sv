// crossbar: NUM_PORTS x NUM_PORTS matrix crossbar for 128-bit flits (switch
// traversal, ST).
//
// Output o carries the flit of input 'sel[o]' when 'sel_valid[o]' is set,
// and zero otherwise. Written as a matrix of AND-OR crosspoints, the
// structure named in the design description. Switch allocation guarantees
// that each input drives at most one output per cycle. Combinational.
module crossbar
  import noc_pkg::*;
(
  input  flit_t      in_flit   [NUM_PORTS],
  input  logic [2:0] sel       [NUM_PORTS],
  input  logic       sel_valid [NUM_PORTS],
  output flit_t      out_flit  [NUM_PORTS]
);
  always_comb begin
    for (int o = 0; o < NUM_PORTS; o++) begin
      logic [FLIT_W-1:0] acc;
      acc = '0;
      for (int i = 0; i < NUM_PORTS; i++)
        acc |= {FLIT_W{sel_valid[o] && int'(sel[o]) == i}} & in_flit[i];
      out_flit[o] = flit_t'(acc);
    end
  end

endmodule
