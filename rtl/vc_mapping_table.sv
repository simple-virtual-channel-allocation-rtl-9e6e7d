// vc_mapping_table: the small content-addressable table of AVADA.
//
// One entry per VC of the downstream input port; an entry is either NULL or
// holds the output port of the downstream router the VC is currently mapped
// to (3 bits per entry, 12 bits for 4 VCs, as in the design description).
// The table is searched for all five directions at once: 'hit[d][v]' is set
// when VC v is mapped to direction d; 'unmapped' lists the NULL entries.
// 'set_valid' maps VC 'set_vc' to 'set_dir' at the clock edge; 'clear[v]'
// returns entry v to NULL (the output unit does this when the VC has drained
// completely). A set wins over a clear of the same entry. All entries are
// NULL after reset.
module vc_mapping_table
  import noc_pkg::*;
#(
  parameter int unsigned NUM_VC = 4
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              set_valid,
  input  vcid_t             set_vc,
  input  port_e             set_dir,
  input  logic [NUM_VC-1:0] clear,
  output logic [NUM_VC-1:0] hit [NUM_PORTS],
  output logic [NUM_VC-1:0] unmapped
);
  localparam logic [2:0] NULL_DIR = 3'b111;

  logic [2:0] entry [NUM_VC];

  always_comb begin
    for (int d = 0; d < NUM_PORTS; d++)
      for (int v = 0; v < NUM_VC; v++)
        hit[d][v] = (entry[v] == 3'(d));
    for (int v = 0; v < NUM_VC; v++)
      unmapped[v] = (entry[v] == NULL_DIR);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int v = 0; v < NUM_VC; v++) entry[v] <= NULL_DIR;
    end else begin
      for (int v = 0; v < NUM_VC; v++) begin
        if (set_valid && int'(set_vc) == v) entry[v] <= set_dir;
        else if (clear[v])                  entry[v] <= NULL_DIR;
      end
    end
  end

endmodule
