// flit_sram: flit buffer of one router input port.
//
// NUM_VC virtual channels of VC_DEPTH flits each share one array of
// NUM_VC*VC_DEPTH words (4 x 5 = 20 words of 128 bits by default, the size of
// the design description). Word address = vc * VC_DEPTH + slot. One write
// port (buffer write, BW, at the clock edge) and one read port (buffer read,
// BR). The read port is asynchronous: the address is registered by the switch
// allocation stage and the word goes straight into the crossbar in the next
// stage. A separate write and read port is this design's choice so that BW of
// an arriving flit and BR of a departing one can share a cycle; the text
// models the buffer as an SRAM with a single read/write port.
module flit_sram
  import noc_pkg::*;
#(
  parameter int unsigned NUM_VC   = 4,
  parameter int unsigned VC_DEPTH = 5,
  localparam int unsigned WORDS   = NUM_VC * VC_DEPTH,
  localparam int unsigned AW      = $clog2(WORDS)
) (
  input  logic          clk,
  input  logic          we,
  input  logic [AW-1:0] waddr,
  input  flit_t         wdata,
  input  logic [AW-1:0] raddr,
  output flit_t         rdata
);
  flit_t mem [WORDS];

  always_ff @(posedge clk) begin
    if (we) mem[waddr] <= wdata;
  end

  assign rdata = mem[raddr];

endmodule
