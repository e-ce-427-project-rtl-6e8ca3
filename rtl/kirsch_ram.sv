// kirsch_ram: one image row of storage, DEPTH entries of WIDTH bits
// (1 x 256 x 8 by default, the row memory the detector is built from).
//
// Single port, synchronous: on a rising clock edge with i_we = 1 the word
// i_wdata is written at i_addr; every rising edge also registers the word
// stored at i_addr onto o_rdata, so read data appear one cycle after the
// address. A read of the address being written returns the old word.
// The one-cycle registered read is this design's choice; it is what an
// FPGA block RAM provides.
module kirsch_ram #(
  parameter int unsigned DEPTH = 256,
  parameter int unsigned WIDTH = 8,
  localparam int unsigned AW   = (DEPTH > 1) ? $clog2(DEPTH) : 1
) (
  input  logic             i_clock,
  input  logic             i_we,
  input  logic [AW-1:0]    i_addr,
  input  logic [WIDTH-1:0] i_wdata,
  output logic [WIDTH-1:0] o_rdata
);

  logic [WIDTH-1:0] mem [DEPTH];

  always_ff @(posedge i_clock) begin
    if (i_we) mem[i_addr] <= i_wdata;
    o_rdata <= mem[i_addr];
  end

endmodule
