// ram_sdp: simple dual-port RAM with one dedicated write port and one
// dedicated read port, the storage primitive of the coefficient memory
// (a block RAM on an FPGA).
//
// Write: when we is high, mem[waddr] <= wdata at the clock edge.
// Read : rdata <= mem[raddr] at every clock edge (one cycle latency). A read of
// the address being written in the same cycle returns the old contents.
// The array has no reset; the contents are undefined until written.
// The one-read/one-write organisation follows the published architecture; the
// one-cycle read latency and old-data read-during-write are this design's
// choices (they match FPGA block RAM).
module ram_sdp #(
  parameter int unsigned DW    = 226,
  parameter int unsigned DEPTH = 16,
  parameter int unsigned AW    = (DEPTH > 1) ? $clog2(DEPTH) : 1
) (
  input  logic          clk,
  input  logic          we,
  input  logic [AW-1:0] waddr,
  input  logic [DW-1:0] wdata,
  input  logic [AW-1:0] raddr,
  output logic [DW-1:0] rdata
);
  logic [DW-1:0] mem [DEPTH];

  always_ff @(posedge clk) begin
    if (we) mem[waddr] <= wdata;
    rdata <= mem[raddr];
  end
endmodule
