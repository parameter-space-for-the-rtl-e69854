// coeff_mem: the RAM set that holds the coefficient polynomials.
//
// Each polynomial slot is a group of four simple dual-port RAMs (banks
// RAM0..RAM3) of depth D/4. Coefficient position p of a polynomial is kept in
// bank p mod 4 at address p / 4, so one read address returns four consecutive
// coefficients, exactly the four inputs the length-4 sub-stage FFT needs per
// cycle. Writes are per bank (separate enable, address and data), because the
// channel selector writes the upper and lower bank pairs at different
// addresses in the same cycle.
//
// Slots are independent, so the component-wise multiplier can read its two
// operands and the addend from three slots at once, and a transform stage can
// read one slot while writing another (ping-pong storage).
//
// The four-bank interleaving follows the published architecture; the number
// of slots (X, Y, N', N, G and two work slots) is this design's choice.
//
// Timing: one-cycle read latency, as ram_sdp.
module coeff_mem #(
  parameter int unsigned DW    = 226,
  parameter int unsigned D     = 64,
  parameter int unsigned NSLOT = 7,
  localparam int unsigned DEPTH = D / 4,
  localparam int unsigned AW    = (DEPTH > 1) ? $clog2(DEPTH) : 1
) (
  input  logic          clk,
  input  logic [AW-1:0] raddr [NSLOT],
  output logic [DW-1:0] rdata [NSLOT][4],
  input  logic          we    [NSLOT][4],
  input  logic [AW-1:0] waddr [NSLOT][4],
  input  logic [DW-1:0] wdata [NSLOT][4]
);
  for (genvar s = 0; s < NSLOT; s++) begin : g_slot
    for (genvar k = 0; k < 4; k++) begin : g_bank
      ram_sdp #(.DW(DW), .DEPTH(DEPTH), .AW(AW)) u_ram (
        .clk,
        .we    (we[s][k]),
        .waddr (waddr[s][k]),
        .wdata (wdata[s][k]),
        .raddr (raddr[s]),
        .rdata (rdata[s][k])
      );
    end
  end
endmodule
