// td_buffer: holds the s time-domain words produced by the IFFT accumulator
// (h = g mod r, m = h*n' mod r, or z = (g + m*n)/r) until the following
// forward transform reads them.
//
// The forward transform reads its first stage in bit-reversed order: input
// group t needs coefficients bitrev(4t)..bitrev(4t+3). Those four words would
// all sit in the same bank of the four-bank RAM, so the words are kept in this
// register array instead, which the first transform stage reads directly,
// four words per cycle. Words with index >= s are zero (h, m and z have s
// words) and are not stored.
//
// Write: two words per cycle, td_w0 to index widx (even), td_w1 to widx+1.
// Read : rdata[k] = word bitrev(4*raddr + k), registered (one-cycle latency,
//        like the RAM), zero-extended to the coefficient width DW: the upper
//        DW-WW bits of rdata are constant zero by construction (the words are
//        non-negative and feed the butterfly as coefficients).
// The buffer itself is this implementation's addition to the architecture;
// see above for why the RAM banks cannot serve this read order.
module td_buffer
  import fftm3_pkg::*;
#(
  parameter int unsigned D  = 64,
  parameter int unsigned WW = 99,
  parameter int unsigned DW = 226,
  localparam int unsigned S   = D / 2,
  localparam int unsigned TDW = $clog2(S),
  localparam int unsigned AW  = (D > 4) ? $clog2(D / 4) : 1
) (
  input  logic           clk,
  input  logic           we,
  input  logic [TDW-1:0] widx,
  input  logic [WW-1:0]  w0,
  input  logic [WW-1:0]  w1,
  input  logic [AW-1:0]  raddr,
  output logic [DW-1:0]  rdata [4]
);
  localparam int unsigned LOGD = $clog2(D);

  logic [WW-1:0] words [S];

  always_ff @(posedge clk) begin
    if (we) begin
      words[widx]        <= w0;
      words[widx | TDW'(1)] <= w1;
    end
  end

  always_ff @(posedge clk) begin
    for (int k = 0; k < 4; k++) begin
      int unsigned pos;
      pos = bitrev(4 * int'(raddr) + k, LOGD);
      rdata[k] <= (pos < S) ? DW'(words[pos[TDW-1:0]]) : '0;
    end
  end
endmodule
