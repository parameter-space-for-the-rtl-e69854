// cw_multiplier: the component-wise modular multiplier of the FFTM3 datapath.
// It computes, one coefficient pair per cycle,
//   y = a * b + (add_en ? c : 0)  (mod q),  q = 2^V + 1,
// which covers steps 1, 5 and 9 of the algorithm (G = X.Y, M = H.N', K = M.N)
// and, with add_en, the spectral-domain addition Z = K + G of step 10 that
// directly follows the last multiplication.
//
// The operands are (V+2)-bit two's complement NLP residues. The product is
// formed by an unsigned Karatsuba multiplier on the magnitudes (the sign is
// carried alongside and applied afterwards; this sign-magnitude wrapping is a
// choice of this implementation). The addend c is delayed inside the module so
// that it is presented together with a and b.
//
// Timing: fully pipelined, no handshake. y belongs to the a, b, c, add_en
// sampled LAT = KLAT + 3 cycles earlier (one input register, the Karatsuba
// latency KLAT, one register after sign and addition, one after the modulo-q
// reduction).
module cw_multiplier
  import fftm3_pkg::*;
#(
  parameter int unsigned V        = 224,
  parameter int unsigned BASE_W   = 17,
  parameter int unsigned BASE_LAT = 1,
  localparam int unsigned W       = V + 2,
  localparam int unsigned KLAT    = BASE_LAT + 3 * kara_depth(W, BASE_W),
  localparam int unsigned LAT     = KLAT + 3
) (
  input  logic                clk,
  input  logic signed [W-1:0] a,
  input  logic signed [W-1:0] b,
  input  logic signed [W-1:0] c,
  input  logic                add_en,
  output logic signed [W-1:0] y
);
  localparam int unsigned PW = 2 * W + 1;

  logic [W-1:0] mag_a, mag_b;
  logic         neg_r;
  logic [2*W-1:0] prod;

  // input register: magnitudes and product sign
  always_ff @(posedge clk) begin
    mag_a <= a[W-1] ? W'(-a) : W'(a);
    mag_b <= b[W-1] ? W'(-b) : W'(b);
    neg_r <= a[W-1] ^ b[W-1];
  end

  karatsuba_mult #(.W(W), .BASE_W(BASE_W), .BASE_LAT(BASE_LAT))
    u_kara (.clk, .a(mag_a), .b(mag_b), .p(prod));

  // delay lines for the sign and for the addend (aligned with prod)
  logic               neg_d  [KLAT];
  logic signed [W-1:0] c_d   [KLAT+1];
  always_ff @(posedge clk) begin
    c_d[0] <= add_en ? c : '0;
    for (int i = 1; i <= KLAT; i++) c_d[i] <= c_d[i-1];
    neg_d[0] <= neg_r;
    for (int i = 1; i < KLAT; i++) neg_d[i] <= neg_d[i-1];
  end

  logic signed [PW-1:0] sprod;
  logic signed [PW:0]   sum_r;
  always_comb sprod = neg_d[KLAT-1] ? -$signed(PW'(prod)) : $signed(PW'(prod));

  always_ff @(posedge clk) sum_r <= (PW + 1)'(sprod) + (PW + 1)'(c_d[KLAT]);

  logic signed [W-1:0] red;
  modq_reduce #(.V(V), .IW(PW + 1)) u_red (.x(sum_r), .y(red));

  always_ff @(posedge clk) y <= red;
endmodule
