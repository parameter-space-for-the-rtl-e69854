// fft_butterfly: the length-4 sub-stage of the constant-geometry FFT/IFFT.
//
// Each cycle it takes four consecutive coefficients x[0..3] of the current
// stage (positions 4t..4t+3, one from each RAM bank) and runs two radix-2
// decimation-in-time butterflies on them:
//   butterfly A, k = 2t   : X_k = x0 + x1*w^P0,  X_(k+d/2) = x0 - x1*w^P0
//   butterfly B, k = 2t+1 : X_k = x2 + x3*w^P1,  X_(k+d/2) = x2 - x3*w^P1
// The twiddle multiplication is a shift operator (w is a power of two); its
// exponent e0/e1 (Shift_Ctrl) comes from the controller, which also selects
// forward or inverse transform through the sign of the exponent. Every
// operator is followed by a modulo-q reduction, so all values stay (V+2)-bit
// NLP residues.
//
// Output order (as written into the channel selector):
//   y[0] = A sum (X_2t), y[1] = B sum (X_2t+1),
//   y[2] = A difference (X_2t+d/2), y[3] = B difference (X_2t+1+d/2).
// The two-butterfly sub-stage with shift operators and reductions follows the
// published architecture; the 3-cycle pipeline (the published unit is 10
// cycles deep) and the output order are this implementation's choices.
// With SQRT2 set the root is omega = sqrt(2): e0/e1 are then half the twiddle
// exponent and o0/o1 its lowest bit, and an extra register stage multiplies
// the shifted value by sqrt(2) (sqrt2_mult) where the exponent is odd, as the
// published dashed-line path does; LAT becomes 4. Without SQRT2, o0/o1 are
// ignored.
// Timing: fully pipelined, latency LAT = 3 cycles (register after shift and
// reduction, after add/subtract, after the final reduction).
module fft_butterfly #(
  parameter int unsigned V  = 224,
  parameter int unsigned EW = $clog2(2 * V),
  parameter bit          SQRT2 = 1'b0,
  localparam int unsigned LAT = SQRT2 ? 4 : 3
) (
  input  logic                clk,
  input  logic signed [V+1:0] x   [4],
  input  logic [EW-1:0]       e0,
  input  logic [EW-1:0]       e1,
  input  logic                o0,   // odd power of sqrt(2) (SQRT2 only)
  input  logic                o1,
  output logic signed [V+1:0] y   [4]
);
  // stage 1: shift operators (x1, x3), pass-through of x0, x2
  logic signed [V+1:0] t0, t1;
  logic signed [V+1:0] u0_r, u1_r, u2_r, u3_r;

  shift_modq #(.V(V), .EW(EW)) u_sh0 (.x(x[1]), .e(e0), .y(t0));
  shift_modq #(.V(V), .EW(EW)) u_sh1 (.x(x[3]), .e(e1), .y(t1));

  if (SQRT2) begin : g_sqrt2
    // stage 1b: times sqrt(2) where the twiddle exponent is odd
    logic signed [V+1:0] v0_r, v1_r, v2_r, v3_r, r0, r1;
    logic                o0_r, o1_r;
    always_ff @(posedge clk) begin
      v0_r <= x[0];
      v1_r <= t0;
      v2_r <= x[2];
      v3_r <= t1;
      o0_r <= o0;
      o1_r <= o1;
    end
    sqrt2_mult #(.V(V)) u_rt0 (.x(v1_r), .y(r0));
    sqrt2_mult #(.V(V)) u_rt1 (.x(v3_r), .y(r1));
    always_ff @(posedge clk) begin
      u0_r <= v0_r;
      u1_r <= o0_r ? r0 : v1_r;
      u2_r <= v2_r;
      u3_r <= o1_r ? r1 : v3_r;
    end
  end else begin : g_pow2
    always_ff @(posedge clk) begin
      u0_r <= x[0];
      u1_r <= t0;
      u2_r <= x[2];
      u3_r <= t1;
    end
  end

  // stage 2: add / subtract
  logic signed [V+2:0] as_r, ad_r, bs_r, bd_r;
  always_ff @(posedge clk) begin
    as_r <= (V + 3)'(u0_r) + (V + 3)'(u1_r);
    ad_r <= (V + 3)'(u0_r) - (V + 3)'(u1_r);
    bs_r <= (V + 3)'(u2_r) + (V + 3)'(u3_r);
    bd_r <= (V + 3)'(u2_r) - (V + 3)'(u3_r);
  end

  // stage 3: modulo-q reduction
  logic signed [V+1:0] as_m, ad_m, bs_m, bd_m;
  modq_reduce #(.V(V), .IW(V + 3)) u_r0 (.x(as_r), .y(as_m));
  modq_reduce #(.V(V), .IW(V + 3)) u_r1 (.x(ad_r), .y(ad_m));
  modq_reduce #(.V(V), .IW(V + 3)) u_r2 (.x(bs_r), .y(bs_m));
  modq_reduce #(.V(V), .IW(V + 3)) u_r3 (.x(bd_r), .y(bd_m));

  always_ff @(posedge clk) begin
    y[0] <= as_m;
    y[1] <= bs_m;
    y[2] <= ad_m;
    y[3] <= bd_m;
  end
endmodule
