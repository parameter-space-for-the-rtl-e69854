// shift_modq: the shift operator of the FFT/IFFT datapath followed by its
// modulo-q reduction. It multiplies a (V+2)-bit NLP residue by 2^e modulo
// q = 2^V + 1, which is how the twiddle factor omega^P (omega a power of two)
// and the IFFT scale factor d^-1 (also a power of two) are applied.
//
// The exponent e is given modulo 2V (2^(2V) = 1 mod q). For e >= V the
// operator uses 2^e = -2^(e-V), so the physical shift is always below V bits
// and the shifted value stays under 2V+3 bits; one modq_reduce then brings it
// back to V+2 bits. Folding the shift amount this way, instead of a wide shift
// followed by a wide reduction, is a choice of this implementation.
//
// Purely combinational.
//   x : (V+2)-bit signed input
//   e : exponent, 0 <= e < 2V (values >= 2V are taken modulo 2V)
//   y : (V+2)-bit signed, y = x * 2^e (mod q)
module shift_modq #(
  parameter int unsigned V  = 224,
  parameter int unsigned EW = $clog2(2 * V)
) (
  input  logic signed [V+1:0] x,
  input  logic [EW-1:0]       e,
  output logic signed [V+1:0] y
);
  localparam int unsigned SW = 2 * V + 3;

  logic signed [SW-1:0] shifted;

  always_comb begin
    int unsigned ee;
    logic        neg;
    ee  = int'(e) % (2 * V);
    neg = (ee >= V);
    if (neg) ee = ee - V;
    shifted = SW'(x) <<< ee;
    if (neg) shifted = -shifted;
  end

  modq_reduce #(.V(V), .IW(SW)) u_red (.x(shifted), .y(y));
endmodule
