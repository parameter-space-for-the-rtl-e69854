// modq_reduce: fast reduction modulo the Fermat-style ring q = 2^V + 1 ("M" in
// the FFT/IFFT datapath).
//
// Because 2^V = -1 (mod q), a number split into V-bit chunks x = sum x_i 2^(iV)
// is congruent to the alternating sum x_0 - x_1 + x_2 - ... The result is used
// as it is, without the final correction into [0, q): it is a non-least-positive
// residue that fits in V+2 bits two's complement. The low chunks are unsigned;
// the top chunk keeps the sign of the input, so negative inputs reduce
// correctly. At most three chunks are supported (IW <= 3V), enough for every
// product and sum in the design.
//
// The chunked alternating sum and the NLP output follow the published
// architecture; the three-chunk limit and the signed top chunk are this
// implementation's choices.
//
// Purely combinational: the pipeline registers sit in the modules that use it.
//   x : IW-bit signed input
//   y : (V+2)-bit signed residue, y = x (mod q), |y| < 2^V + 2^(IW-2V) + 1
module modq_reduce #(
  parameter int unsigned V  = 224,
  parameter int unsigned IW = 2 * V + 4
) (
  input  logic signed [IW-1:0]  x,
  output logic signed [V+1:0]   y
);
  localparam int unsigned NCH = (IW + V - 1) / V;

  initial begin
    assert (NCH <= 3) else $error("modq_reduce: IW must not exceed 3*V");
  end

  logic signed [V+3:0] acc;

  always_comb begin
    logic signed [V+3:0] chunk;
    acc = '0;
    for (int unsigned k = 0; k < NCH; k++) begin
      if (k == NCH - 1) begin
        // top chunk, sign-extended
        chunk = (V + 4)'(x >>> (k * V));
      end else begin
        chunk = (V + 4)'({1'b0, V'(x >> (k * V))});
      end
      if (k % 2 == 0) acc = acc + chunk;
      else            acc = acc - chunk;
    end
    y = acc[V+1:0];
  end
endmodule
