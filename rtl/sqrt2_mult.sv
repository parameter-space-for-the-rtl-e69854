// sqrt2_mult: multiplication by sqrt(2) modulo q = 2^V + 1, the extra operator
// a transform with root omega = sqrt(2) needs for odd twiddle exponents.
//
// Modulo q, sqrt(2) = 2^(V/4) * (2^(V/2) - 1) = 2^(3V/4) - 2^(V/4) (its square
// is 2^(3V/2) - 2*2^V + 2^(V/2) = -2^(V/2) + 2 + 2^(V/2) = 2, using 2^V = -1).
// So y = x * 2^(3V/4) - x * 2^(V/4): two constant shifts, each with its
// modulo-q reduction, one subtraction and a final reduction, as in the
// published dashed-line path of the sub-stage unit. V must be a multiple of 4.
//
// Purely combinational (the butterfly registers its output).
//   x : (V+2)-bit signed NLP residue
//   y : (V+2)-bit signed NLP residue, y = x * sqrt(2) (mod q)
module sqrt2_mult #(
  parameter int unsigned V = 224
) (
  input  logic signed [V+1:0] x,
  output logic signed [V+1:0] y
);
  localparam int unsigned EW = $clog2(2 * V);
  localparam logic [EW-1:0] E_HI = EW'(3 * V / 4);
  localparam logic [EW-1:0] E_LO = EW'(V / 4);

  initial begin
    assert (V % 4 == 0) else $error("sqrt2_mult: V must be a multiple of 4");
  end

  logic signed [V+1:0] hi, lo;
  logic signed [V+2:0] diff;

  shift_modq #(.V(V), .EW(EW)) u_hi (.x(x), .e(E_HI), .y(hi));
  shift_modq #(.V(V), .EW(EW)) u_lo (.x(x), .e(E_LO), .y(lo));

  assign diff = (V + 3)'(hi) - (V + 3)'(lo);

  modq_reduce #(.V(V), .IW(V + 3)) u_red (.x(diff), .y(y));
endmodule
