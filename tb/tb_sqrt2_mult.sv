// tb_sqrt2_mult: checks the multiplication by sqrt(2) modulo q = 2^224 + 1 on
// random and edge residues: applying it twice must give 2x (mod q), and the
// output must stay a (V+2)-bit residue below 2^(V+1) in magnitude. The check
// uses only the defining property of sqrt(2), not the shift formula.
module tb_sqrt2_mult;
  localparam int unsigned V = 224;
  int checks = 0, failures = 0;

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  logic signed [V+1:0] x, y, z;
  sqrt2_mult #(.V(V)) u1 (.x(x), .y(y));
  sqrt2_mult #(.V(V)) u2 (.x(y), .y(z));

  typedef logic signed [511:0] w_t;
  w_t q;

  function automatic w_t md(w_t a);
    w_t r;
    r = a % q;
    if (r < 0) r = r + q;
    return r;
  endfunction

  initial begin
    q = (w_t'(1) << V) + 1;
    for (int i = 0; i < 3000; i++) begin
      for (int k = 0; k < 8; k++) x[k*32 +: 32] = $urandom;
      x[V+1:V] = 2'($urandom);
      if (i == 0) x = '0;
      if (i == 1) x = 1;
      if (i == 2) x = {2'b01, {V{1'b0}}};   // 2^V
      if (i == 3) x = {2'b10, {V{1'b0}}};   // most negative
      #1;
      checks++;
      if (md(w_t'(z)) != md(2 * w_t'(x))) begin
        failures++; $display("sqrt2(sqrt2(x)) != 2x for x=%h", x);
      end
      checks++;
      if (w_t'(y) >= (w_t'(1) << (V + 1)) || w_t'(y) < -(w_t'(1) << (V + 1))) begin
        failures++; $display("output out of range");
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
