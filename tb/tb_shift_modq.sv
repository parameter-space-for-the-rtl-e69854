// tb_shift_modq: checks y = x * 2^e (mod q), q = 2^224 + 1, for random signed
// (V+2)-bit x and every exponent class: e below V, e at and above V (where the
// operator negates) and e = 0. Reference: (x * 2^e - y) mod q == 0 with wide
// arithmetic.
module tb_shift_modq;
  localparam int unsigned V  = 224;
  localparam int unsigned EW = $clog2(2 * V);

  logic clk = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  logic signed [V+1:0] x, y;
  logic [EW-1:0]       e;
  shift_modq #(.V(V)) dut (.x, .e, .y);

  typedef logic signed [1023:0] w_t;
  w_t q, diff;

  initial begin
    q = (w_t'(1) <<< V) + 1;
    for (int i = 0; i < 3000; i++) begin
      for (int k = 0; k < V + 2; k += 32) x[k +: 32] = $urandom;
      e = EW'($urandom % (2 * V));
      if (i < 4) e = EW'(i == 0 ? 0 : (i == 1 ? V : (i == 2 ? V - 1 : 2 * V - 1)));
      #1;
      diff = (w_t'(x) <<< int'(e)) - w_t'(y);
      checks++;
      if ((diff % q) != 0) begin
        failures++;
        $display("mismatch x=%h e=%0d y=%h", x, e, y);
      end
      @(posedge clk);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
