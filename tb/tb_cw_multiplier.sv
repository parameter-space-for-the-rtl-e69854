// tb_cw_multiplier: streams random signed NLP residues a, b, addends c and
// add_en into the component-wise modular multiplier (q = 2^224 + 1) and checks
// that each output, LAT = 16 cycles later, is congruent to a*b (+ c) modulo q
// and lies in the (V+2)-bit NLP range.
module tb_cw_multiplier;
  localparam int unsigned V   = 224;
  localparam int unsigned W   = V + 2;
  localparam int unsigned LAT = 16;
  localparam int unsigned N   = 300;

  logic clk = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  typedef logic signed [1023:0] w_t;
  logic signed [W-1:0] a, b, c, y;
  logic add_en;
  w_t expq [N + LAT];
  w_t q, lim;

  cw_multiplier #(.V(V)) dut (.clk, .a, .b, .c, .add_en, .y);

  // random value in [-2^V, 2^V + 3], the range produced by the datapath
  function automatic logic signed [W-1:0] rnd();
    logic signed [W-1:0] r;
    for (int k = 0; k < W; k += 32) r[k +: 32] = $urandom;
    r = r >>> 1;
    return r;
  endfunction

  initial begin
    q   = (w_t'(1) <<< V) + 1;
    lim = (w_t'(1) <<< V) + 64;
    for (int i = 0; i < N + LAT; i++) begin
      @(negedge clk);
      if (i < N) begin
        a = rnd(); b = rnd(); c = rnd(); add_en = 1'($urandom);
        if (i == 0) begin a = W'(1) <<< V; b = W'(1) <<< V; end   // (-1)*(-1)
        if (i == 1) begin a = -(W'(1) <<< V); b = W'(1) <<< V; end
        expq[i] = w_t'(a) * w_t'(b) + (add_en ? w_t'(c) : 0);
      end
      if (i >= LAT) begin
        checks++;
        if (((expq[i - LAT] - w_t'(y)) % q) != 0 || w_t'(y) > lim || w_t'(y) < -lim) begin
          failures++;
          $display("result %0d wrong: %h", i - LAT, y);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
