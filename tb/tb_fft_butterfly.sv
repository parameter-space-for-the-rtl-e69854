// tb_fft_butterfly: streams random groups of four NLP residues and random
// shift exponents into the length-4 sub-stage and checks, 3 cycles later,
//   y0 = x0 + x1*2^e0, y2 = x0 - x1*2^e0, y1 = x2 + x3*2^e1, y3 = x2 - x3*2^e1
// modulo q = 2^224 + 1, plus the NLP output range.
// A second instance with SQRT2 = 1 gets the same inputs plus random odd flags
// o0/o1 and is checked 4 cycles later against the same sums with x1*2^e0 (and
// x3*2^e1) further multiplied by sqrt(2) = 2^168 - 2^56 where the flag is set.
module tb_fft_butterfly;
  localparam int unsigned V   = 224;
  localparam int unsigned W   = V + 2;
  localparam int unsigned EW  = $clog2(2 * V);
  localparam int unsigned LAT = 3;
  localparam int unsigned N   = 500;
  localparam int unsigned LS  = 4;

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
  logic signed [W-1:0] x [4];
  logic signed [W-1:0] y [4];
  logic signed [W-1:0] ys [4];
  logic [EW-1:0] e0, e1;
  logic o0, o1;
  w_t expq [N + LS][4];
  w_t exps [N + LS][4];
  w_t q, lim, s2;

  fft_butterfly #(.V(V)) dut (.clk, .x, .e0, .e1, .o0(1'b0), .o1(1'b0), .y);
  fft_butterfly #(.V(V), .SQRT2(1'b1)) dut_s (.clk, .x, .e0, .e1, .o0, .o1, .y(ys));

  initial begin
    q   = (w_t'(1) <<< V) + 1;
    lim = (w_t'(1) <<< V) + 64;
    s2  = (w_t'(1) <<< (3 * V / 4)) - (w_t'(1) <<< (V / 4));
    for (int i = 0; i < N + LS; i++) begin
      @(negedge clk);
      if (i < N) begin
        w_t t0, t1;
        for (int j = 0; j < 4; j++) begin
          for (int k = 0; k < W; k += 32) x[j][k +: 32] = $urandom;
          x[j] = x[j] >>> 1;
        end
        e0 = EW'($urandom % (2 * V));
        e1 = EW'($urandom % (2 * V));
        t0 = w_t'(x[1]) <<< int'(e0);
        t1 = w_t'(x[3]) <<< int'(e1);
        expq[i][0] = w_t'(x[0]) + t0;
        expq[i][1] = w_t'(x[2]) + t1;
        expq[i][2] = w_t'(x[0]) - t0;
        expq[i][3] = w_t'(x[2]) - t1;
        o0 = 1'($urandom);
        o1 = 1'($urandom);
        if (o0) t0 = t0 * s2;
        if (o1) t1 = t1 * s2;
        exps[i][0] = w_t'(x[0]) + t0;
        exps[i][1] = w_t'(x[2]) + t1;
        exps[i][2] = w_t'(x[0]) - t0;
        exps[i][3] = w_t'(x[2]) - t1;
      end
      if (i >= LS) begin
        for (int j = 0; j < 4; j++) begin
          checks++;
          if (((exps[i - LS][j] - w_t'(ys[j])) % q) != 0 || w_t'(ys[j]) > lim || w_t'(ys[j]) < -lim) begin
            failures++;
            $display("sqrt(2) unit: group %0d output %0d wrong", i - LS, j);
          end
        end
      end
      if (i >= LAT && i < N + LAT) begin
        for (int j = 0; j < 4; j++) begin
          checks++;
          if (((expq[i - LAT][j] - w_t'(y[j])) % q) != 0 || w_t'(y[j]) > lim || w_t'(y[j]) < -lim) begin
            failures++;
            $display("group %0d output %0d wrong", i - LAT, j);
          end
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
