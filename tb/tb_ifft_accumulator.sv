// tb_ifft_accumulator: drives the accumulator with last-stage IFFT outputs
// built from known time-domain coefficients, at the default 3,100-bit sizes
// (q = 2^224 + 1, d = 64, mu = 97, B = 3).
//
// The coefficients are those of g + m*n (x, y < 2n random, m = x*y*n' mod r),
// computed as plain word convolutions, so their integer value Z is divisible
// by r. Each coefficient is presented multiplied by d (the accumulator undoes
// this with its d^-1 scaling) and, at random, shifted by -q to exercise the
// correction of negative NLP residues. Groups are fed in the order the
// controller uses (natural order for mod r; kept top groups, bottom groups,
// then replay for div r).
// Checks: mod r: sum w_i b^i = Z (mod r) and < 2r, every word < 2^(mu+2);
// div r: sum u_j b^j = Z / r exactly (this needs the right epsilon), and the
// 3-cycle latency from the last input to the last word write.
module tb_ifft_accumulator;
  import fftm3_pkg::*;
  localparam int unsigned V = 224, D = 64, MU = 97;
  localparam int unsigned S = D / 2, LOGD = 6, RB = MU * S;
  localparam int unsigned B = num_segments(V, MU), K = (B + 1) / 2;
  localparam int unsigned WW = MU + 2;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  typedef logic [8191:0] big_t;
  typedef logic [1023:0] mid_t;

  logic in_valid, first, div_mode;
  acc_sel_e sel;
  logic signed [V+1:0] btf [4];
  logic td_we;
  logic [$clog2(S)-1:0] td_idx;
  logic [WW-1:0] td_w0, td_w1;

  ifft_accumulator #(.V(V), .D(D), .MU(MU)) dut (
    .clk, .rst_n, .in_valid, .first, .div_mode, .sel, .btf, .td_we, .td_idx, .td_w0, .td_w1
  );

  logic [WW-1:0] words [S];
  int last_write;
  int cyc = 0;
  always @(posedge clk) begin
    cyc++;
    if (td_we) begin
      words[td_idx] <= td_w0;
      words[td_idx + 1] <= td_w1;
      last_write = cyc;
    end
  end

  mid_t q;
  mid_t y [D];   // presented IFFT outputs

  function automatic big_t rand_big(int unsigned nbits);
    big_t r = '0;
    for (int i = 0; i < (nbits + 31) / 32; i++) r[i*32 +: 32] = $urandom;
    return r & ((big_t'(1) << nbits) - 1);
  endfunction

  function automatic big_t word(big_t a, int i);
    return (a >> (i * MU)) & ((big_t'(1) << MU) - 1);
  endfunction

  task automatic group(input int t, input acc_sel_e s, input bit f);
    @(negedge clk);
    in_valid = 1; sel = s; first = f;
    btf[0] = (V + 2)'(y[2 * t]);
    btf[1] = (V + 2)'(y[2 * t + 1]);
    btf[2] = (V + 2)'(y[2 * t + S]);
    btf[3] = (V + 2)'(y[2 * t + S + 1]);
  endtask

  big_t n, np, r, rmask, x, yy, m, zval, got;
  mid_t zc [D];
  int last_in;
  int n_eps;

  initial begin
    q = (mid_t'(1) << V) + 1;
    r = big_t'(1) << RB;
    rmask = r - 1;
    in_valid = 0; first = 0; div_mode = 0; sel = ACC_TOP;
    for (int j = 0; j < 4; j++) btf[j] = '0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    n_eps = 0;
    for (int run = 0; run < 8; run++) begin
      n = rand_big(RB - 4) | (big_t'(1) << (RB - 5)) | 1;
      np = 1;
      for (int i = 0; i < 13; i++) np = (np * (2 - n * np)) & rmask;
      np = (r - np) & rmask;
      x = rand_big(RB - 4);
      yy = rand_big(RB - 4);
      m = (((x * yy) & rmask) * np) & rmask;
      zval = x * yy + m * n;
      for (int i = 0; i < D; i++) begin
        big_t c;
        c = '0;
        for (int j = 0; j < S; j++)
          if (i - j >= 0 && i - j < S)
            c = c + word(x, j) * word(yy, i - j) + word(m, j) * word(n, i - j);
        zc[i] = mid_t'(c);
        y[i] = (mid_t'(c) << LOGD) % q;
        if ($urandom % 2) y[i] = y[i] - q;   // negative NLP residue (two's complement)
      end
      // ---- mod r: groups 0..d/4-1, top pairs
      div_mode = 0;
      for (int t = 0; t < D / 4; t++) group(t, ACC_TOP, t == 0);
      @(negedge clk); in_valid = 0;
      repeat (5) @(negedge clk);
      got = '0;
      for (int i = S - 1; i >= 0; i--) begin
        checks++;
        if (words[i] >= 3 * (WW'(1) << MU)) failures++;
        got = (got << MU) + big_t'(words[i]);
      end
      checks++;
      if ((got & rmask) != (zval & rmask)) begin
        failures++; $display("run %0d: mod-r words wrong", run);
      end
      // ---- div r: kept top groups, bottom groups, replay
      div_mode = 1;
      for (int t = 0; t < K; t++) group(D / 4 - K + t, ACC_TOP_SAVE, t == 0);
      for (int t = 0; t < D / 4 - K; t++) group(t, ACC_BOT, 0);
      for (int t = 0; t < K; t++) group(0, ACC_REPLAY, 0);
      last_in = cyc;
      @(negedge clk); in_valid = 0;
      repeat (6) @(negedge clk);
      if (dut.eps_r != 0) n_eps++;
      got = '0;
      for (int i = S - 1; i >= 0; i--) got = (got << MU) + big_t'(words[i]);
      checks++;
      if (got != (zval >> RB)) begin
        failures++; $display("run %0d: quotient wrong (eps=%0d) ", run, dut.eps_r);
      end
      checks++;
      if (last_write - last_in != 4) begin
        failures++; $display("latency %0d", last_write - last_in);
      end
    end
    checks++;
    if (n_eps == 0) begin failures++; $display("epsilon never non-zero"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
