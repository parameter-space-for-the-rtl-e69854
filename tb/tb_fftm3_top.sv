// tb_fftm3_top: end-to-end test of the FFT-based Montgomery multiplier at its
// default (3,100-bit) parameters.
//
// For random odd moduli n of l = MU*s - 4 bits and operands x, y < 2n the
// testbench computes with plain wide-integer arithmetic n' = -n^-1 mod r, the
// words of x, y, n, n' and their length-d transforms over Z_q (a direct
// O(d^2) sum, not the butterfly network), loads X, Y, N', N, runs one
// multiplication and reads Z back. It then inverts Z with a direct sum and
// checks that
//   * the upper s time-domain words of z are zero and the lower ones fit in
//     MU+2 bits,
//   * z = x*y*r^-1 (mod n) and z equals the Montgomery value (x*y + m*n)/r
//     or that value plus n, and z < 3n,
//   * the multiplication takes the cycle count of the schedule.
// A last multiplication feeds the result Z of the previous one back as X
// (chained use, operand in non-least-positive form, x < 3n).
// It also counts how often each mechanism occurred (multiply-accumulate of
// step 10, modulo-r and division-by-r passes, non-zero epsilon, replay of kept
// pairs, both channel-selector routings, both ping-pong work slots) and
// counts a failure for any that never occurred.
module tb_fftm3_top;
  import fftm3_pkg::*;

  localparam int unsigned V     = 224;
  localparam int unsigned D     = 64;
  localparam int unsigned LOG2W = 7;
  localparam int unsigned MU    = 97;
  localparam int unsigned S     = D / 2;
  localparam int unsigned L     = MU * S - 4;
  localparam int unsigned RB    = MU * S;          // r = 2^RB
  localparam int unsigned LOGD  = $clog2(D);
  localparam int unsigned DW    = V + 2;
  localparam int unsigned NRUN  = 4;

  typedef logic [8191:0] big_t;
  typedef logic [1023:0] mid_t;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic start, busy, done, in_we;
  logic [1:0] in_slot;
  logic [LOGD-1:0] in_pos, out_pos;
  logic signed [DW-1:0] in_data, out_data;

  fftm3_top dut (
    .clk, .rst_n, .start, .busy, .done, .in_we, .in_slot, .in_pos, .in_data,
    .out_pos, .out_data
  );

  int checks = 0, failures = 0;

  // watchdog
  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  mid_t q;

  function automatic mid_t mulpow2(mid_t a, int unsigned e);
    mid_t t;
    t = a << (e % (2 * V));
    return t % q;
  endfunction

  function automatic big_t rand_big(int unsigned nbits);
    big_t r = '0;
    for (int i = 0; i < (nbits + 31) / 32; i++) r[i*32 +: 32] = $urandom;
    return r & ((big_t'(1) << nbits) - 1);
  endfunction

  // a mod m by binary long division (operands too wide for the % operator)
  function automatic big_t big_mod(big_t a, big_t m);
    big_t rem = '0;
    for (int i = $bits(big_t) - 1; i >= 0; i--) begin
      rem = (rem << 1) | big_t'(a[i]);
      if (rem >= m) rem = rem - m;
    end
    return rem;
  endfunction

  // forward transform of the s words of a (word size MU) over Z_q
  task automatic spectral(input big_t a, output mid_t X [D]);
    mid_t w [S];
    for (int i = 0; i < S; i++) w[i] = mid_t'((a >> (i * MU)) & ((big_t'(1) << MU) - 1));
    for (int k = 0; k < D; k++) begin
      mid_t acc = '0;
      for (int i = 0; i < S; i++) acc = (acc + mulpow2(w[i], (LOG2W * i * k) % (2 * V))) % q;
      X[k] = acc;
    end
  endtask

  // inverse transform: returns the d time-domain coefficients in [0, q)
  task automatic inverse(input mid_t Z [D], output mid_t zt [D]);
    for (int i = 0; i < D; i++) begin
      mid_t acc = '0;
      for (int k = 0; k < D; k++) begin
        int unsigned e;
        e = (2 * V - (LOG2W * i * k) % (2 * V)) % (2 * V);
        acc = (acc + mulpow2(Z[k], e)) % q;
      end
      zt[i] = mulpow2(acc, (2 * V - LOGD) % (2 * V));
    end
  endtask

  task automatic load(input int slot, input mid_t X [D]);
    for (int k = 0; k < D; k++) begin
      @(negedge clk);
      in_we = 1; in_slot = 2'(slot); in_pos = LOGD'(k); in_data = DW'(X[k]);
    end
    @(negedge clk);
    in_we = 0;
  endtask

  // event counters
  int n_add = 0, n_modr = 0, n_divr = 0, n_eps = 0, n_replay = 0, n_dash = 0, n_wa = 0, n_wb = 0;
  always @(posedge clk) if (rst_n) begin
    if (dut.u_mul.add_en) n_add++;
    if (dut.acc_valid && dut.acc_first && !dut.acc_div) n_modr++;
    if (dut.acc_valid && dut.acc_first &&  dut.acc_div) n_divr++;
    if (dut.acc_valid && dut.acc_sel == ACC_REPLAY) n_replay++;
    if (dut.u_acc.td_we && dut.u_acc.eps_r != 0 && dut.u_acc.td_idx == 0 && dut.acc_div) n_eps++;
    if (dut.BRAM_In_Sel == 2'd2 && dut.cs_sel) n_dash++;
    for (int k = 0; k < 4; k++) begin
      if (dut.Wrt_En[5][k]) n_wa++;
      if (dut.Wrt_En[6][k]) n_wb++;
    end
  end

  big_t n, r, rmask, np, x, y, zref, zgot, xy, m;
  mid_t Xs [D], Ys [D], Ns [D], NPs [D], Zs [D], zt [D];
  int cycles, exp_cycles;
  bit ok;

  initial begin
    q = (mid_t'(1) << V) + 1;
    r = big_t'(1) << RB;
    rmask = r - 1;
    start = 0; in_we = 0; in_slot = 0; in_pos = 0; in_data = 0; out_pos = 0;
    repeat (3) @(posedge clk);
    rst_n = 1;

    // cycles of one multiplication from the schedule of the controller:
    // per round d multiply slots + drain, (L-1) overlapped IFFT stages,
    // the last IFFT stage (d/4 groups, plus K kept pairs in the last round),
    // drain, (L-1) overlapped FFT stages, the last one, drain.
    begin
      int per, perd, drain, mlat, k, b;
      mlat  = 1 + 3 * kara_depth(DW, 17) + 3;
      drain = ((mlat + 3) > 11 ? (mlat + 3) : 11) + 1;
      per   = (D / 4 > D / 8 + 5) ? D / 4 : D / 8 + 5;
      b     = num_segments(V, MU);
      k     = (b + 1) / 2;
      perd  = (per > D / 4 - k + 7) ? per : D / 4 - k + 7;
      exp_cycles = 3 * (D + drain + (LOGD - 1) * per + D / 4 + drain
                        + (LOGD - 1) * per + D / 4 + drain)
                   + (perd - per) + k
                   + 1      // final state that raises done
                   + 1;     // done is registered
    end

    for (int run = 0; run < NRUN; run++) begin
      if (run == 0 || run == 2) begin
        n = rand_big(L) | (big_t'(1) << (L - 1)) | 1;
        // n' = -n^-1 mod r by Newton iteration
        np = 1;
        for (int i = 0; i < 13; i++) np = (np * (2 - n * np)) & rmask;
        np = (r - np) & rmask;
        if (((n * np + 1) & rmask) != 0) $display("reference n' wrong");
        spectral(n, Ns);
        spectral(np, NPs);
        load(2, NPs);
        load(3, Ns);
      end
      if (run == NRUN - 1) begin
        // chained: previous result (NLP spectral) becomes X
        x = zgot;
        for (int k2 = 0; k2 < D; k2++) Xs[k2] = Zs[k2];
      end else begin
        x = rand_big(L);      // < 2^L <= 2n
        spectral(x, Xs);
      end
      y = rand_big(L);
      spectral(y, Ys);
      load(0, Xs);
      load(1, Ys);

      @(negedge clk); start = 1;
      @(negedge clk); start = 0;
      cycles = 1;
      while (!done) begin @(negedge clk); cycles++; end

      // read Z back, as residues in [0, q)
      for (int k2 = 0; k2 < D; k2++) begin
        @(negedge clk); out_pos = LOGD'(k2);
        @(negedge clk);
        begin
          logic signed [DW:0] v;
          v = (DW + 1)'(out_data);
          if (v < 0) v = v + (DW + 1)'(q);
          Zs[k2] = mid_t'(v);
        end
      end
      inverse(Zs, zt);
      ok = 1;
      zgot = '0;
      for (int i = D - 1; i >= 0; i--) begin
        if (i >= S && zt[i] != 0) ok = 0;
        if (i < S && zt[i] >= (mid_t'(1) << (MU + 2))) ok = 0;
        zgot = (zgot << MU) + big_t'(zt[i]);
      end
      checks++;
      if (!ok) begin failures++; $display("run %0d: time-domain words out of range", run); end

      // reference Montgomery product
      xy   = x * y;
      m    = ((xy & rmask) * np) & rmask;
      zref = (xy + m * n) >> RB;
      checks++;
      if (!(zgot == zref || zgot == zref + n)) begin
        failures++; $display("run %0d: z differs from the Montgomery value", run);
      end
      checks++;
      if (big_mod(zgot << RB, n) != big_mod(xy, n)) begin
        failures++; $display("run %0d: z != x*y/r mod n", run);
      end
      checks++;
      if (zgot >= 3 * n) begin failures++; $display("run %0d: z >= 3n", run); end
      checks++;
      if (cycles != exp_cycles) begin
        failures++; $display("run %0d: %0d cycles, schedule says %0d", run, cycles, exp_cycles);
      end
      $display("run %0d: %0d cycles, z %s", run, cycles, (zgot == zref) ? "= ref" : "= ref + n");
    end

    // every mechanism must have occurred
    checks++; if (n_add == 0)    begin failures++; $display("no multiply-add"); end
    checks++; if (n_modr == 0)   begin failures++; $display("no mod-r pass"); end
    checks++; if (n_divr == 0)   begin failures++; $display("no div-r pass"); end
    checks++; if (n_eps == 0)    begin failures++; $display("epsilon never non-zero"); end
    checks++; if (n_replay == 0) begin failures++; $display("no replay of kept pairs"); end
    checks++; if (n_dash == 0)   begin failures++; $display("channel selector never crossed"); end
    checks++; if (n_wa == 0 || n_wb == 0) begin failures++; $display("ping-pong unused"); end
    $display("events: add=%0d modr=%0d divr=%0d eps=%0d replay=%0d dash=%0d wa=%0d wb=%0d",
             n_add, n_modr, n_divr, n_eps, n_replay, n_dash, n_wa, n_wb);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
