// tb_fftm3_controller: checks the control schedule of the sequencer on its
// own, at the default sizes (d = 64, omega = 2^7, q = 2^224 + 1, B = 3).
//
// Host writes: in idle, in_we must enable exactly bank in_pos mod 4 of slot
// in_slot at address in_pos / 4, with BRAM_In_Sel = input.
// For each of several multiplications it monitors:
//  - multiplier writes (BRAM_In_Sel = 1): exactly d per round, each position
//    of the destination slot written once;
//  - transform-stage writes (BRAM_In_Sel = 2): every position of the
//    destination slot written exactly once per stage, 3 (2L-1) d writes in
//    total (the last IFFT stage goes to the accumulator, the first FFT stage
//    reads the word buffer);
//  - the twiddle exponents of every transform group: stage j of the d/4
//    groups uses omega^P, P = floor(k / 2^(L-1-j)) 2^(L-1-j), forward
//    exponent 7P mod 2v, inverse exponent -7P mod 2v; groups issued in order;
//  - accumulator pairs: d/4 per mod-r round, d/4 + K in the div-r round, one
//    `first` per round;
//  - busy during the run, one done pulse.
module tb_fftm3_controller;
  import fftm3_pkg::*;
  localparam int unsigned V = 224, D = 64, LOG2W = 7, MU = 97;
  localparam int unsigned LOGD = 6, Q4 = D / 4, NSLOT = 7, AW = 4, EW = 9;
  localparam int unsigned B = num_segments(V, MU), K = (B + 1) / 2;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  logic start, busy, done, in_we;
  logic [1:0] in_slot;
  logic [LOGD-1:0] in_pos, out_pos;
  logic [2:0] result_slot;
  logic [1:0] out_bank;
  logic [AW-1:0] Read_Addr [NSLOT];
  logic Wrt_En [NSLOT][4];
  logic [AW-1:0] Wrt_Addr [NSLOT][4];
  logic [1:0] BRAM_In_Sel;
  logic [EW-1:0] Shift_Ctrl0, Shift_Ctrl1;
  logic          Shift_Odd0, Shift_Odd1;    // always 0 here (omega = 2^LOG2W)
  logic Transf_Mode, btf_src_td, cs_sel, mul_add_en, acc_valid, acc_first, acc_div;
  logic [2:0] btf_src_slot, mul_a_slot, mul_b_slot;
  logic [AW-1:0] td_raddr;
  logic [1:0] mul_bank, mul_g_bank;
  acc_sel_e acc_sel;

  fftm3_controller #(.V(V), .D(D), .LOG2W(LOG2W), .MU(MU)) dut (.*);

  function automatic int unsigned exp_of(int unsigned k, int unsigned j, bit inv);
    int unsigned sh, p, e;
    sh = LOGD - 1 - j;
    p = (k >> sh) << sh;
    e = (LOG2W * p) % (2 * V);
    return inv ? (2 * V - e) % (2 * V) : e;
  endfunction

  // ------------------------------------------------------------ monitors
  bit monitor;
  int n_mult_w, n_stage_w, n_acc, n_acc_first, n_acc_div, n_done;
  bit seen [NSLOT][D];
  int seen_cnt [NSLOT];
  int tok_n, last_op;
  always @(posedge clk) if (monitor) begin
    // writes
    for (int s = 0; s < NSLOT; s++)
      for (int k = 0; k < 4; k++)
        if (Wrt_En[s][k]) begin
          int unsigned pos;
          pos = 4 * Wrt_Addr[s][k] + k;
          if (BRAM_In_Sel == 2'd1) n_mult_w++;
          else if (BRAM_In_Sel == 2'd2) n_stage_w++;
          else begin failures++; $display("host-path write during a run"); end
          if (seen_cnt[s] == D) begin
            seen_cnt[s] = 0;
            for (int i = 0; i < D; i++) seen[s][i] = 0;
          end
          checks++;
          if (seen[s][pos]) begin
            failures++; $display("slot %0d position %0d written twice in one pass", s, pos);
          end
          seen[s][pos] = 1;
          seen_cnt[s]++;
        end
    // accumulator
    if (acc_valid) begin
      n_acc++;
      if (acc_first) n_acc_first++;
      if (acc_div) n_acc_div++;
    end
    if (done) n_done++;
    // transform tokens at the RAM read stage
    if (dut.rd_tok.valid && dut.rd_tok.op != OP_MULT) begin
      int unsigned j, t, nt;
      bit inv;
      inv = (dut.rd_tok.op == OP_IFFT);
      if (int'(dut.rd_tok.op) != last_op) tok_n = 0;
      last_op = int'(dut.rd_tok.op);
      j = tok_n / Q4;
      if (j > LOGD - 1) j = LOGD - 1;
      t = dut.rd_tok.t;
      checks++;
      if (Transf_Mode != inv) begin failures++; $display("Transf_Mode wrong"); end
      checks++;
      if (Shift_Ctrl0 != EW'(exp_of(2 * t, j, inv)) || Shift_Ctrl1 != EW'(exp_of(2 * t + 1, j, inv))
          || Shift_Odd0 || Shift_Odd1) begin
        failures++;
        $display("stage %0d group %0d: exponents %0d %0d, expected %0d %0d", j, t,
                 Shift_Ctrl0, Shift_Ctrl1, exp_of(2 * t, j, inv), exp_of(2 * t + 1, j, inv));
      end
      // groups in ascending order, except the last division-mode stage
      if (!(inv && j == LOGD - 1 && dut.rd_tok.adiv)) begin
        checks++;
        if (t != tok_n % Q4) begin failures++; $display("group order: got %0d", t); end
      end
      // first forward stage reads the word buffer (its address is issued a
      // cycle earlier, the buffer read being registered)
      checks++;
      if (btf_src_td != (!inv && j == 0)) begin
        failures++; $display("word buffer read control wrong");
      end
      tok_n++;
    end
  end

  int cycles;
  initial begin
    start = 0; in_we = 0; in_slot = 0; in_pos = 0; out_pos = 0; monitor = 0;
    tok_n = 0; last_op = -1;
    repeat (3) @(posedge clk);
    rst_n = 1;
    // host writes
    repeat (200) begin
      @(negedge clk);
      in_we = $urandom % 2; in_slot = $urandom; in_pos = $urandom;
      #1;
      for (int s = 0; s < NSLOT; s++)
        for (int k = 0; k < 4; k++) begin
          bit exp_en;
          exp_en = in_we && s == in_slot && k == in_pos % 4;
          checks++;
          if (Wrt_En[s][k] != exp_en || (exp_en && Wrt_Addr[s][k] != in_pos / 4)
              || BRAM_In_Sel != 2'd0) begin
            failures++; $display("host write control wrong");
          end
        end
      checks++;
      if (busy) begin failures++; $display("busy while idle"); end
    end
    @(negedge clk); in_we = 0;
    // multiplications
    for (int run = 0; run < 3; run++) begin
      n_mult_w = 0; n_stage_w = 0; n_acc = 0; n_acc_first = 0; n_acc_div = 0;
      n_done = 0; tok_n = 0; last_op = -1;
      for (int s = 0; s < NSLOT; s++) begin
        seen_cnt[s] = 0;
        for (int i = 0; i < D; i++) seen[s][i] = 0;
      end
      monitor = 1;
      @(negedge clk); start = 1;
      @(negedge clk); start = 0;
      cycles = 1;
      while (!done) begin
        checks++;
        if (!busy && !done) begin failures++; $display("busy dropped early"); end
        @(negedge clk); cycles++;
        out_pos = $urandom;
      end
      repeat (30) @(negedge clk);
      monitor = 0;
      checks += 8;
      if (n_mult_w != 3 * D) begin failures++; $display("multiplier writes %0d", n_mult_w); end
      if (n_stage_w != 3 * (2 * LOGD - 1) * D) begin failures++; $display("stage writes %0d", n_stage_w); end
      if (n_acc != 3 * Q4 + K) begin failures++; $display("accumulator pairs %0d", n_acc); end
      if (n_acc_first != 3) begin failures++; $display("accumulator first %0d", n_acc_first); end
      if (n_acc_div != Q4 + K) begin failures++; $display("division pairs %0d", n_acc_div); end
      if (n_done != 1) begin failures++; $display("done pulses %0d", n_done); end
      if (busy) begin failures++; $display("still busy"); end
      if (result_slot != 3'd5 && result_slot != 3'd6) begin failures++; $display("result slot %0d", result_slot); end
      $display("run %0d: %0d cycles", run, cycles);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
