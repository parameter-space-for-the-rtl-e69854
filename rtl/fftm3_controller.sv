// fftm3_controller: sequencer of the FFT-based Montgomery multiplier.
//
// It runs the three rounds of the algorithm on the shared datapath, each round
// being "component-wise multiplication, IFFT, FFT":
//   round 0: G = X.Y            -> IFFT -> h = g mod r      -> FFT -> H
//   round 1: M = H.N'           -> IFFT -> m = m mod r      -> FFT -> M
//   round 2: Z = M.N + G        -> IFFT -> z = (g + m n)/r  -> FFT -> Z
// and produces the control signals of the datapath: per-slot read addresses
// (Read_Addr), per-bank write enables and addresses (Wrt_En, Wrt_Addr), the
// source of the RAM write data (BRAM_In_Sel), the shift amounts of the two
// shift operators (Shift_Ctrl), the transform direction (Transf_Mode), and the
// controls of the channel selector, the multiplier operand selection and the
// accumulator.
//
// Work is issued as one token per cycle: a multiplication token for each of
// the d coefficients, a transform token for each of the d/4 input groups of a
// stage. A token is delayed along the pipeline, so every control reaches its
// unit in the cycle the matching data does (RAM read 1 cycle, butterfly
// BLAT, multiplier MLAT). Transform stages overlap: stage j+1 starts PERIOD
// cycles after stage j, as soon as the first group it reads has been written.
// Stages ping-pong between two work slots. Between phases (after the
// multiplication, after the last IFFT stage, after the last FFT stage) the
// pipeline is drained.
//
// Memory slots: 0 X, 1 Y, 2 N', 3 N, 4 G, 5 and 6 work (ping-pong).
// Spectral polynomials are kept in natural order, except the multiplier
// result, which is written in bit-reversed order because the IFFT (the
// constant-geometry network) reads its input bit-reversed. Stage j of a
// transform uses the twiddle exponent P = floor(k / 2^(L-1-j)) * 2^(L-1-j),
// L = log2 d, for butterfly k.
//
// The three-round sequence, the signal names and the stage-by-stage reuse of
// one sub-stage unit follow the published architecture. The token pipeline,
// the stage period, the drains, the always-on ping-pong, the slot map and the
// rotated group order of the division-by-r stage are this design's choices.
//
// With SQRT2 the root is omega = sqrt(2): the exponent P of omega (mod 4V)
// is sent as a shift of floor(P/2) plus an odd flag (Shift_Odd) that makes the
// butterfly multiply by sqrt(2) as well.
//
// Host side: while idle, in_we writes in_data to coefficient in_pos of slot
// in_slot (0..3). start begins a multiplication; busy is high until done
// pulses. The result Z is in slot result_slot.
module fftm3_controller
  import fftm3_pkg::*;
#(
  parameter int unsigned V     = 224,
  parameter int unsigned D     = 64,
  parameter int unsigned LOG2W = 7,
  parameter int unsigned MU    = 97,
  parameter int unsigned MLAT  = 16,
  parameter int unsigned BLAT  = 3,
  parameter bit          SQRT2 = 1'b0,  // omega = sqrt(2) instead of 2^LOG2W
  localparam int unsigned NSLOT = 7,
  localparam int unsigned AW    = (D > 4) ? $clog2(D / 4) : 1,
  localparam int unsigned LOGD  = $clog2(D),
  localparam int unsigned EW    = $clog2(2 * V),
  localparam int unsigned SW    = 3
) (
  input  logic            clk,
  input  logic            rst_n,
  // host
  input  logic            start,
  output logic            busy,
  output logic            done,
  input  logic            in_we,
  input  logic [1:0]      in_slot,
  input  logic [LOGD-1:0] in_pos,
  input  logic [LOGD-1:0] out_pos,
  output logic [SW-1:0]   result_slot,
  output logic [1:0]      out_bank,      // bank of out_pos, aligned with read data
  // memory
  output logic [AW-1:0]   Read_Addr [NSLOT],
  output logic            Wrt_En    [NSLOT][4],
  output logic [AW-1:0]   Wrt_Addr  [NSLOT][4],
  output logic [1:0]      BRAM_In_Sel,   // 0 input, 1 multiplier, 2 channel selector
  // FFT/IFFT unit (aligned with the RAM read data)
  output logic [EW-1:0]   Shift_Ctrl0,
  output logic [EW-1:0]   Shift_Ctrl1,
  output logic            Shift_Odd0,    // odd power of sqrt(2) (SQRT2 only)
  output logic            Shift_Odd1,
  output logic            Transf_Mode,   // 0 FFT, 1 IFFT
  output logic            btf_src_td,
  output logic [SW-1:0]   btf_src_slot,
  output logic [AW-1:0]   td_raddr,
  // channel selector (aligned with the butterfly outputs)
  output logic            cs_sel,
  // multiplier (aligned with the RAM read data)
  output logic [SW-1:0]   mul_a_slot,
  output logic [SW-1:0]   mul_b_slot,
  output logic [1:0]      mul_bank,
  output logic [1:0]      mul_g_bank,
  output logic            mul_add_en,
  // accumulator (aligned with the butterfly outputs)
  output logic            acc_valid,
  output logic            acc_first,
  output acc_sel_e        acc_sel,
  output logic            acc_div
);
  localparam int unsigned Q4    = D / 4;
  localparam int unsigned B     = num_segments(V, MU);
  localparam int unsigned K     = (B + 1) / 2;
  localparam int unsigned PER_A = Q4;
  localparam int unsigned PER_B = D / 8 + BLAT + 2;
  localparam int unsigned PERIOD = (PER_A > PER_B) ? PER_A : PER_B;
  // the last IFFT stage in division mode starts with the top groups
  localparam int unsigned PER_C = Q4 - K + BLAT + 4;
  localparam int unsigned PERIOD_DIV = (PERIOD > PER_C) ? PERIOD : PER_C;
  localparam int unsigned DR_M  = MLAT + 3;
  localparam int unsigned DR_B  = BLAT + 8;
  localparam int unsigned DRAIN = (DR_M > DR_B) ? DR_M : DR_B;
  localparam int unsigned DLY   = ((MLAT + 1) > (BLAT + 2) ? (MLAT + 1) : (BLAT + 2)) + 1;
  localparam int unsigned CW    = $clog2(D + DRAIN + PERIOD_DIV + 4) + 1;

  localparam logic [SW-1:0] SL_X = 3'd0, SL_Y = 3'd1, SL_NP = 3'd2, SL_N = 3'd3,
                            SL_G = 3'd4, SL_WA = 3'd5, SL_WB = 3'd6;

  typedef struct packed {
    logic            valid;
    op_e             op;
    logic            to_acc;     // last IFFT stage: results go to the accumulator
    logic            read_td;    // first FFT stage: operands come from the word buffer
    logic [AW-1:0]   t;          // input group (transform) or address (multiply)
    logic [LOGD-1:0] p;          // coefficient position (multiply)
    logic [SW-1:0]   src;
    logic [SW-1:0]   srcb;
    logic [SW-1:0]   dst;
    logic            add_en;
    logic [EW-1:0]   e0;
    logic [EW-1:0]   e1;
    logic            o0;
    logic            o1;
    acc_sel_e        asel;
    logic            afirst;
    logic            adiv;
  } token_t;

  typedef enum logic [2:0] {ST_IDLE, ST_MULT, ST_IFFT, ST_FFT, ST_WAIT, ST_DONE} state_e;

  state_e          state, next_after_wait;
  logic [1:0]      round;
  logic [LOGD-1:0] stage;
  logic [CW-1:0]   cnt;           // cycle within the current stage / phase
  logic [CW-1:0]   wait_cnt;
  logic [SW-1:0]   cur;           // slot holding the current polynomial
  token_t          tok;
  token_t          pipe [DLY+1];

  function automatic logic [SW-1:0] other(logic [SW-1:0] s);
    return (s == SL_WA) ? SL_WB : SL_WA;
  endfunction

  // ------------------------------------------------------------ token issue
  always_comb begin
    int unsigned tt, k0, k1, sh;
    tok = '0;
    tt  = 0;
    unique case (state)
      ST_MULT: if (cnt < CW'(D)) begin
        tok.valid  = 1'b1;
        tok.op     = OP_MULT;
        tok.p      = LOGD'(cnt);
        tok.t      = AW'(cnt >> 2);
        tok.src    = (round == 2'd0) ? SL_X : cur;
        tok.srcb   = (round == 2'd0) ? SL_Y : ((round == 2'd1) ? SL_NP : SL_N);
        tok.dst    = (round == 2'd0) ? SL_G : other(cur);
        tok.add_en = (round == 2'd2);
      end
      ST_IFFT, ST_FFT: begin
        logic last, div;
        last = (stage == LOGD'(LOGD - 1));
        div  = (round == 2'd2);
        if (state == ST_IFFT && last && div) begin
          // top groups d/4-K..d/4-1 (keeping their bottom pairs), bottom
          // groups 0..d/4-K-1, then the kept pairs
          if (cnt < CW'(K)) begin
            tok.valid = 1'b1; tt = Q4 - K + int'(cnt); tok.asel = ACC_TOP_SAVE;
          end else if (cnt < CW'(Q4)) begin
            tok.valid = 1'b1; tt = int'(cnt) - K;       tok.asel = ACC_BOT;
          end else if (cnt < CW'(Q4 + K)) begin
            tok.valid = 1'b1; tt = 0;                   tok.asel = ACC_REPLAY;
          end
        end else if (cnt < CW'(Q4)) begin
          tok.valid = 1'b1; tt = int'(cnt); tok.asel = ACC_TOP;
        end
        tok.op      = (state == ST_IFFT) ? OP_IFFT : OP_FFT;
        tok.to_acc  = (state == ST_IFFT) && last;
        tok.read_td = (state == ST_FFT) && (stage == '0);
        tok.afirst  = (cnt == '0);
        tok.adiv    = div;
        tok.t       = AW'(tt);
        tok.src     = cur;
        tok.dst     = (state == ST_FFT && stage == '0) ? SL_WA : other(cur);
        sh = LOGD - 1 - int'(stage);
        k0 = 2 * tt;
        k1 = 2 * tt + 1;
        if (SQRT2) begin
          // exponent of sqrt(2), taken mod 4V: shift by half of it, and the
          // lowest bit selects the extra factor sqrt(2)
          int unsigned h0, h1;
          h0 = twiddle_exp((k0 >> sh) << sh, 1, 2 * V, state == ST_IFFT);
          h1 = twiddle_exp((k1 >> sh) << sh, 1, 2 * V, state == ST_IFFT);
          tok.e0 = EW'(h0 >> 1);
          tok.e1 = EW'(h1 >> 1);
          tok.o0 = h0[0];
          tok.o1 = h1[0];
        end else begin
          tok.e0 = EW'(twiddle_exp((k0 >> sh) << sh, LOG2W, V, state == ST_IFFT));
          tok.e1 = EW'(twiddle_exp((k1 >> sh) << sh, LOG2W, V, state == ST_IFFT));
        end
      end
      default: ;
    endcase
  end

  // ------------------------------------------------------------- sequencing
  always_ff @(posedge clk) begin
    if (!rst_n) begin
      state    <= ST_IDLE;
      next_after_wait <= ST_IDLE;
      round    <= '0;
      stage    <= '0;
      cnt      <= '0;
      wait_cnt <= '0;
      cur      <= SL_G;
      done     <= 1'b0;
    end else begin
      done <= 1'b0;
      cnt  <= cnt + 1'b1;
      unique case (state)
        ST_IDLE: if (start) begin
          state <= ST_MULT;
          round <= '0;
          cnt   <= '0;
        end
        ST_MULT: if (cnt == CW'(D - 1)) begin
          cur             <= (round == 2'd0) ? SL_G : other(cur);
          state           <= ST_WAIT;
          wait_cnt        <= CW'(DRAIN);
          next_after_wait <= ST_IFFT;
        end
        ST_IFFT: begin
          if (stage == LOGD'(LOGD - 1)) begin
            if (cnt == CW'((round == 2'd2) ? Q4 + K - 1 : Q4 - 1)) begin
              state           <= ST_WAIT;
              wait_cnt        <= CW'(DRAIN);
              next_after_wait <= ST_FFT;
            end
          end else if (cnt == CW'(((stage == LOGD'(LOGD - 2)) && round == 2'd2)
                                  ? PERIOD_DIV - 1 : PERIOD - 1)) begin
            stage <= stage + 1'b1;
            cnt   <= '0;
            cur   <= other(cur);
          end
        end
        ST_FFT: begin
          if (stage == LOGD'(LOGD - 1)) begin
            if (cnt == CW'(Q4 - 1)) begin
              cur             <= other(cur);
              state           <= ST_WAIT;
              wait_cnt        <= CW'(DRAIN);
              next_after_wait <= (round == 2'd2) ? ST_DONE : ST_MULT;
            end
          end else if (cnt == CW'(PERIOD - 1)) begin
            stage <= stage + 1'b1;
            cnt   <= '0;
            cur   <= (stage == '0) ? SL_WA : other(cur);
          end
        end
        ST_WAIT: begin
          wait_cnt <= wait_cnt - 1'b1;
          if (wait_cnt == '0) begin
            state <= next_after_wait;
            cnt   <= '0;
            stage <= '0;
            if (next_after_wait == ST_MULT && state == ST_WAIT && round != 2'd2)
              round <= round + 1'b1;
          end
        end
        ST_DONE: begin
          done  <= 1'b1;
          state <= ST_IDLE;
        end
        default: state <= ST_IDLE;
      endcase
    end
  end

  assign busy        = (state != ST_IDLE);
  assign result_slot = cur;

  // ------------------------------------------------------------ token delay
  always_ff @(posedge clk) begin
    if (!rst_n) begin
      for (int i = 0; i <= DLY; i++) pipe[i] <= '0;
    end else begin
      pipe[0] <= tok;
      for (int i = 1; i <= DLY; i++) pipe[i] <= pipe[i-1];
    end
  end

  // taps: pipe[0] = RAM data cycle, pipe[BLAT] = butterfly output cycle,
  // pipe[MLAT] = multiplier output cycle
  token_t rd_tok, bo_tok, bo_prev, mo_tok;
  assign rd_tok  = pipe[0];
  assign bo_tok  = pipe[BLAT];
  assign bo_prev = pipe[BLAT+1];
  assign mo_tok  = pipe[MLAT];

  logic [LOGD-1:0] out_pos_r;
  always_ff @(posedge clk) out_pos_r <= out_pos;
  assign out_bank = out_pos_r[1:0];

  // read side
  always_comb begin
    int unsigned gp;
    for (int s = 0; s < NSLOT; s++) Read_Addr[s] = AW'(out_pos >> 2);
    td_raddr = tok.t;
    gp = bitrev(int'(tok.p), LOGD);
    if (tok.valid) begin
      if (tok.op == OP_MULT) begin
        Read_Addr[tok.src]  = tok.t;
        Read_Addr[tok.srcb] = tok.t;
        if (tok.add_en) Read_Addr[SL_G] = AW'(gp >> 2);
      end else if (!tok.read_td) begin
        Read_Addr[tok.src] = tok.t;
      end
    end
  end

  always_comb begin
    Shift_Ctrl0  = rd_tok.e0;
    Shift_Ctrl1  = rd_tok.e1;
    Shift_Odd0   = rd_tok.o0;
    Shift_Odd1   = rd_tok.o1;
    Transf_Mode  = (rd_tok.op == OP_IFFT);
    btf_src_td   = rd_tok.read_td;
    btf_src_slot = rd_tok.src;
    mul_a_slot   = rd_tok.src;
    mul_b_slot   = rd_tok.srcb;
    mul_bank     = rd_tok.p[1:0];
    mul_g_bank   = 2'(bitrev(int'(rd_tok.p), LOGD));
    mul_add_en   = rd_tok.add_en;
  end

  // butterfly output side: channel selector and accumulator
  logic bo_w, bp_w;
  assign bo_w = bo_tok.valid  && (bo_tok.op  != OP_MULT) && !bo_tok.to_acc;
  assign bp_w = bo_prev.valid && (bo_prev.op != OP_MULT) && !bo_prev.to_acc;

  always_comb begin
    cs_sel    = bo_w ? bo_tok.t[0] : ~bo_prev.t[0];
    acc_valid = bo_tok.valid && bo_tok.to_acc;
    acc_first = bo_tok.afirst;
    acc_sel   = bo_tok.asel;
    acc_div   = bo_tok.adiv;
  end

  // write side
  always_comb begin
    int unsigned wp;
    for (int s = 0; s < NSLOT; s++)
      for (int k = 0; k < 4; k++) begin
        Wrt_En[s][k]   = 1'b0;
        Wrt_Addr[s][k] = AW'(in_pos >> 2);
      end
    BRAM_In_Sel = 2'd0;
    wp = bitrev(int'(mo_tok.p), LOGD);
    if (state == ST_IDLE) begin
      if (in_we) Wrt_En[SW'(in_slot)][in_pos[1:0]] = 1'b1;
    end else if (mo_tok.valid && mo_tok.op == OP_MULT) begin
      BRAM_In_Sel = 2'd1;
      Wrt_En[mo_tok.dst][wp % 4]   = 1'b1;
      Wrt_Addr[mo_tok.dst][wp % 4] = AW'(wp / 4);
    end else begin
      BRAM_In_Sel = 2'd2;
      // top pair of the current group: banks 0/1 (even group) or 2/3 (odd)
      if (bo_w) begin
        for (int k = 0; k < 2; k++) begin
          Wrt_En[bo_tok.dst][2 * bo_tok.t[0] + k]   = 1'b1;
          Wrt_Addr[bo_tok.dst][2 * bo_tok.t[0] + k] = bo_tok.t >> 1;
        end
      end
      // registered bottom pair of the previous group, upper half of the slot
      if (bp_w) begin
        for (int k = 0; k < 2; k++) begin
          Wrt_En[bo_prev.dst][2 * bo_prev.t[0] + k]   = 1'b1;
          Wrt_Addr[bo_prev.dst][2 * bo_prev.t[0] + k] = AW'((bo_prev.t >> 1) + AW'(D / 8));
        end
      end
    end
  end
endmodule
