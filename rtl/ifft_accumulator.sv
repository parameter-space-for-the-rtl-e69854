// ifft_accumulator: the back end of the last inverse-transform stage. It turns
// the IFFT output coefficients into the words of a time-domain integer and
// performs the modulo-r or division-by-r step of the Montgomery algorithm on
// the fly (r = b^s, b = 2^MU, s = D/2).
//
// Per valid cycle it takes one pair of coefficients from the four butterfly
// outputs (sel: top pair, top pair while keeping the bottom pair, bottom pair,
// or a kept pair), and then
//   1. multiplies both by d^-1 (a power of two, so a shift and a modulo-q
//      reduction),
//   2. corrects each NLP residue to its exact value in [0, q) (the true
//      convolution coefficient is known to lie in that range),
//   3. chops each coefficient z_i into B = ceil((V+2)/MU) segments z_i0..z_i(B-1)
//      and forms the carry-save words w_i = z_i0 + z_(i-1)1 + ... + z_(i-B+1)(B-1)
//      (MU+2 bits each, non-least-positive form).
// The coefficients must arrive in ascending index order, two per cycle,
// starting at index first_idx; the last B-1 coefficients are kept as history.
//
// mod-r mode (div_mode = 0): coefficients z_0..z_(s-1) are streamed; words
// w_0..w_(s-1) are written to td index i, the carry of w_(s-1) is dropped.
// div-r mode (div_mode = 1): coefficients from z_(s-2K), K = ceil(B/2), up to
// z_(d-1) are streamed. w_(s-1) is not stored but gives the correction
// epsilon; words w_s..w_(d-1) are written to td index i-s, with epsilon added
// to the lowest one. For B = 3 epsilon comes from the two top bits a1 a0 of
// z_(s-1)0 and b1 b0 of z_(s-2)1:
//   eps[0] = (a1^a0) | (b1^b0) | (a1^b1),  eps[1] = a1 & a0 & b1 & b0;
// for other B it is the carry of w_(s-1), plus one when its low MU bits are
// non-zero (the same rule, without the two-bit simplification).
//
// The d^-1 scaling, the carry-save words, dropping the top carry for mod r and
// the epsilon gates for div r follow the published architecture. The exact
// correction to [0,q), the pair-wise streaming and the kept/replayed pairs that
// keep the stream ascending are this design's choices.
//
// Timing: 3 pipeline registers from a valid input to td_we (d^-1 scaling,
// correction, word formation). `first` marks the first pair of an
// accumulation and resets the history, the pair counter and the kept pairs.
module ifft_accumulator
  import fftm3_pkg::*;
#(
  parameter int unsigned V  = 224,
  parameter int unsigned D  = 64,
  parameter int unsigned MU = 97,
  localparam int unsigned S     = D / 2,
  localparam int unsigned B     = num_segments(V, MU),
  localparam int unsigned K     = (B + 1) / 2,
  localparam int unsigned WW    = MU + 2,
  localparam int unsigned IW    = $clog2(D) + 1,
  localparam int unsigned TDW   = $clog2(S)
) (
  input  logic                clk,
  input  logic                rst_n,
  input  logic                in_valid,
  input  logic                first,
  input  logic                div_mode,
  input  acc_sel_e            sel,
  input  logic signed [V+1:0] btf [4],
  output logic                td_we,
  output logic [TDW-1:0]      td_idx,   // even; words go to td_idx and td_idx+1
  output logic [WW-1:0]       td_w0,
  output logic [WW-1:0]       td_w1
);
  localparam int unsigned EW   = $clog2(2 * V);
  localparam int unsigned LOGD = $clog2(D);
  localparam logic [EW-1:0] E_DINV = EW'((2 * V - LOGD) % (2 * V));
  localparam int unsigned HIST = (B > 1) ? B - 1 : 1;
  localparam int unsigned KW   = (K > 1) ? $clog2(K) : 1;

  initial begin
    assert (B >= 2 && B <= 4) else $error("ifft_accumulator: needs 2 <= B <= 4");
  end

  // ---------------------------------------------------------------- select
  logic signed [V+1:0] keep0 [K];
  logic signed [V+1:0] keep1 [K];
  logic [KW-1:0]       kwr, krd;
  logic signed [V+1:0] p0, p1;

  always_comb begin
    unique case (sel)
      ACC_TOP, ACC_TOP_SAVE: begin p0 = btf[0]; p1 = btf[1]; end
      ACC_BOT:               begin p0 = btf[2]; p1 = btf[3]; end
      default:               begin p0 = keep0[krd]; p1 = keep1[krd]; end
    endcase
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      kwr <= '0;
      krd <= '0;
    end else if (in_valid) begin
      if (sel == ACC_TOP_SAVE) begin
        keep0[first ? '0 : kwr] <= btf[2];
        keep1[first ? '0 : kwr] <= btf[3];
        kwr <= first ? KW'(1) : kwr + 1'b1;
      end else if (first) begin
        kwr <= '0;
      end
      if (first)                   krd <= '0;
      else if (sel == ACC_REPLAY)  krd <= krd + 1'b1;
    end
  end

  // ---------------------------------------------------- stage 1: times d^-1
  logic signed [V+1:0] s0, s1, s0_r, s1_r;
  logic                v1, f1, dm1;
  shift_modq #(.V(V), .EW(EW)) u_dinv0 (.x(p0), .e(E_DINV), .y(s0));
  shift_modq #(.V(V), .EW(EW)) u_dinv1 (.x(p1), .e(E_DINV), .y(s1));

  always_ff @(posedge clk) begin
    s0_r <= s0;
    s1_r <= s1;
    if (!rst_n) begin
      v1 <= 1'b0; f1 <= 1'b0; dm1 <= 1'b0;
    end else begin
      v1 <= in_valid; f1 <= first; dm1 <= div_mode;
    end
  end

  // ------------------------------------------ stage 2: exact value in [0,q)
  function automatic logic [V:0] to_positive(logic signed [V+1:0] x);
    logic signed [V+2:0] t;
    t = (V + 3)'(x);
    if (t < 0)                              t = t + ((V + 3)'(1) << V) + 1;
    else if (t > ((V + 3)'(1) << V))        t = t - ((V + 3)'(1) << V) - 1;
    return t[V:0];
  endfunction

  logic [V:0] z0_r, z1_r;
  logic       v2, f2, dm2;
  always_ff @(posedge clk) begin
    z0_r <= to_positive(s0_r);
    z1_r <= to_positive(s1_r);
    if (!rst_n) begin
      v2 <= 1'b0; f2 <= 1'b0; dm2 <= 1'b0;
    end else begin
      v2 <= v1; f2 <= f1; dm2 <= dm1;
    end
  end

  // ---------------------------------------------- stage 3: carry-save words
  function automatic logic [MU-1:0] seg(logic [V:0] z, int unsigned j);
    return MU'(z >> (j * MU));
  endfunction

  logic [V:0]    hist [HIST];     // hist[0] = z_(i-1), hist[1] = z_(i-2), ...
  logic [IW-1:0] idx;             // index of z0_r
  logic [1:0]    eps_r;
  logic [IW-1:0] cur_idx;
  logic [WW-1:0] w0, w1;
  logic [1:0]    eps_now;

  assign cur_idx = f2 ? (dm2 ? IW'(S - 2 * K) : '0) : idx;

  always_comb begin
    logic [V:0] h [HIST];
    for (int j = 0; j < HIST; j++) h[j] = f2 ? '0 : hist[j];
    // w for z0 (index i) and z1 (index i+1)
    w0 = WW'(seg(z0_r, 0));
    for (int j = 1; j < B; j++) w0 = w0 + WW'(seg(h[j-1], j));
    w1 = WW'(seg(z1_r, 0)) + WW'(seg(z0_r, 1));
    for (int j = 2; j < B; j++) w1 = w1 + WW'(seg(h[j-2], j));
  end

  // epsilon from w_(s-1), which is w1 of the pair (s-2, s-1)
  if (B == 3 && (V + 2 - 2 * MU) <= MU - 2) begin : g_eps_b3
    logic a1, a0, b1, b0;
    assign a1 = z1_r[MU-1];
    assign a0 = z1_r[MU-2];
    assign b1 = z0_r[2*MU-1];
    assign b0 = z0_r[2*MU-2];
    assign eps_now[0] = (a1 ^ a0) | (b1 ^ b0) | (a1 ^ b1);
    assign eps_now[1] = a1 & a0 & b1 & b0;
  end else begin : g_eps_gen
    assign eps_now = w1[MU+1:MU] + 2'(w1[MU-1:0] != '0);
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      td_we <= 1'b0;
      idx   <= '0;
      eps_r <= '0;
    end else begin
      td_we <= 1'b0;
      if (v2) begin
        idx <= cur_idx + IW'(2);
        hist[0] <= z1_r;
        for (int j = 1; j < HIST; j++) hist[j] <= (j == 1) ? z0_r : (f2 ? '0 : hist[j-2]);
        if (!dm2) begin
          if (cur_idx < IW'(S)) begin
            td_we  <= 1'b1;
            td_idx <= TDW'(cur_idx);
            td_w0  <= w0;
            td_w1  <= (cur_idx + 2 == IW'(S)) ? {2'b00, w1[MU-1:0]} : w1;
          end
        end else begin
          if (cur_idx + 2 == IW'(S)) eps_r <= eps_now;
          if (cur_idx >= IW'(S)) begin
            td_we  <= 1'b1;
            td_idx <= TDW'(cur_idx - IW'(S));
            td_w0  <= (cur_idx == IW'(S)) ? w0 + WW'(eps_r) : w0;
            td_w1  <= w1;
          end
        end
      end
    end
  end
endmodule
