// fftm3_top: FFT-based Montgomery modular multiplier (FFTM3).
//
// Computes z = x*y*r^-1 mod n (up to one extra n, see below) for moduli n of
// up to l = MU*s - 4 bits, with every operand kept in the spectral (NTT)
// domain: the host loads X = FFT(x), Y = FFT(y), N = FFT(n) and N' = FFT(n'),
// n' = -n^-1 mod r, r = 2^(MU*s), and reads back Z = FFT(z). Products are
// computed as component-wise products of length-d number-theoretic transforms
// over Z_q, q = 2^V + 1, where multiplying by a root of unity is a shift.
// The reductions modulo r and the division by r work on words of the time
// domain and are done while the inverse transform drains.
//
// Datapath (one shared instance of each unit):
//   * coeff_mem       polynomial slots, four RAM banks each
//   * cw_multiplier   Karatsuba-based modular multiplier, 1 coefficient/cycle
//   * fft_butterfly   length-4 sub-stage: 2 butterflies, 4 coefficients/cycle
//   * channel_selector  collision-free write-back of butterfly results
//   * ifft_accumulator  x d^-1, carry-save word accumulation, mod r / div r
//   * td_buffer       time-domain words between IFFT and the next FFT
//   * fftm3_controller  sequencing and all control signals
//
// Numbers are non-least-positive throughout: coefficients are (V+2)-bit two's
// complement residues mod q and words are (MU+2)-bit carry-save words, so the
// result z is congruent to x*y*r^-1 mod n and below 3n when x, y < 3n.
//
// The unit set and the three-round algorithm follow the published FFTM3
// architecture; the word buffer, the host interface and the 7-slot memory are
// this design's additions.
//
// Host interface (all synchronous to clk, active-low synchronous reset):
//   in_we/in_slot/in_pos/in_data : while idle, write coefficient in_pos of
//       polynomial in_slot (0 X, 1 Y, 2 N', 3 N), natural order.
//   start : begin a multiplication; busy stays high until done pulses.
//   out_pos -> out_data : read coefficient out_pos of Z, one cycle later
//       (valid while idle after done).
module fftm3_top
  import fftm3_pkg::*;
#(
  parameter int unsigned V        = 224,  // q = 2^V + 1
  parameter int unsigned D        = 64,   // NTT length d
  parameter int unsigned LOG2W    = 7,    // omega = 2^LOG2W
  parameter int unsigned MU       = 97,   // word size, b = 2^MU
  parameter int unsigned BASE_W   = 17,   // unsigned width of the base multiplier
  parameter int unsigned BASE_LAT = 1,
  parameter bit          SQRT2    = 1'b0, // omega = sqrt(2) (LOG2W unused)
  localparam int unsigned DW      = V + 2,
  localparam int unsigned LOGD    = $clog2(D)
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic                 start,
  output logic                 busy,
  output logic                 done,
  input  logic                 in_we,
  input  logic [1:0]           in_slot,
  input  logic [LOGD-1:0]      in_pos,
  input  logic signed [DW-1:0] in_data,
  input  logic [LOGD-1:0]      out_pos,
  output logic signed [DW-1:0] out_data
);
  localparam int unsigned NSLOT = 7;
  localparam int unsigned AW    = (D > 4) ? $clog2(D / 4) : 1;
  localparam int unsigned EW    = $clog2(2 * V);
  localparam int unsigned SW    = 3;
  localparam int unsigned MLAT  = BASE_LAT + 3 * kara_depth(DW, BASE_W) + 3;
  localparam int unsigned BLAT  = SQRT2 ? 4 : 3;
  localparam int unsigned WW    = MU + 2;
  localparam int unsigned TDW   = $clog2(D / 2);
  localparam logic [SW-1:0] SL_G = 3'd4;

  // controller outputs
  logic [AW-1:0] Read_Addr [NSLOT];
  logic          Wrt_En    [NSLOT][4];
  logic [AW-1:0] Wrt_Addr  [NSLOT][4];
  logic [1:0]    BRAM_In_Sel;
  logic [EW-1:0] Shift_Ctrl0, Shift_Ctrl1;
  logic          Shift_Odd0, Shift_Odd1;
  logic          Transf_Mode;
  logic          btf_src_td;
  logic [SW-1:0] btf_src_slot, mul_a_slot, mul_b_slot, result_slot;
  logic [AW-1:0] td_raddr;
  logic          cs_sel;
  logic [1:0]    mul_bank, mul_g_bank, out_bank;
  logic          mul_add_en;
  logic          acc_valid, acc_first, acc_div;
  acc_sel_e      acc_sel;

  fftm3_controller #(.V(V), .D(D), .LOG2W(LOG2W), .MU(MU), .MLAT(MLAT), .BLAT(BLAT),
                     .SQRT2(SQRT2)) u_ctrl (
    .clk, .rst_n, .start, .busy, .done,
    .in_we, .in_slot, .in_pos, .out_pos, .result_slot, .out_bank,
    .Read_Addr, .Wrt_En, .Wrt_Addr, .BRAM_In_Sel,
    .Shift_Ctrl0, .Shift_Ctrl1, .Shift_Odd0, .Shift_Odd1, .Transf_Mode, .btf_src_td, .btf_src_slot, .td_raddr,
    .cs_sel,
    .mul_a_slot, .mul_b_slot, .mul_bank, .mul_g_bank, .mul_add_en,
    .acc_valid, .acc_first, .acc_sel, .acc_div
  );

  // RAM set
  logic [DW-1:0] rdata [NSLOT][4];
  logic [DW-1:0] wdata [NSLOT][4];

  coeff_mem #(.DW(DW), .D(D), .NSLOT(NSLOT)) u_mem (
    .clk, .raddr(Read_Addr), .rdata, .we(Wrt_En), .waddr(Wrt_Addr), .wdata
  );

  // FFT/IFFT sub-stage
  logic [DW-1:0]        td_rdata [4];
  logic signed [DW-1:0] btf_in   [4];
  logic signed [DW-1:0] btf_out  [4];
  logic [DW-1:0]        btf_out_u [4];
  logic [DW-1:0]        cs_out   [4];

  always_comb
    for (int k = 0; k < 4; k++)
      btf_in[k] = btf_src_td ? td_rdata[k] : rdata[btf_src_slot][k];

  fft_butterfly #(.V(V), .EW(EW), .SQRT2(SQRT2)) u_btf (
    .clk, .x(btf_in), .e0(Shift_Ctrl0), .e1(Shift_Ctrl1), .o0(Shift_Odd0), .o1(Shift_Odd1),
    .y(btf_out)
  );

  always_comb for (int k = 0; k < 4; k++) btf_out_u[k] = btf_out[k];

  channel_selector #(.DW(DW)) u_cs (.clk, .sel(cs_sel), .btf(btf_out_u), .ram_in(cs_out));

  // multiplier
  logic signed [DW-1:0] mul_y;
  cw_multiplier #(.V(V), .BASE_W(BASE_W), .BASE_LAT(BASE_LAT)) u_mul (
    .clk,
    .a(rdata[mul_a_slot][mul_bank]),
    .b(rdata[mul_b_slot][mul_bank]),
    .c(rdata[SL_G][mul_g_bank]),
    .add_en(mul_add_en),
    .y(mul_y)
  );

  // RAM write data (BRAM_In_Sel)
  always_comb
    for (int s = 0; s < NSLOT; s++)
      for (int k = 0; k < 4; k++)
        unique case (BRAM_In_Sel)
          2'd0:    wdata[s][k] = in_data;
          2'd1:    wdata[s][k] = mul_y;
          default: wdata[s][k] = cs_out[k];
        endcase

  // x d^-1 and accumulator, time-domain word buffer
  logic           td_we;
  logic [TDW-1:0] td_idx;
  logic [WW-1:0]  td_w0, td_w1;

  ifft_accumulator #(.V(V), .D(D), .MU(MU)) u_acc (
    .clk, .rst_n, .in_valid(acc_valid), .first(acc_first), .div_mode(acc_div),
    .sel(acc_sel), .btf(btf_out),
    .td_we, .td_idx, .td_w0, .td_w1
  );

  td_buffer #(.D(D), .WW(WW), .DW(DW)) u_td (
    .clk, .we(td_we), .widx(td_idx), .w0(td_w0), .w1(td_w1),
    .raddr(td_raddr), .rdata(td_rdata)
  );

  assign out_data = rdata[result_slot][out_bank];

  // Transf_Mode is carried for observation; the direction is folded into
  // the Shift_Ctrl exponents.
  logic unused_mode;
  assign unused_mode = Transf_Mode;
endmodule
