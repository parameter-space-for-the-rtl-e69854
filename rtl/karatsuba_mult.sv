// karatsuba_mult: pipelined unsigned W x W -> 2W multiplier built by recursive
// Karatsuba decomposition.
//
// One level splits each operand into a high and a low half of G = ceil(W/2)
// bits and forms
//   A*B = PH*2^(2G) + (PM - PH - PL)*2^G + PL,
//   PH = AH*BH, PL = AL*BL, PM = (AH+AL)*(BH+BL),
// i.e. two G-bit and one (G+1)-bit multiplications instead of four. The level
// is pipelined as in the reference architecture: the half sums AH+AL and BH+BL
// are registered before the middle multiplier, then PH+PL, the subtraction and
// the two final additions each follow a register row; the last addition drives
// the output without a register. The three sub-multipliers are instances of
// this module with DEPTH-1, so all branches have the same latency; at DEPTH = 0
// a registered base multiplier (a DSP block on an FPGA) does the work.
//
// The lint pass of Verilator reports ph, pl and pm of the top level as undriven:
// it does not follow the outputs of a module's own recursive instances. They
// are driven by u_hi, u_lo and u_mid; the simulation gives exact products and
// synthesis builds the whole tree (81 base multipliers at the defaults).
//
// Interface: a and b are sampled every cycle (fully pipelined, no handshake);
// p = a*b appears LAT = BASE_LAT + 3*DEPTH cycles later.
// Widths: W is the operand width; BASE_W the largest width of a base
// multiplier (17 unsigned bits of an 18-bit signed DSP multiplier).
module karatsuba_mult
  import fftm3_pkg::*;
#(
  parameter int unsigned W        = 226,
  parameter int unsigned BASE_W   = 17,
  parameter int unsigned BASE_LAT = 1,
  parameter int unsigned DEPTH    = kara_depth(W, BASE_W),
  localparam int unsigned LAT     = BASE_LAT + 3 * DEPTH
) (
  input  logic             clk,
  input  logic [W-1:0]     a,
  input  logic [W-1:0]     b,
  output logic [2*W-1:0]   p
);
  if (DEPTH == 0) begin : g_base
    logic [2*W-1:0] pipe [BASE_LAT];
    always_ff @(posedge clk) begin
      pipe[0] <= a * b;
      for (int i = 1; i < BASE_LAT; i++) pipe[i] <= pipe[i-1];
    end
    assign p = pipe[BASE_LAT-1];
  end else begin : g_level
    localparam int unsigned G  = (W + 1) / 2;
    localparam int unsigned HW = W - G;         // width of the high half
    localparam int unsigned PW = 2 * W + 2;     // internal sum width

    logic [G-1:0]   ah, al, bh, bl;
    logic [G:0]     sa_r, sb_r;                 // register row 1: half sums
    logic [2*G-1:0] ph, pl;
    logic [2*G+1:0] pm;

    assign ah = G'(a[W-1:G]);
    assign bh = G'(b[W-1:G]);
    assign al = a[G-1:0];
    assign bl = b[G-1:0];

    always_ff @(posedge clk) begin
      sa_r <= {1'b0, ah} + {1'b0, al};
      sb_r <= {1'b0, bh} + {1'b0, bl};
    end

    karatsuba_mult #(.W(G),   .BASE_W(BASE_W), .BASE_LAT(BASE_LAT), .DEPTH(DEPTH-1))
      u_hi (.clk, .a(ah), .b(bh), .p(ph));
    karatsuba_mult #(.W(G),   .BASE_W(BASE_W), .BASE_LAT(BASE_LAT), .DEPTH(DEPTH-1))
      u_lo (.clk, .a(al), .b(bl), .p(pl));
    karatsuba_mult #(.W(G+1), .BASE_W(BASE_W), .BASE_LAT(BASE_LAT), .DEPTH(DEPTH-1))
      u_mid (.clk, .a(sa_r), .b(sb_r), .p(pm));

    // register rows 2..4
    logic [2*G:0]   hl_r2;
    logic [2*G-1:0] ph_r2, pl_r2, ph_r3, pl_r3, ph_r4;
    logic [2*G+1:0] mid_r3;
    logic [PW-1:0]  t_r4;

    always_ff @(posedge clk) begin
      hl_r2  <= {1'b0, ph} + {1'b0, pl};
      ph_r2  <= ph;
      pl_r2  <= pl;
      mid_r3 <= pm - (2*G+2)'(hl_r2);
      ph_r3  <= ph_r2;
      pl_r3  <= pl_r2;
      t_r4   <= PW'(pl_r3) + (PW'(mid_r3) << G);
      ph_r4  <= ph_r3;
    end

    logic [PW-1:0] sum;
    assign sum = t_r4 + (PW'(ph_r4) << (2 * G));
    assign p   = sum[2*W-1:0];

    if (HW > G) begin : g_bad
      initial $error("karatsuba_mult: high half wider than low half");
    end
  end
endmodule
