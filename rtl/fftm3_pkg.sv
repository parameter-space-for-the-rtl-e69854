// fftm3_pkg: shared constants and helper functions of the FFT-based Montgomery
// modular multiplier (FFTM3).
//
// The default parameter set of the modules (set on fftm3_top) is the 3,100-bit
// design point: ring Z_q with
// q = 2^224 + 1 (v = 224), NTT length d = 64, root omega = 2^7, word size
// mu = 97 bits, s = d/2 = 32 words, largest modulus l = mu*s - 4 = 3100 bits.
// Coefficients are held in (v+2)-bit two's complement, a non-least-positive
// (NLP) residue modulo q. The helper functions below derive the dependent
// sizes (segments per coefficient, Karatsuba depth) and the twiddle shifts.
package fftm3_pkg;

  // Number of mu-bit segments a coefficient is chopped into, B = ceil((v+2)/mu).
  function automatic int unsigned num_segments(int unsigned v, int unsigned mu);
    return (v + 2 + mu - 1) / mu;
  endfunction

  // Exponent e, 0 <= e < 2v, such that 2^e = omega^(+/-p) mod q.
  // Uses 2^(2v) = 1 mod q.
  function automatic int unsigned twiddle_exp(int unsigned p, int unsigned log2w,
                                              int unsigned v, bit inverse);
    int unsigned e;
    e = (p * log2w) % (2 * v);
    if (inverse && e != 0) e = 2 * v - e;
    return e;
  endfunction

  // Bit reversal of the low 'bits' bits of x.
  function automatic int unsigned bitrev(int unsigned x, int unsigned bits);
    int unsigned r;
    r = 0;
    for (int unsigned i = 0; i < bits; i++) r = (r << 1) | ((x >> i) & 1);
    return r;
  endfunction

  // Recursion depth of the Karatsuba multiplier for a width w and base width bw:
  // every level splits w into halves of ceil(w/2) bits, the middle product
  // needs one bit more.
  function automatic int unsigned kara_depth(int unsigned w, int unsigned bw);
    int unsigned dep, ww;
    dep = 0;
    ww  = w;
    while (ww > bw) begin
      ww  = (ww + 1) / 2 + 1;
      dep = dep + 1;
    end
    return dep;
  endfunction

  // Operation of one controller phase.
  typedef enum logic [1:0] {
    OP_FFT  = 2'd0,   // forward transform stage
    OP_IFFT = 2'd1,   // inverse transform stage
    OP_MULT = 2'd2    // component-wise multiplication
  } op_e;

  // What the accumulator takes from a last-stage IFFT output group.
  typedef enum logic [1:0] {
    ACC_TOP      = 2'd0,  // the pair X_2t, X_2t+1
    ACC_TOP_SAVE = 2'd1,  // the same, and keep X_2t+d/2, X_2t+d/2+1 for later
    ACC_BOT      = 2'd2,  // the pair X_2t+d/2, X_2t+d/2+1
    ACC_REPLAY   = 2'd3   // a pair kept earlier
  } acc_sel_e;

endpackage
