// Shared types and constants for the binary signed-digit (BSD) floating-point
// FFT datapath.
//
// A BSD number is a vector of digits in {-1,0,1}. Digit i is held as a
// posibit pos[i] (weight +2^i) and a negabit neg[i] (weight -2^i), so the
// value is simply pos - neg read as unsigned integers. A digit is zero when
// pos[i] == neg[i]; a BSD number is zero exactly when all its digits are zero.
//
// A BSD floating-point number (bsdfp_t) carries an unbiased two's complement
// exponent and a SIG_D-digit BSD significand with SIG_F fractional digits:
//     value = (pos - neg) * 2^(exp - SIG_F)
// The sign lives in the significand digits, so negation is a swap of the
// posibit and negabit vectors. Twiddle factors stay in ordinary IEEE-754
// single format (fp32_t). Significand length follows IEEE-754 single
// precision (24 digits); the 10-bit exponent width is this design's choice.
package bsd_fp_pkg;

  localparam int unsigned SIG_D = 24;  // significand digits (IEEE single: 1+23)
  localparam int unsigned SIG_F = 23;  // fractional digits of the significand
  localparam int unsigned EXP_W = 10;  // unbiased exponent width
  localparam int unsigned W_SIG = 24;  // twiddle significand bits (hidden 1 + 23)

  // Product of a BSD significand and a binary twiddle significand.
  // 13 radix-4 Booth partial products of up to 49 digits, summed by a
  // four-level tree of BSD adders that each add one digit of headroom.
  localparam int unsigned BOOTH_N = (W_SIG + 2) / 2;   // 13 Booth digits
  localparam int unsigned PP_D   = SIG_D + W_SIG + 1;  // 49 digits per partial product
  localparam int unsigned PROD_D = PP_D + 4;           // 53 digits of the redundant product
  localparam int unsigned PROD_F = SIG_F + 23;    // its fractional digits (46)

  localparam logic signed [EXP_W-1:0] EXP_ZERO = -(2 ** (EXP_W - 1)); // exponent of zero

  typedef logic [31:0] fp32_t;  // IEEE-754 single precision bit pattern

  typedef struct packed {
    logic signed [EXP_W-1:0] exp;
    logic [SIG_D-1:0]        pos;
    logic [SIG_D-1:0]        neg;
  } bsdfp_t;

  // Redundant product: value = (pos - neg) * 2^(exp - PROD_F), or zero.
  typedef struct packed {
    logic signed [EXP_W-1:0] exp;
    logic [PROD_D-1:0]       pos;
    logic [PROD_D-1:0]       neg;
    logic                    zero;
  } bsdprod_t;

  typedef struct packed {
    bsdfp_t re;
    bsdfp_t im;
  } bsd_cplx_t;

  typedef struct packed {
    fp32_t re;
    fp32_t im;
  } fp32_cplx_t;

  // cos(2*pi*j/32) for j = 0..8 rounded to IEEE-754 single precision.
  function automatic fp32_t cos32_q(input int unsigned j);
    case (j)
      0: return 32'h3F80_0000;
      1: return 32'h3F7B_14BE;
      2: return 32'h3F6C_835E;
      3: return 32'h3F54_DB31;
      4: return 32'h3F35_04F3;
      5: return 32'h3F0E_39DA;
      6: return 32'h3EC3_EF15;
      7: return 32'h3E47_C5C2;
      default: return 32'h0000_0000;
    endcase
  endfunction

  // cos(2*pi*j/32) for j = 0..31, from the quarter-wave table.
  function automatic fp32_t cos32(input int unsigned j);
    int unsigned m;
    m = j % 32;
    if (m <= 8)       return cos32_q(m);
    else if (m <= 16) return cos32_q(16 - m) ^ 32'h8000_0000;
    else if (m <= 24) return cos32_q(m - 16) ^ 32'h8000_0000;
    else              return cos32_q(32 - m);
  endfunction

  // Twiddle factor W_n^k = cos(2*pi*k/n) - j*sin(2*pi*k/n), n a power of two
  // no larger than 32. sin(x) = cos(x - pi/2).
  function automatic fp32_cplx_t twiddle(input int unsigned n, input int unsigned k);
    fp32_cplx_t w;
    int unsigned j;
    j = (k * (32 / n)) % 32;
    w.re = cos32(j);
    w.im = cos32((j + 24) % 32) ^ 32'h8000_0000;  // -sin = -cos(x - pi/2)
    if (w.im[30:0] == 31'd0) w.im = 32'd0;
    if (w.re[30:0] == 31'd0) w.re = 32'd0;
    return w;
  endfunction

endpackage
