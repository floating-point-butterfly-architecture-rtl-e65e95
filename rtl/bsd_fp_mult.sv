// Redundant floating-point multiplier: BSD floating-point operand times an
// IEEE-754 single-precision twiddle factor, with the product left redundant.
//
// Exponents are handled as in an ordinary FP multiplier: the unbiased
// exponent of b is added to the unbiased exponent of w. The significands go
// through the two usual multiplier steps, but with no final carry-propagating
// adder:
//   PPG: the 24-bit twiddle significand (hidden one restored) is recoded into
//        13 radix-4 Booth digits in {-2..2}. Each partial product is the BSD
//        significand of b shifted by 2k (and one more for |d| = 2); a negative
//        digit, or a negative twiddle sign, is applied by swapping the posibit
//        and negabit vectors, so no partial product needs a carry.
//   PPR: the 13 BSD partial products are summed by a tree of carry-limited
//        BSD adders (13 -> 7 -> 4 -> 2 -> 1).
// The product is exact; normalization and rounding are left to the
// three-operand adder that follows. A zero b (all digits zero) or a twiddle
// with a zero biased exponent (zero or subnormal, taken as zero) raises the
// zero flag. Infinities and NaNs of w are not handled.
//
// Interface: combinational, no clock. Following the document: BSD
// significands, the twiddle kept in binary, Booth PPG and redundant PPR
// without final adder. The Booth radix and the tree shape are this design's.
module bsd_fp_mult
  import bsd_fp_pkg::*;
(
  input  bsdfp_t   b,
  input  fp32_t    w,
  output bsdprod_t p
);

  localparam int unsigned NPP = BOOTH_N;
  localparam int unsigned LV  = $clog2(NPP);

  function automatic int unsigned level_count(input int unsigned l);
    int unsigned n;
    n = NPP;
    for (int unsigned i = 0; i < l; i++) n = (n + 1) / 2;
    return n;
  endfunction

  logic [W_SIG+2:0]  y;  // {00, significand, 0} for Booth recoding
  logic              w_zero;
  logic [PROD_D-1:0] pp_pos [NPP];  // partial products
  logic [PROD_D-1:0] pp_neg [NPP];

  assign w_zero = (w[30:23] == 8'd0);
  assign y      = w_zero ? '0 : {2'b00, 1'b1, w[22:0], 1'b0};

  // Partial product generation
  always_comb begin
    for (int unsigned k = 0; k < NPP; k++) begin
      logic [2:0]        tri_bits;
      logic              neg_d, two_d, one_d;
      logic [PROD_D-1:0] mp, mn;
      tri_bits = y[2*k +: 3];
      neg_d = tri_bits[2];
      one_d = tri_bits[1] ^ tri_bits[0];
      two_d = (tri_bits == 3'b011) || (tri_bits == 3'b100);
      mp = '0;
      mn = '0;
      if (one_d) begin
        mp = PROD_D'(b.pos) << (2 * k);
        mn = PROD_D'(b.neg) << (2 * k);
      end else if (two_d) begin
        mp = PROD_D'(b.pos) << (2 * k + 1);
        mn = PROD_D'(b.neg) << (2 * k + 1);
      end
      if (neg_d ^ w[31]) begin
        pp_pos[k] = mn;
        pp_neg[k] = mp;
      end else begin
        pp_pos[k] = mp;
        pp_neg[k] = mn;
      end
    end
  end

  // Partial product reduction: tree of carry-limited BSD adders. The top
  // digit of every adder sum is dropped; it is always zero in value because
  // the adder inputs never use their own top digit.
  for (genvar l = 1; l <= LV; l++) begin : g_lvl
    logic [PROD_D-1:0] ip [NPP];  // nodes of the level below
    logic [PROD_D-1:0] in [NPP];
    logic [PROD_D-1:0] op [NPP];  // nodes of this level
    logic [PROD_D-1:0] on [NPP];
    if (l == 1) begin : g_first
      assign ip = pp_pos;
      assign in = pp_neg;
    end else begin : g_next
      assign ip = g_lvl[l-1].op;
      assign in = g_lvl[l-1].on;
    end
    for (genvar j = 0; j < NPP; j++) begin : g_node
      if (j < level_count(l) && 2 * j + 1 < level_count(l - 1)) begin : g_add
        logic [PROD_D:0] sp, sn;
        bsd_adder #(.N(PROD_D)) u_add (
          .x_pos(ip[2*j]), .x_neg(in[2*j]),
          .y_pos(ip[2*j+1]), .y_neg(in[2*j+1]),
          .s_pos(sp), .s_neg(sn)
        );
        assign op[j] = sp[PROD_D-1:0];
        assign on[j] = sn[PROD_D-1:0];
      end else if (j < level_count(l)) begin : g_pass
        assign op[j] = ip[2*j];
        assign on[j] = in[2*j];
      end else begin : g_none
        assign op[j] = '0;
        assign on[j] = '0;
      end
    end
  end

  always_comb begin
    p.pos  = g_lvl[LV].op[0];
    p.neg  = g_lvl[LV].on[0];
    p.zero = w_zero || (b.pos == b.neg);
    p.exp  = b.exp + EXP_W'(signed'({2'b00, w[30:23]}) - 10'sd127);
  end

endmodule
