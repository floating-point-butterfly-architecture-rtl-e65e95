// Redundant floating-point three-operand adder: r = p1 + p2 + a.
//
// p1 and p2 are redundant products from bsd_fp_mult (53 BSD digits, 46
// fractional); a is a BSD floating-point number, first widened to the
// product format. The adder works in three steps:
//   alignment:  the largest exponent among the nonzero operands is chosen and
//               every operand is shifted right by its exponent difference into
//               an 80-digit window (27 guard digits below the product LSB).
//               Digits that fall off the window are dropped; shifting a BSD
//               number is carry-free.
//   addition:   two carry-limited BSD adders in series add the three aligned
//               operands with no carry propagation.
//   termination: the redundant sum is converted to two's complement (the one
//               carry-propagating step), normalized and rounded to a 24-digit
//               significand by fp_norm_round, and returned as a BSD
//               floating-point number whose digits are all posibits (positive
//               result) or all negabits (negative result).
// A zero result is returned with all digits zero and exponent EXP_ZERO.
// Exponent overflow of the 10-bit exponent is not detected.
//
// Interface: combinational, no clock. The document leaves normalization and
// rounding of the butterfly to this adder and names a redundant LZD as future
// work; the conventional termination used here, the window width and the
// truncation of digits shifted out are this design's choices.
module fp3_add
  import bsd_fp_pkg::*;
(
  input  bsdprod_t p1,
  input  bsdprod_t p2,
  input  bsdfp_t   a,
  output bsdfp_t   r
);

  localparam int unsigned G  = 27;           // guard digits below the product LSB
  localparam int unsigned AW = PROD_D + G;   // alignment window, digits

  bsdprod_t                pa;
  logic signed [EXP_W-1:0] emax;
  logic [AW-1:0]           x_pos [3];
  logic [AW-1:0]           x_neg [3];
  logic [AW:0]             s1_pos, s1_neg;
  logic [AW+1:0]           s2_pos, s2_neg;
  logic signed [AW+2:0]    sum;
  logic                    n_sign, n_zero;
  logic [23:0]             n_m;
  logic signed [15:0]      n_exp;

  always_comb begin
    bsdprod_t op [3];
    // a widened to the product format
    pa.exp  = a.exp;
    pa.pos  = PROD_D'(a.pos) << (PROD_F - SIG_F);
    pa.neg  = PROD_D'(a.neg) << (PROD_F - SIG_F);
    pa.zero = (a.pos == a.neg);
    op[0] = p1;
    op[1] = p2;
    op[2] = pa;
    emax = EXP_ZERO;
    for (int i = 0; i < 3; i++)
      if (!op[i].zero && op[i].exp > emax) emax = op[i].exp;
    for (int i = 0; i < 3; i++) begin
      int unsigned sh;
      sh = 32'(int'(emax) - int'(op[i].exp));
      if (op[i].zero || sh >= AW) begin
        x_pos[i] = '0;
        x_neg[i] = '0;
      end else begin
        x_pos[i] = {op[i].pos, G'(0)} >> sh;
        x_neg[i] = {op[i].neg, G'(0)} >> sh;
      end
    end
  end

  bsd_adder #(.N(AW)) u_add1 (
    .x_pos(x_pos[0]), .x_neg(x_neg[0]),
    .y_pos(x_pos[1]), .y_neg(x_neg[1]),
    .s_pos(s1_pos), .s_neg(s1_neg)
  );

  bsd_adder #(.N(AW + 1)) u_add2 (
    .x_pos(s1_pos), .x_neg(s1_neg),
    .y_pos({1'b0, x_pos[2]}), .y_neg({1'b0, x_neg[2]}),
    .s_pos(s2_pos), .s_neg(s2_neg)
  );

  // termination: redundant to two's complement, normalize, round
  assign sum = signed'({1'b0, s2_pos}) - signed'({1'b0, s2_neg});

  fp_norm_round #(.IW(AW + 3)) u_norm (
    .v(sum),
    .e_base(16'(emax) - 16'(PROD_F + G)),
    .sign(n_sign), .m(n_m), .exp(n_exp), .zero(n_zero)
  );

  always_comb begin
    if (n_zero) begin
      r.exp = EXP_ZERO;
      r.pos = '0;
      r.neg = '0;
    end else begin
      r.exp = n_exp[EXP_W-1:0];
      r.pos = n_sign ? '0 : n_m;
      r.neg = n_sign ? n_m : '0;
    end
  end

endmodule
