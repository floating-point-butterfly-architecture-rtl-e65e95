// Floating-point fused dot-product-add (FDPA): r = b1*w1 + b2*w2 + a.
//
// a, b1 and b2 are BSD floating-point numbers; w1 and w2 are IEEE-754 single
// twiddle components. Two redundant multipliers (bsd_fp_mult) produce exact
// products with no normalization, rounding or final carry-propagating adder,
// and one redundant three-operand adder (fp3_add) aligns and adds the two
// products and a, then normalizes and rounds once. Fusing the operations
// this way removes the separate leading-zero detection, normalization and
// rounding that a discrete multiplier-plus-adder chain would perform after
// each multiply and each add.
//
// Interface: combinational, no clock. The structure (two redundant
// multipliers feeding a redundant three-operand adder) follows the document.
module fdpa
  import bsd_fp_pkg::*;
(
  input  bsdfp_t a,
  input  bsdfp_t b1,
  input  fp32_t  w1,
  input  bsdfp_t b2,
  input  fp32_t  w2,
  output bsdfp_t r
);

  bsdprod_t p1, p2;

  bsd_fp_mult u_mul1 (.b(b1), .w(w1), .p(p1));
  bsd_fp_mult u_mul2 (.b(b2), .w(w2), .p(p2));
  fp3_add     u_add  (.p1(p1), .p2(p2), .a(a), .r(r));

endmodule
