// Conversion of a BSD floating-point number to IEEE-754 single precision.
//
// This is the one conversion that needs carry propagation: the significand
// value pos - neg is formed by a subtraction, then fp_norm_round normalizes
// it and rounds it to nearest even. The bias is added to the exponent. An
// exponent above the single-precision range gives a signed infinity; one
// below the normal range gives a signed zero (no subnormal outputs). A zero
// significand gives +0.
//
// Interface: combinational. The need for a carry-propagating reverse
// conversion is stated by the document; the overflow and underflow handling
// is this design's.
module bsd_to_fp32
  import bsd_fp_pkg::*;
(
  input  bsdfp_t b,
  output fp32_t  f
);

  logic signed [SIG_D+1:0] v;
  logic                    n_sign, n_zero;
  logic [23:0]             n_m;
  logic signed [15:0]      n_exp;
  logic signed [15:0]      biased;

  assign v = signed'({2'b00, b.pos}) - signed'({2'b00, b.neg});

  fp_norm_round #(.IW(SIG_D + 2)) u_norm (
    .v(v),
    .e_base(16'(b.exp) - 16'sd23),
    .sign(n_sign), .m(n_m), .exp(n_exp), .zero(n_zero)
  );

  always_comb begin
    biased = n_exp + 16'sd127;
    if (n_zero)
      f = 32'd0;
    else if (biased >= 16'sd255)
      f = {n_sign, 8'hFF, 23'd0};
    else if (biased <= 16'sd0)
      f = {n_sign, 31'd0};
    else
      f = {n_sign, biased[7:0], n_m[22:0]};
  end

endmodule
