// Conversion of an IEEE-754 single-precision number to BSD floating point.
//
// The bias is removed from the exponent, and the significand with its hidden
// one restored becomes the digits of the BSD significand: posibits for a
// positive number, negabits for a negative one. No carry is needed. A zero
// biased exponent (zero or subnormal) gives the BSD zero (all digits zero,
// exponent EXP_ZERO); subnormals are thus flushed to zero. Infinities and
// NaNs are not handled and convert like ordinary numbers with exponent 128.
//
// Interface: combinational. The carry-free forward conversion is the
// document's; the handling of zero and subnormals is this design's.
module fp32_to_bsd
  import bsd_fp_pkg::*;
(
  input  fp32_t  f,
  output bsdfp_t b
);

  logic [SIG_D-1:0] sig;

  assign sig = {1'b1, f[22:0]};

  always_comb begin
    if (f[30:23] == 8'd0) begin
      b.exp = EXP_ZERO;
      b.pos = '0;
      b.neg = '0;
    end else begin
      b.exp = EXP_W'(signed'({2'b00, f[30:23]}) - 10'sd127);
      b.pos = f[31] ? '0 : sig;
      b.neg = f[31] ? sig : '0;
    end
  end

endmodule
