// Radix-2 decimation-in-time butterfly on BSD floating-point complex data:
//     x = a + b*w,   y = a - b*w
// Expanding the complex product, every output component is one fused
// dot-product-add of the two components of b with two twiddle components,
// plus one component of a:
//     x.re = a.re + b.re*w.re + b.im*(-w.im)
//     x.im = a.im + b.re*w.im + b.im*w.re
//     y.re = a.re + b.re*(-w.re) + b.im*w.im
//     y.im = a.im + b.re*(-w.im) + b.im*(-w.re)
// so the butterfly is four FDPA units working in parallel. The twiddle w is
// an IEEE-754 single-precision complex number; a negated twiddle component is
// made by flipping its sign bit. Each output is rounded once.
//
// Interface: combinational, no clock. Following the document: four FDPA
// units, data in BSD floating point, twiddles in binary.
module bsd_butterfly
  import bsd_fp_pkg::*;
(
  input  bsd_cplx_t  a,
  input  bsd_cplx_t  b,
  input  fp32_cplx_t w,
  output bsd_cplx_t  x,
  output bsd_cplx_t  y
);

  fp32_t w_re_n, w_im_n;

  assign w_re_n = w.re ^ 32'h8000_0000;
  assign w_im_n = w.im ^ 32'h8000_0000;

  fdpa u_xre (.a(a.re), .b1(b.re), .w1(w.re),   .b2(b.im), .w2(w_im_n), .r(x.re));
  fdpa u_xim (.a(a.im), .b1(b.re), .w1(w.im),   .b2(b.im), .w2(w.re),   .r(x.im));
  fdpa u_yre (.a(a.re), .b1(b.re), .w1(w_re_n), .b2(b.im), .w2(w.im),   .r(y.re));
  fdpa u_yim (.a(a.im), .b1(b.re), .w1(w_im_n), .b2(b.im), .w2(w_re_n), .r(y.im));

endmodule
