// Self-checking testbench for bsd_butterfly: random complex BSD operands and
// random unit-magnitude-range twiddles. x = a + b*w and y = a - b*w are
// compared component by component with double-precision references; each
// component is a single rounded FDPA result.
module tb_bsd_butterfly;
  import bsd_fp_pkg::*;
  import tb_fp_util_pkg::*;

  bsd_cplx_t  a, b, x, y;
  fp32_cplx_t w;
  int         checks = 0, failures = 0;

  bsd_butterfly dut (.a(a), .b(b), .w(w), .x(x), .y(y));

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input string what, input real got, input real ref_v, input real big);
    real tol;
    tol = fabs(ref_v) * pow2(-23) * 1.0001 + big * pow2(-70);
    checks++;
    if (fabs(got - ref_v) > tol) begin
      failures++;
      if (failures < 10) $display("%s mismatch: got %e expected %e", what, got, ref_v);
    end
  endtask

  initial begin
    for (int t = 0; t < 5000; t++) begin
      real ar, ai, br, bi, wr, wi, big;
      a.re = rand_bsd(-4, 4); a.im = rand_bsd(-4, 4);
      b.re = rand_bsd(-4, 4); b.im = rand_bsd(-4, 4);
      w.re = {$urandom_range(1), 8'($urandom_range(118, 126)), 23'($urandom)};
      w.im = {$urandom_range(1), 8'($urandom_range(118, 126)), 23'($urandom)};
      if (t % 10 == 0) w = twiddle(8, t % 8);
      #1;
      ar = bsd_real(a.re); ai = bsd_real(a.im);
      br = bsd_real(b.re); bi = bsd_real(b.im);
      wr = fp32_real(w.re); wi = fp32_real(w.im);
      big = fabs(ar) + fabs(ai) + fabs(br) + fabs(bi);
      check("x.re", bsd_real(x.re), ar + br * wr - bi * wi, big);
      check("x.im", bsd_real(x.im), ai + br * wi + bi * wr, big);
      check("y.re", bsd_real(y.re), ar - br * wr + bi * wi, big);
      check("y.im", bsd_real(y.im), ai - br * wi - bi * wr, big);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
