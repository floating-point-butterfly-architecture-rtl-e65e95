// Self-checking testbench for fdpa: r = b1*w1 + b2*w2 + a with random BSD
// operands and random IEEE-754 single twiddles, compared with the exact
// value in double precision (tolerance: half an ulp of the result plus the
// error of digits dropped below the alignment window).
module tb_fdpa;
  import bsd_fp_pkg::*;
  import tb_fp_util_pkg::*;

  bsdfp_t a, b1, b2, r;
  fp32_t  w1, w2;
  int     checks = 0, failures = 0;

  fdpa dut (.a(a), .b1(b1), .w1(w1), .b2(b2), .w2(w2), .r(r));

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int t = 0; t < 10000; t++) begin
      real ref_v, got, tol, m1, m2, ma, big;
      a  = rand_bsd(-10, 10);
      b1 = rand_bsd(-10, 10);
      b2 = rand_bsd(-10, 10);
      w1 = {$urandom_range(1), 8'($urandom_range(120, 130)), 23'($urandom)};
      w2 = {$urandom_range(1), 8'($urandom_range(120, 130)), 23'($urandom)};
      if (t % 9 == 0) w2 = 32'd0;
      if (t % 4 == 0) begin  // b2*w2 cancels b1*w1 exactly
        b2 = b1; w2 = w1 ^ 32'h8000_0000;
      end
      #1;
      m1 = bsd_real(b1) * fp32_real(w1);
      m2 = bsd_real(b2) * fp32_real(w2);
      ma = bsd_real(a);
      ref_v = m1 + m2 + ma;
      got = bsd_real(r);
      big = fabs(m1);
      if (fabs(m2) > big) big = fabs(m2);
      if (fabs(ma) > big) big = fabs(ma);
      tol = fabs(ref_v) * pow2(-23) * 1.0001 + big * pow2(-70);
      checks++;
      if (fabs(got - ref_v) > tol) begin
        failures++;
        if (failures < 10) $display("mismatch t=%0d: got %e expected %e", t, got, ref_v);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
