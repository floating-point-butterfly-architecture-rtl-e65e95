// Self-checking testbench for fp3_add: random redundant products and BSD
// addends, with exponents close together (to provoke cancellation) and far
// apart (to provoke alignment shifts beyond the window), plus zero operands.
// The result is compared with the exact sum computed in double precision:
// it must be within about half a unit in the last place of the 24-digit
// result, plus the tiny error of digits dropped below the alignment window.
// The result must also be normalized (leading significand bit set) and
// sign-magnitude (only posibits or only negabits).
module tb_fp3_add;
  import bsd_fp_pkg::*;
  import tb_fp_util_pkg::*;

  bsdprod_t p1, p2;
  bsdfp_t   a, r;
  int       checks = 0, failures = 0;
  int       n_cancel = 0, n_far = 0, n_zero = 0;

  fp3_add dut (.p1(p1), .p2(p2), .a(a), .r(r));

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic bsdprod_t rand_prod(input int e0, input int spread);
    bsdprod_t p;
    p.pos  = PROD_D'({$urandom, $urandom}) & ((PROD_D'(1) << PP_D) - 1);
    p.neg  = PROD_D'({$urandom, $urandom}) & ((PROD_D'(1) << PP_D) - 1);
    p.exp  = EXP_W'(e0 + int'($urandom_range(2 * spread)) - spread);
    p.zero = (p.pos == p.neg);
    return p;
  endfunction

  initial begin
    for (int t = 0; t < 20000; t++) begin
      real ref_v, got, tol, mag;
      int  spread, emx;
      spread = (t % 3 == 0) ? 2 : ((t % 3 == 1) ? 20 : 120);
      p1 = rand_prod(0, spread);
      p2 = rand_prod(0, spread);
      a  = rand_bsd(-spread, spread);
      if (t % 5 == 0) begin  // cancellation: p2 = -p1 (+ small change)
        p2.pos = p1.neg;
        p2.neg = p1.pos ^ PROD_D'($urandom_range(7));
        p2.exp = p1.exp;
        p2.zero = (p2.pos == p2.neg);
        a.exp = p1.exp - 30;
        n_cancel++;
      end
      if (t % 23 == 0) begin p1.pos = '0; p1.neg = '0; p1.zero = 1'b1; p1.exp = 200; n_zero++; end
      if (t % 29 == 0) begin a.pos = '0; a.neg = '0; end
      #1;
      ref_v = prod_real(p1) * (p1.zero ? 0.0 : 1.0) + prod_real(p2) + bsd_real(a);
      got   = bsd_real(r);
      emx = -1000;
      if (!p1.zero && int'(p1.exp) > emx) emx = int'(p1.exp);
      if (!p2.zero && int'(p2.exp) > emx) emx = int'(p2.exp);
      if (a.pos != a.neg && int'(a.exp) > emx) emx = int'(a.exp);
      if (emx - int'(a.exp) > 70 || emx - int'(p1.exp) > 70 || emx - int'(p2.exp) > 70) n_far++;
      mag = fabs(ref_v);
      tol = mag * pow2(-23) * 1.0001 + pow2(emx - 68);
      checks++;
      if (fabs(got - ref_v) > tol) begin
        failures++;
        if (failures < 10) $display("value mismatch t=%0d: got %e expected %e", t, got, ref_v);
      end
      if (r.pos != r.neg) begin
        checks++;
        if (!(r.pos[SIG_D-1] ^ r.neg[SIG_D-1]) || (r.pos != '0 && r.neg != '0)) begin
          failures++;
          if (failures < 10) $display("result not normalized: %h/%h", r.pos, r.neg);
        end
      end
    end
    checks++;
    if (n_cancel == 0 || n_far == 0 || n_zero == 0) begin
      failures++;
      $display("case not reached: cancel=%0d far=%0d zero=%0d", n_cancel, n_far, n_zero);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
