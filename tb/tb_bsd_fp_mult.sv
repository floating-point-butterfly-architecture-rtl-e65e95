// Self-checking testbench for bsd_fp_mult: random BSD significands times
// random IEEE-754 single twiddles. The redundant product value pos - neg is
// compared exactly with the integer product of the BSD value and the signed
// twiddle significand, and the product exponent with the sum of the unbiased
// exponents. Zero operands must raise the zero flag.
module tb_bsd_fp_mult;
  import bsd_fp_pkg::*;

  bsdfp_t   b;
  fp32_t    w;
  bsdprod_t p;
  int       checks = 0, failures = 0;

  bsd_fp_mult dut (.b(b), .w(w), .p(p));

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic longint bsd_val(input logic [127:0] pos, input logic [127:0] neg);
    // values here stay well inside 64 bits
    return longint'(pos[63:0]) - longint'(neg[63:0]);
  endfunction

  initial begin
    for (int t = 0; t < 5000; t++) begin
      longint bv, wv, ev, gv;
      int     eexp;
      b.pos = SIG_D'($urandom);
      b.neg = SIG_D'($urandom);
      if (t % 7 == 0) b.neg = '0;
      b.exp = EXP_W'($urandom_range(0, 200)) - EXP_W'(100);
      w = $urandom;
      w[30:23] = 8'($urandom_range(1, 254));
      if (t % 11 == 0) w[22:0] = '0;           // exact powers of two
      if (t % 13 == 0) w[30:23] = 8'd0;        // zero twiddle
      if (t % 17 == 0) begin b.pos = '0; b.neg = '0; end
      #1;
      bv = longint'(b.pos) - longint'(b.neg);
      wv = (w[30:23] == 0) ? 0 : longint'({1'b1, w[22:0]});
      if (w[31]) wv = -wv;
      ev = bv * wv;
      gv = bsd_val(128'(p.pos), 128'(p.neg));
      checks++;
      if (gv !== ev) begin
        failures++;
        if (failures < 10) $display("value mismatch: b=%h/%h w=%h got %0d expected %0d", b.pos, b.neg, w, gv, ev);
      end
      checks++;
      if (p.zero !== (ev == 0)) begin
        failures++;
        if (failures < 10) $display("zero flag mismatch: w=%h got %b", w, p.zero);
      end
      if (ev != 0) begin
        eexp = int'(b.exp) + int'(w[30:23]) - 127;
        checks++;
        if (int'(p.exp) != eexp) begin
          failures++;
          if (failures < 10) $display("exponent mismatch: got %0d expected %0d", p.exp, eexp);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
