// Self-checking testbench for bsd_to_fp32. Random BSD numbers with mixed
// digits are converted and compared with the double-precision value rounded
// to single precision by a reference rounding written here (round to
// nearest, ties to even), including overflow to infinity and underflow to
// zero. Round trips of random IEEE singles through fp32_to_bsd must be exact.
module tb_bsd_to_fp32;
  import bsd_fp_pkg::*;
  import tb_fp_util_pkg::*;

  bsdfp_t b, b2;
  fp32_t  f, f_in;
  int     checks = 0, failures = 0;
  int     n_inf = 0, n_uf = 0;

  bsd_to_fp32 dut  (.b(b), .f(f));
  fp32_to_bsd u_in (.f(f_in), .b(b2));

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // reference: integer significand v times 2^e rounded to IEEE single
  function automatic fp32_t ref_round(input longint v_in, input int e);
    logic [63:0] mag;
    int          lead, sh, be;
    logic [63:0] m, rem, half;
    logic        s;
    s = v_in < 0;
    mag = s ? 64'(-v_in) : 64'(v_in);
    if (mag == 0) return 32'd0;
    lead = 0;
    for (int i = 0; i < 64; i++) if (mag[i]) lead = i;
    if (lead > 23) begin
      sh = lead - 23;
      m = mag >> sh;
      rem = mag & ((64'd1 << sh) - 1);
      half = 64'd1 << (sh - 1);
      if (rem > half || (rem == half && m[0])) m = m + 1;
      if (m[24]) begin m = m >> 1; lead++; end
    end else begin
      m = mag << (23 - lead);
    end
    be = e + lead + 127;
    if (be >= 255) return {s, 8'hFF, 23'd0};
    if (be <= 0) return {s, 31'd0};
    return {s, 8'(be), m[22:0]};
  endfunction

  initial begin
    for (int t = 0; t < 20000; t++) begin
      fp32_t exp_f;
      b = rand_bsd(-140, 140);
      if (t % 3 == 0) b.neg = '0;
      f_in = $urandom;
      if (f_in[30:23] == 8'hFF) f_in[30] = 1'b0;
      #1;
      exp_f = ref_round(longint'(b.pos) - longint'(b.neg), int'(b.exp) - 23);
      if (exp_f[30:23] == 8'hFF) n_inf++;
      if (exp_f[30:0] == 0 && b.pos != b.neg) n_uf++;
      checks++;
      if (f !== exp_f) begin
        failures++;
        if (failures < 10) $display("mismatch: b=%h/%h e=%0d got %h expected %h", b.pos, b.neg, b.exp, f, exp_f);
      end
      b = b2;
      #1;
      checks++;
      if (f !== ((f_in[30:23] == 0) ? 32'd0 : f_in)) begin
        failures++;
        if (failures < 10) $display("round trip mismatch: %h -> %h", f_in, f);
      end
    end
    checks++;
    if (n_inf == 0 || n_uf == 0) begin
      failures++;
      $display("overflow/underflow not reached: %0d %0d", n_inf, n_uf);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
