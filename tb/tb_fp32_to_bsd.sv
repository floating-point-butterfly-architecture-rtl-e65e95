// Self-checking testbench for fp32_to_bsd: random IEEE-754 singles (normal,
// zero and subnormal) are converted; the BSD value must equal the IEEE value
// exactly (subnormals flush to zero), and a negative number must use
// negabits only.
module tb_fp32_to_bsd;
  import bsd_fp_pkg::*;
  import tb_fp_util_pkg::*;

  fp32_t  f;
  bsdfp_t b;
  int     checks = 0, failures = 0;

  fp32_to_bsd dut (.f(f), .b(b));

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int t = 0; t < 10000; t++) begin
      f = $urandom;
      if (f[30:23] == 8'hFF) f[30] = 1'b0;
      if (t % 10 == 0) f[30:23] = 8'd0;
      #1;
      checks++;
      if (bsd_real(b) != fp32_real(f)) begin
        failures++;
        if (failures < 10) $display("mismatch: f=%h got %e expected %e", f, bsd_real(b), fp32_real(f));
      end
      checks++;
      if ((f[31] && b.pos != '0) || (!f[31] && b.neg != '0)) begin
        failures++;
        if (failures < 10) $display("digit sign mismatch: f=%h", f);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
