// Self-checking testbench for fft_combiner (M = 8): random even and odd
// 4-point transforms E and O are combined; out[k] = E[k] + W8^k O[k] and
// out[k+4] = E[k] - W8^k O[k] are compared with double-precision references
// using twiddles from $cos/$sin (tolerance covers the single-precision
// twiddles and one rounding). The result must appear one cycle after
// in_valid, also for back-to-back blocks.
module tb_fft_combiner;
  import bsd_fp_pkg::*;
  import tb_fp_util_pkg::*;

  localparam int unsigned M = 8;
  localparam real PI = 3.14159265358979323846;

  logic      clk = 1'b0, rst_n = 1'b0, in_valid = 1'b0;
  bsd_cplx_t in [M], prev [M], out [M];
  logic      out_valid;
  int        checks = 0, failures = 0;

  fft_combiner #(.M(M)) dut (.clk, .rst_n, .in_valid, .in, .out_valid, .out);

  always #5 clk = ~clk;

  initial begin
    repeat (2000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input real got, input real ref_v, input real big);
    checks++;
    if (fabs(got - ref_v) > fabs(ref_v) * pow2(-23) * 1.0001 + big * pow2(-22)) begin
      failures++;
      if (failures < 10) $display("mismatch: got %e expected %e", got, ref_v);
    end
  endtask

  initial begin
    for (int i = 0; i < M; i++) begin in[i].re = '0; in[i].im = '0; end
    repeat (3) @(posedge clk);
    #1 rst_n = 1'b1;
    for (int t = 0; t < 300; t++) begin
      logic v;
      v = (t % 4 != 3);
      for (int i = 0; i < M; i++) begin
        in[i].re = rand_bsd(-3, 3);
        in[i].im = rand_bsd(-3, 3);
      end
      in_valid = v;
      prev = in;
      @(posedge clk);
      #1;
      checks++;
      if (out_valid !== v) begin
        failures++;
        $display("out_valid %b one cycle after in_valid %b", out_valid, v);
      end
      if (v)
        for (int k = 0; k < M / 2; k++) begin
          real er, ei, or_, oi, wr, wi, tr, ti, big;
          er = bsd_real(prev[k].re);       ei = bsd_real(prev[k].im);
          or_ = bsd_real(prev[k+M/2].re);  oi = bsd_real(prev[k+M/2].im);
          wr = $cos(2.0 * PI * k / M);     wi = -$sin(2.0 * PI * k / M);
          tr = or_ * wr - oi * wi;
          ti = or_ * wi + oi * wr;
          big = fabs(er) + fabs(ei) + fabs(or_) + fabs(oi);
          check(bsd_real(out[k].re), er + tr, big);
          check(bsd_real(out[k].im), ei + ti, big);
          check(bsd_real(out[k+M/2].re), er - tr, big);
          check(bsd_real(out[k+M/2].im), ei - ti, big);
        end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
