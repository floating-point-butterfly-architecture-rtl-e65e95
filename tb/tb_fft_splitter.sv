// Self-checking testbench for fft_splitter (N = 8): random blocks of IEEE
// samples, sent with and without gaps, must come out one cycle later as BSD
// numbers of the same value in bit-reversed positions (0,4,2,6,1,5,3,7).
module tb_fft_splitter;
  import bsd_fp_pkg::*;
  import tb_fp_util_pkg::*;

  localparam int unsigned N = 8;
  localparam int unsigned BITREV [N] = '{0, 4, 2, 6, 1, 5, 3, 7};

  logic      clk = 1'b0, rst_n = 1'b0, in_valid = 1'b0;
  fp32_t     in_re [N], in_im [N];
  fp32_t     prev_re [N], prev_im [N];
  logic      out_valid;
  bsd_cplx_t out [N];
  int        checks = 0, failures = 0;

  fft_splitter #(.N(N)) dut (.clk, .rst_n, .in_valid, .in_re, .in_im, .out_valid, .out);

  always #5 clk = ~clk;

  initial begin
    repeat (2000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int n = 0; n < N; n++) begin in_re[n] = '0; in_im[n] = '0; end
    repeat (3) @(posedge clk);
    #1 rst_n = 1'b1;
    for (int t = 0; t < 200; t++) begin
      logic v;
      v = (t % 3 != 2);
      for (int n = 0; n < N; n++) begin
        in_re[n] = {$urandom_range(1), 8'($urandom_range(1, 254)), 23'($urandom)};
        in_im[n] = {$urandom_range(1), 8'($urandom_range(1, 254)), 23'($urandom)};
      end
      in_valid = v;
      prev_re = in_re;
      prev_im = in_im;
      @(posedge clk);
      #1;
      checks++;
      if (out_valid !== v) begin
        failures++;
        $display("out_valid %b one cycle after in_valid %b", out_valid, v);
      end
      if (v)
        for (int n = 0; n < N; n++) begin
          checks++;
          if (bsd_real(out[BITREV[n]].re) != fp32_real(prev_re[n]) ||
              bsd_real(out[BITREV[n]].im) != fp32_real(prev_im[n])) begin
            failures++;
            if (failures < 10) $display("sample %0d not at position %0d", n, BITREV[n]);
          end
        end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
