// Stimulus and checker for an N-point fft_bsd, shared by the FFT
// testbenches. It resets the design, then feeds BLOCKS blocks of N complex
// IEEE-754 samples, mostly back to back with some idle cycles between, and
// checks every output block against a double-precision DFT worked out here
// with $cos/$sin:
//   - every bin within 2^-19 of the sum of the input magnitudes (three to
//     five roundings to 24 digits plus single-precision twiddles);
//   - out_valid exactly log2(N) + 2 cycles after in_valid, one block per
//     cycle, and never otherwise.
// Stimulus kinds: random data of wide dynamic range, blocks with zero
// samples, constant blocks (all energy in bin 0, cancellation in the
// others) and impulses. Each kind, back-to-back blocks and idle cycles are
// counted, and one that never occurred counts as a failure.
module fft_run_check
  import bsd_fp_pkg::*;
  import tb_fp_util_pkg::*;
#(
  parameter int unsigned N      = 8,
  parameter int unsigned BLOCKS = 200
) (
  output logic done,
  output int   checks,
  output int   failures
);

  localparam real PI  = 3.14159265358979323846;
  localparam int  LAT = $clog2(N) + 2;

  logic  clk = 1'b0, rst_n = 1'b0, in_valid = 1'b0;
  fp32_t in_re [N], in_im [N];
  logic  out_valid;
  fp32_t out_re [N], out_im [N];

  fft_bsd #(.N(N)) dut (.clk, .rst_n, .in_valid, .in_re, .in_im, .out_valid, .out_re, .out_im);

  always #5 clk = ~clk;

  // expected results, indexed by the cycle they must appear in
  real exp_re [$][N];
  real exp_im [$][N];
  real exp_big [$];
  int  exp_cyc [$];
  int  cyc = 0;
  int  n_b2b = 0, n_idle = 0, n_zero = 0, n_const = 0, n_imp = 0, n_rand = 0, n_out = 0;

  function automatic fp32_t rnd_fp(input int emin, input int emax);
    return {1'($urandom_range(1)), 8'(int'($urandom_range(emax - emin)) + emin + 127), 23'($urandom)};
  endfunction

  initial begin
    done = 1'b0;
    checks = 0;
    failures = 0;
    for (int n = 0; n < N; n++) begin in_re[n] = '0; in_im[n] = '0; end
  end

  always @(posedge clk) cyc <= cyc + 1;

  // stimulus
  initial begin
    logic prev_v;
    prev_v = 1'b0;
    repeat (3) @(posedge clk);
    #1 rst_n = 1'b1;
    for (int t = 0; t < BLOCKS; t++) begin
      real xr [N], xi [N], er [N], ei [N], big;
      int  kind;
      while ($urandom_range(9) == 0) begin
        in_valid = 1'b0;
        prev_v = 1'b0;
        n_idle++;
        @(posedge clk);
        #1;
      end
      kind = t % 5;
      for (int n = 0; n < N; n++) begin
        in_re[n] = rnd_fp(-8, 8);
        in_im[n] = rnd_fp(-8, 8);
      end
      case (kind)
        1: begin  // some zero samples
          for (int n = 0; n < N; n += 2) in_re[n] = 32'd0;
          in_im[1] = 32'd0;
          n_zero++;
        end
        2: begin  // constant block
          for (int n = 1; n < N; n++) begin in_re[n] = in_re[0]; in_im[n] = in_im[0]; end
          n_const++;
        end
        3: begin  // impulse at a random position
          int p;
          p = $urandom_range(N - 1);
          for (int n = 0; n < N; n++) if (n != p) begin in_re[n] = 32'd0; in_im[n] = 32'd0; end
          n_imp++;
        end
        default: n_rand++;
      endcase
      big = 0.0;
      for (int n = 0; n < N; n++) begin
        xr[n] = fp32_real(in_re[n]);
        xi[n] = fp32_real(in_im[n]);
        big += fabs(xr[n]) + fabs(xi[n]);
      end
      for (int k = 0; k < N; k++) begin
        er[k] = 0.0;
        ei[k] = 0.0;
        for (int n = 0; n < N; n++) begin
          real c, s;
          c = $cos(2.0 * PI * ((n * k) % N) / N);
          s = -$sin(2.0 * PI * ((n * k) % N) / N);
          er[k] += xr[n] * c - xi[n] * s;
          ei[k] += xr[n] * s + xi[n] * c;
        end
      end
      in_valid = 1'b1;
      if (prev_v) n_b2b++;
      prev_v = 1'b1;
      exp_re.push_back(er);
      exp_im.push_back(ei);
      exp_big.push_back(big);
      exp_cyc.push_back(cyc + LAT);
      @(posedge clk);
      #1;
    end
    in_valid = 1'b0;
    repeat (LAT + 3) @(posedge clk);
    #1;
    checks++;
    if (exp_cyc.size() != 0) begin
      failures++;
      $display("%0d blocks never came out", exp_cyc.size());
    end
    checks++;
    if (n_b2b == 0 || n_idle == 0 || n_zero == 0 || n_const == 0 || n_imp == 0 || n_rand == 0) begin
      failures++;
      $display("case not reached: b2b=%0d idle=%0d zero=%0d const=%0d impulse=%0d random=%0d",
               n_b2b, n_idle, n_zero, n_const, n_imp, n_rand);
    end
    $display("N=%0d blocks=%0d outputs=%0d back-to-back=%0d idle=%0d zero=%0d const=%0d impulse=%0d random=%0d",
             N, BLOCKS, n_out, n_b2b, n_idle, n_zero, n_const, n_imp, n_rand);
    done = 1'b1;
  end

  // checker: sampled just before each rising edge
  always @(negedge clk) begin
    if (rst_n && out_valid) begin
      n_out++;
      checks++;
      if (exp_cyc.size() == 0 || exp_cyc[0] != cyc) begin
        failures++;
        $display("output block at cycle %0d not expected (next due %0d)", cyc,
                 exp_cyc.size() ? exp_cyc[0] : -1);
      end
      if (exp_cyc.size() != 0) begin
        real tol;
        tol = exp_big[0] * pow2(-19);
        for (int k = 0; k < N; k++) begin
          checks++;
          if (fabs(fp32_real(out_re[k]) - exp_re[0][k]) > tol ||
              fabs(fp32_real(out_im[k]) - exp_im[0][k]) > tol) begin
            failures++;
            if (failures < 10)
              $display("bin %0d: got %e, %e expected %e, %e", k, fp32_real(out_re[k]),
                       fp32_real(out_im[k]), exp_re[0][k], exp_im[0][k]);
          end
        end
        void'(exp_re.pop_front());
        void'(exp_im.pop_front());
        void'(exp_big.pop_front());
        void'(exp_cyc.pop_front());
      end
    end else if (rst_n && exp_cyc.size() != 0 && exp_cyc[0] == cyc) begin
      checks++;
      failures++;
      $display("block due at cycle %0d missing", cyc);
      void'(exp_re.pop_front());
      void'(exp_im.pop_front());
      void'(exp_big.pop_front());
      void'(exp_cyc.pop_front());
    end
  end

endmodule
