// N-point radix-2 decimation-in-time FFT on IEEE-754 single-precision complex
// data, computed internally in binary signed-digit (BSD) floating point.
//
// Data path: the splitter converts one block of N samples to BSD floating
// point and reorders it into bit-reversed order; log2(N) stages of combiners
// follow, stage s holding N/2^s combiners of size 2^s, each built from
// butterflies made of four fused dot-product-add (FDPA) units. All
// intermediate results stay in BSD floating point, so the only
// carry-propagating conversions are inside the FDPA rounding step and in the
// final conversion back to IEEE-754 single (bsd_to_fp32).
//
// Interface: in_valid with in_re[n]/in_im[n] (sample n, natural order);
// out_valid with out_re[k]/out_im[k] (bin k, natural order),
// X[k] = sum_n x[n] exp(-j 2 pi n k / N). No backpressure.
// Timing: fully pipelined, one register per stage; latency log2(N) + 2
// cycles (splitter, log2(N) combiner stages, output conversion), one block
// accepted every cycle. N is a power of two from 2 to 32; the default 8 is
// the transform size the document implements. The pipelining is this
// design's choice.
module fft_bsd
  import bsd_fp_pkg::*;
#(
  parameter int unsigned N = 8
) (
  input  logic  clk,
  input  logic  rst_n,
  input  logic  in_valid,
  input  fp32_t in_re [N],
  input  fp32_t in_im [N],
  output logic  out_valid,
  output fp32_t out_re [N],
  output fp32_t out_im [N]
);

  localparam int unsigned LG = $clog2(N);

  logic      st_valid [LG+1];
  bsd_cplx_t st_data  [LG+1][N];

  fft_splitter #(.N(N)) u_split (
    .clk, .rst_n, .in_valid, .in_re, .in_im,
    .out_valid(st_valid[0]), .out(st_data[0])
  );

  for (genvar s = 1; s <= LG; s++) begin : g_stage
    localparam int unsigned M = 2 ** s;
    logic v [N / M];
    for (genvar g = 0; g < N / M; g++) begin : g_comb
      bsd_cplx_t cin  [M];
      bsd_cplx_t cout [M];
      for (genvar i = 0; i < M; i++) begin : g_wire
        assign cin[i] = st_data[s-1][g*M + i];
        assign st_data[s][g*M + i] = cout[i];
      end
      fft_combiner #(.M(M)) u_comb (
        .clk, .rst_n, .in_valid(st_valid[s-1]), .in(cin),
        .out_valid(v[g]), .out(cout)
      );
    end
    assign st_valid[s] = v[0];
  end

  fp32_t conv_re [N];
  fp32_t conv_im [N];

  for (genvar k = 0; k < N; k++) begin : g_out
    bsd_to_fp32 u_re (.b(st_data[LG][k].re), .f(conv_re[k]));
    bsd_to_fp32 u_im (.b(st_data[LG][k].im), .f(conv_im[k]));
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) out_valid <= 1'b0;
    else        out_valid <= st_valid[LG];
  end

  always_ff @(posedge clk) begin
    if (st_valid[LG]) begin
      out_re <= conv_re;
      out_im <= conv_im;
    end
  end

endmodule
