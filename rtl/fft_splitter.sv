// Input splitter of the N-point decimation-in-time FFT.
//
// Splitting an N-point transform into the transforms of its even- and
// odd-indexed samples, and repeating the split down to 2-point transforms,
// places sample n at position bitrev(n). The splitter latches one block of N
// IEEE-754 single-precision complex samples when in_valid is high, converts
// each component to BSD floating point (carry-free, fp32_to_bsd) and presents
// the block in bit-reversed order, so that every aligned group of 2^s
// outputs is the input of one 2^s-point sub-transform.
//
// Interface: in_valid/in_re/in_im in, out_valid/out out, no backpressure.
// Timing: one register stage; out is valid the cycle after in_valid. N must
// be a power of two. The conversion and the register are this design's
// choices; the splitting itself is the document's.
module fft_splitter
  import bsd_fp_pkg::*;
#(
  parameter int unsigned N = 8
) (
  input  logic       clk,
  input  logic       rst_n,
  input  logic       in_valid,
  input  fp32_t      in_re [N],
  input  fp32_t      in_im [N],
  output logic       out_valid,
  output bsd_cplx_t  out [N]
);

  localparam int unsigned LG = $clog2(N);

  function automatic int unsigned bitrev(input int unsigned n);
    int unsigned r;
    r = 0;
    for (int unsigned i = 0; i < LG; i++)
      if (n[i]) r |= 1 << (LG - 1 - i);
    return r;
  endfunction

  bsd_cplx_t conv [N];

  for (genvar n = 0; n < N; n++) begin : g_conv
    fp32_to_bsd u_re (.f(in_re[n]), .b(conv[n].re));
    fp32_to_bsd u_im (.f(in_im[n]), .b(conv[n].im));
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) out_valid <= 1'b0;
    else        out_valid <= in_valid;
  end

  always_ff @(posedge clk) begin
    if (in_valid)
      for (int unsigned n = 0; n < N; n++)
        out[bitrev(n)] <= conv[n];
  end

endmodule
