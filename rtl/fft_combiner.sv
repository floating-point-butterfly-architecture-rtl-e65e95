// Combiner: merges two M/2-point transforms into one M-point transform.
//
// in[0 .. M/2-1] holds the transform E of the even-indexed samples and
// in[M/2 .. M-1] the transform O of the odd-indexed samples. For
// k = 0 .. M/2-1, one BSD floating-point butterfly computes
//     out[k]       = E[k] + W_M^k * O[k]
//     out[k + M/2] = E[k] - W_M^k * O[k]
// with the twiddle W_M^k = exp(-j*2*pi*k/M) taken as a constant from the
// package table (IEEE-754 single precision, M up to 32).
//
// Interface: in_valid/in in, out_valid/out out, no backpressure.
// Timing: the butterflies are combinational and their results are
// registered, so out is valid one cycle after in_valid and a new block can
// enter every cycle. Combining through butterflies is the document's; the
// output register is this design's choice.
module fft_combiner
  import bsd_fp_pkg::*;
#(
  parameter int unsigned M = 8
) (
  input  logic       clk,
  input  logic       rst_n,
  input  logic       in_valid,
  input  bsd_cplx_t  in [M],
  output logic       out_valid,
  output bsd_cplx_t  out [M]
);

  localparam int unsigned H = M / 2;

  bsd_cplx_t bx [H];
  bsd_cplx_t by [H];

  for (genvar k = 0; k < H; k++) begin : g_bf
    localparam fp32_cplx_t W = twiddle(M, k);
    bsd_butterfly u_bf (.a(in[k]), .b(in[k + H]), .w(W), .x(bx[k]), .y(by[k]));
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) out_valid <= 1'b0;
    else        out_valid <= in_valid;
  end

  always_ff @(posedge clk) begin
    if (in_valid)
      for (int unsigned k = 0; k < H; k++) begin
        out[k]     <= bx[k];
        out[k + H] <= by[k];
      end
  end

endmodule
