// End-to-end testbench of a 16-point fft_bsd: 100 blocks checked against a
// double-precision DFT by fft_run_check. The same checker accepts N = 32,
// the largest size the twiddle table supports; that build takes several
// minutes of C++ compilation.
module tb_fft_bsd16;
  logic done;
  int   checks, failures;

  fft_run_check #(.N(16), .BLOCKS(100)) u_run (.done, .checks, .failures);

  initial begin
    #200000;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end

  always @(posedge done) begin
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
