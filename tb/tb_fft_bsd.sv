// End-to-end testbench of the FFT at its default size (8 points, no
// parameter override): 300 blocks through fft_bsd, checked against a
// double-precision DFT by fft_run_check.
module tb_fft_bsd;
  logic done;
  int   checks, failures;
  int   cycles = 0;

  fft_run_check #(.N(8), .BLOCKS(300)) u_run (.done, .checks, .failures);

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
