// tb_r22_fft: self-checking test of the Radix-2^2 SDF FFT/IFFT processor.
// It runs three sizes side by side: N = 256 (the default configuration), N = 32
// (not a power of 4, so the pipeline ends in a lone radix-2 butterfly) and
// N = 16. Each size gets random forward and inverse frames with random input
// pauses, checked against a floating-point DFT (see fft_checker).
module tb_r22_fft;
  logic clk = 0;
  logic rst_n = 0;
  always #5 clk = ~clk;

  int c0, f0, s0, i0, c1, f1, s1, i1, c2, f2, s2, i2;
  logic d0, d1, d2;
  int checks, failures;

  fft_checker #(.N(256), .FRAMES(4)) u_256 (.clk, .rst_n, .checks(c0), .failures(f0), .stalls(s0), .inv_frames(i0), .done(d0));
  fft_checker #(.N(32),  .FRAMES(6)) u_32  (.clk, .rst_n, .checks(c1), .failures(f1), .stalls(s1), .inv_frames(i1), .done(d1));
  fft_checker #(.N(16),  .FRAMES(6)) u_16  (.clk, .rst_n, .checks(c2), .failures(f2), .stalls(s2), .inv_frames(i2), .done(d2));

  initial begin
    repeat (4) @(posedge clk);
    rst_n = 1;
    @(posedge clk);
    wait (d0 && d1 && d2);
    checks   = c0 + c1 + c2;
    failures = f0 + f1 + f2;
    // every mechanism must have been exercised
    checks++; if (s0 == 0 || s1 == 0 || s2 == 0) begin failures++; $display("no input pause"); end
    checks++; if (i0 == 0 || i1 == 0 || i2 == 0) begin failures++; $display("no inverse frame"); end
    checks++; if (c0 != 4 * 256) begin failures++; $display("N=256: %0d outputs", c0); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20000) @(posedge clk);
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", c0 + c1 + c2, f0 + f1 + f2 + 1);
    $finish;
  end
endmodule
