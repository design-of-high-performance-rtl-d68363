// fft_checker: drives one r22_fft instance of size N with random frames and
// compares every output sample with a directly computed DFT (or inverse DFT).
// Frames alternate between forward and inverse mode, the input stream pauses at
// random, and a zero frame at the end pushes the last real frame out. Expected
// values are (1/N)*sum x(n)*exp(-+j*2*pi*n*k/N), computed here in floating
// point; a sample passes if both parts are within TOL LSBs.
// Ports report how many checks ran and how many failed once `done` is high.
module fft_checker #(
  parameter int N      = 16,
  parameter int FRAMES = 4,
  parameter int W      = 16,
  parameter int TOL    = 6
) (
  input  logic clk,
  input  logic rst_n,
  output int   checks,
  output int   failures,
  output int   stalls,
  output int   inv_frames,
  output logic done
);
  localparam int LOGN = $clog2(N);
  localparam real PI = 3.14159265358979323846;

  logic                 in_valid, inverse;
  logic signed [W-1:0]  in_re, in_im;
  logic                 out_valid, out_inverse, out_sof;
  logic signed [W-1:0]  out_re, out_im;
  logic [LOGN-1:0]      out_index;

  r22_fft #(.N(N), .W(W), .TW(16)) dut (
    .clk, .rst_n, .in_valid, .in_re, .in_im, .inverse,
    .out_valid, .out_re, .out_im, .out_inverse, .out_index, .out_sof
  );

  int  xr [FRAMES+1][N];
  int  xi [FRAMES+1][N];
  real er [FRAMES][N];
  real ei [FRAMES][N];
  int  ofr, ocnt;

  function automatic logic frame_inv(int f);
    return f % 2 == 1;
  endfunction

  initial begin
    real sr, si, ang, sgn;
    checks = 0; failures = 0; stalls = 0; inv_frames = 0; done = 0;
    in_valid = 0; in_re = '0; in_im = '0; inverse = 0;
    for (int f = 0; f <= FRAMES; f++)
      for (int n = 0; n < N; n++) begin
        if (f == FRAMES) begin
          xr[f][n] = 0; xi[f][n] = 0;
        end else if (f == 0) begin
          // full-scale random data
          xr[f][n] = int'($urandom_range(65535)) - 32768;
          xi[f][n] = int'($urandom_range(65535)) - 32768;
        end else begin
          xr[f][n] = int'($urandom_range(32767)) - 16384;
          xi[f][n] = int'($urandom_range(32767)) - 16384;
        end
      end
    for (int f = 0; f < FRAMES; f++) begin
      sgn = frame_inv(f) ? 1.0 : -1.0;
      for (int k = 0; k < N; k++) begin
        sr = 0.0; si = 0.0;
        for (int n = 0; n < N; n++) begin
          ang = sgn * 2.0 * PI * real'((n * k) % N) / real'(N);
          sr += real'(xr[f][n]) * $cos(ang) - real'(xi[f][n]) * $sin(ang);
          si += real'(xr[f][n]) * $sin(ang) + real'(xi[f][n]) * $cos(ang);
        end
        er[f][k] = sr / real'(N);
        ei[f][k] = si / real'(N);
      end
    end
    wait (rst_n);
    @(posedge clk);
    for (int f = 0; f <= FRAMES; f++) begin
      if (frame_inv(f) && f < FRAMES) inv_frames++;
      for (int n = 0; n < N; n++) begin
        while ($urandom_range(7) == 0) begin
          in_valid <= 0;
          stalls++;
          @(posedge clk);
        end
        in_valid <= 1;
        in_re    <= W'(xr[f][n]);
        in_im    <= W'(xi[f][n]);
        inverse  <= frame_inv(f);
        @(posedge clk);
      end
    end
    in_valid <= 0;
    repeat (40) @(posedge clk);
    if (ofr != FRAMES) begin
      failures++;
      $display("fft_checker N=%0d: %0d frames out, expected %0d", N, ofr, FRAMES);
    end
    done = 1;
  end

  // Output checker
  initial begin
    ofr = 0; ocnt = 0;
    forever begin
      @(posedge clk);
      if (out_valid && ofr < FRAMES) begin
        automatic int  k  = int'(out_index);
        automatic real dr = real'(out_re) - er[ofr][k];
        automatic real di = real'(out_im) - ei[ofr][k];
        checks++;
        if (dr > TOL || dr < -TOL || di > TOL || di < -TOL
            || out_inverse != frame_inv(ofr) || out_sof != (ocnt == 0)
            || k != int'(ofdm_pkg::bitrev(32'(ocnt), LOGN))) begin
          failures++;
          if (failures < 10)
            $display("fft_checker N=%0d frame %0d bin %0d: got (%0d,%0d) expected (%f,%f)",
                     N, ofr, k, out_re, out_im, er[ofr][k], ei[ofr][k]);
        end
        ocnt++;
        if (ocnt == N) begin
          ocnt = 0;
          ofr++;
        end
      end
    end
  end
endmodule
