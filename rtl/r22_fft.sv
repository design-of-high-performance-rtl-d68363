// r22_fft: N-point Radix-2^2 single-path delay-feedback (R2^2SDF) pipelined
// FFT/IFFT processor.
// The transform is split into log4(N) stages. A stage of span L has a BF-I with
// an L/2-word feedback delay, a BF-II with an L/4-word feedback delay that also
// applies the trivial -j twiddle, and, except in the last stage, a six-cycle
// pipelined twiddle-factor multiplier (TFM) with its own twiddle table. When N is
// a power of 2 but not of 4, one more BF-I with a one-word delay ends the
// pipeline. Each butterfly has an output register (the pipeline register placed
// before every stage's arithmetic). For N = 256 there are four stages with
// feedback delays 128, 64, 32, 16, 8, 4, 2 and 1 word and three TFMs.
// Every butterfly halves its results, so the forward transform computes
//   X(k) = (1/N) * sum_n x(n) * exp(-j*2*pi*n*k/N).
// Inverse transform: when `inverse` is high with a sample, real and imaginary
// parts are swapped at the input and again at the output, which turns the same
// hardware into (1/N) * sum_k X(k) * exp(+j*2*pi*n*k/N). The mode flag travels
// with the data, so it may change at any frame boundary.
// Interface: one sample per cycle at most, accepted when in_valid is high; the
// stream may pause at any time. Frames of N samples follow each other with no
// separator; the first frame after reset starts with the first valid sample.
// Results leave in bit-reversed order: out_index is the frequency (or time)
// index of the sample on out_re/out_im, and out_sof marks index 0 of a frame.
// The pipeline holds N-1 samples in its feedback delays, so a frame leaves only
// while the next N-1 samples are being accepted (push zeros to flush the last
// one), plus one register cycle per butterfly and six cycles per TFM.
module r22_fft #(
  parameter int unsigned N  = 256,
  parameter int unsigned W  = 16,
  parameter int unsigned TW = 16
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic                 in_valid,
  input  logic signed [W-1:0]  in_re,
  input  logic signed [W-1:0]  in_im,
  input  logic                 inverse,
  output logic                 out_valid,
  output logic signed [W-1:0]  out_re,
  output logic signed [W-1:0]  out_im,
  output logic                 out_inverse,
  output logic [$clog2(N)-1:0] out_index,
  output logic                 out_sof
);
  import ofdm_pkg::*;

  localparam int unsigned LOGN = $clog2(N);
  localparam int unsigned NS   = LOGN / 2;        // full radix-2^2 stages
  localparam int unsigned ODD  = LOGN % 2;        // trailing radix-2 stage
  localparam int unsigned NN   = 3 * NS + ODD + 1; // pipeline nodes

  initial begin
    assert (N >= 4 && (1 << LOGN) == N) else $error("r22_fft: N must be a power of 2, at least 4");
  end

  logic                v   [NN];
  logic signed [W-1:0] re  [NN];
  logic signed [W-1:0] im  [NN];
  logic                inv [NN];

  // Input: swap real and imaginary parts for the inverse transform.
  assign v[0]   = in_valid;
  assign re[0]  = inverse ? in_im : in_re;
  assign im[0]  = inverse ? in_re : in_im;
  assign inv[0] = inverse;

  for (genvar s = 0; s < int'(NS); s++) begin : g_stage
    localparam int unsigned L = N >> (2 * s);

    bf1 #(.W(W), .D(L / 2)) u_bf1 (
      .clk, .rst_n,
      .in_valid (v[3*s]),   .in_re (re[3*s]),   .in_im (im[3*s]),   .in_inv (inv[3*s]),
      .out_valid(v[3*s+1]), .out_re(re[3*s+1]), .out_im(im[3*s+1]), .out_inv(inv[3*s+1])
    );

    bf2 #(.W(W), .D(L / 4)) u_bf2 (
      .clk, .rst_n,
      .in_valid (v[3*s+1]), .in_re (re[3*s+1]), .in_im (im[3*s+1]), .in_inv (inv[3*s+1]),
      .out_valid(v[3*s+2]), .out_re(re[3*s+2]), .out_im(im[3*s+2]), .out_inv(inv[3*s+2])
    );

    if (L > 4) begin : g_tfm
      tfm #(.W(W), .TW(TW), .L(L)) u_tfm (
        .clk, .rst_n,
        .in_valid (v[3*s+2]), .in_re (re[3*s+2]), .in_im (im[3*s+2]), .in_inv (inv[3*s+2]),
        .out_valid(v[3*s+3]), .out_re(re[3*s+3]), .out_im(im[3*s+3]), .out_inv(inv[3*s+3])
      );
    end else begin : g_last
      // Last stage of span 4: all remaining twiddles are 1.
      assign v[3*s+3]   = v[3*s+2];
      assign re[3*s+3]  = re[3*s+2];
      assign im[3*s+3]  = im[3*s+2];
      assign inv[3*s+3] = inv[3*s+2];
    end
  end

  if (ODD != 0) begin : g_radix2
    bf1 #(.W(W), .D(1)) u_bf1 (
      .clk, .rst_n,
      .in_valid (v[NN-2]), .in_re (re[NN-2]), .in_im (im[NN-2]), .in_inv (inv[NN-2]),
      .out_valid(v[NN-1]), .out_re(re[NN-1]), .out_im(im[NN-1]), .out_inv(inv[NN-1])
    );
  end

  // Output: undo the swap for the inverse transform, number the samples.
  logic [LOGN-1:0] ocnt;
  logic            ocnt_wrap, ocnt_first;

  sample_counter #(.W(LOGN)) u_ocnt (
    .clk, .rst_n, .en(v[NN-1]), .count(ocnt), .wrap(ocnt_wrap), .first_wrap(ocnt_first)
  );

  assign out_valid   = v[NN-1];
  assign out_inverse = inv[NN-1];
  assign out_re      = inv[NN-1] ? im[NN-1] : re[NN-1];
  assign out_im      = inv[NN-1] ? re[NN-1] : im[NN-1];
  assign out_index   = LOGN'(bitrev(32'(ocnt), LOGN));
  assign out_sof     = (ocnt == '0);
endmodule
