// bf2: butterfly type II (BF-II) of the Radix-2^2 single-path delay-feedback FFT.
// It works like BF-I on pairs (n, n+D) of each 2*D-sample half of a 4*D-sample
// block, with the D-word feedback delay, and it also applies the trivial twiddle
// factor -j to the samples of the last quarter of the 4*D block (the odd-k1
// outputs of the preceding BF-I, second element of each pair). As in the published architecture,
// -j is not a multiplication: the real and imaginary parts of the incoming
// sample are swapped and the adder/subtractor roles are exchanged, so
//   sum = (a_re + b_im) + j(a_im - b_re),  dif = (a_re - b_im) + j(a_im + b_re).
// Sums and differences are halved with rounding (this implementation's scaling).
// Interface and timing are those of bf1: registered output, out_valid low for the
// first D inputs after reset, the inverse flag carried with each sample.
module bf2 #(
  parameter int unsigned W = 16,
  parameter int unsigned D = 64
) (
  input  logic                clk,
  input  logic                rst_n,
  input  logic                in_valid,
  input  logic signed [W-1:0] in_re,
  input  logic signed [W-1:0] in_im,
  input  logic                in_inv,
  output logic                out_valid,
  output logic signed [W-1:0] out_re,
  output logic signed [W-1:0] out_im,
  output logic                out_inv
);
  localparam int unsigned CW = $clog2(4 * D);

  logic [CW-1:0] cnt;
  logic          cnt_wrap, first_wrap;
  logic          sel;      // second half of a 2*D pair window: butterfly
  logic          rot;      // last quarter of the 4*D block: multiply input by -j
  logic          primed;

  sample_counter #(.W(CW)) u_cnt (
    .clk, .rst_n, .en(in_valid), .count(cnt), .wrap(cnt_wrap), .first_wrap(first_wrap)
  );

  assign sel    = cnt[CW-2];
  assign rot    = cnt[CW-1] & cnt[CW-2];
  assign primed = first_wrap | cnt[CW-1] | cnt[CW-2];

  logic [2*W:0] fb_in, fb_out;
  logic signed [W-1:0] a_re, a_im;
  logic                a_inv;

  assign {a_inv, a_re, a_im} = fb_out;

  sdf_delay #(.W(2 * W + 1), .D(D)) u_fb (
    .clk, .rst_n, .en(in_valid), .din(fb_in), .dout(fb_out)
  );

  function automatic logic signed [W-1:0] half(input logic signed [W+1:0] s);
    logic signed [W+1:0] t;
    t = (s + 1) >>> 1;
    return t[W-1:0];
  endfunction

  // Operand routing: the multiplexers swap real and imaginary parts of the
  // incoming sample when `rot` is set, and the add/subtract choice flips.
  logic signed [W+1:0] b_x, b_y;       // operand added to a_re / a_im in the sum
  logic signed [W+1:0] sum_re, sum_im, dif_re, dif_im;
  logic signed [W-1:0] nxt_re, nxt_im;

  always_comb begin
    if (rot) begin
      b_x = (W + 2)'(in_im);
      b_y = -((W + 2)'(in_re));
    end else begin
      b_x = (W + 2)'(in_re);
      b_y = (W + 2)'(in_im);
    end
    sum_re = (W + 2)'(a_re) + b_x;
    sum_im = (W + 2)'(a_im) + b_y;
    dif_re = (W + 2)'(a_re) - b_x;
    dif_im = (W + 2)'(a_im) - b_y;
    if (sel) begin
      nxt_re = half(sum_re);
      nxt_im = half(sum_im);
      fb_in  = {in_inv, half(dif_re), half(dif_im)};
    end else begin
      nxt_re = a_re;
      nxt_im = a_im;
      fb_in  = {in_inv, in_re, in_im};
    end
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      out_valid <= 1'b0;
      out_re    <= '0;
      out_im    <= '0;
      out_inv   <= 1'b0;
    end else begin
      out_valid <= in_valid & primed;
      if (in_valid) begin
        out_re  <= nxt_re;
        out_im  <= nxt_im;
        out_inv <= a_inv;
      end
    end
  end
endmodule
