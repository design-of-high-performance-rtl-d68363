// bf1: butterfly type I (BF-I) of the Radix-2^2 single-path delay-feedback FFT.
// It pairs sample n with sample n+D of each 2*D-sample block. During the first
// half of a block the incoming samples are stored in the D-word feedback delay
// and the delay's previous contents (last block's differences) are sent out.
// During the second half the butterfly forms the sum and difference of the
// stored sample and the incoming one: the sum goes out, the difference goes
// into the delay and leaves during the next first half. Sums and differences
// are halved with rounding so the word width stays W (per-stage scaling by 1/2
// is this implementation's choice; the published architecture states no scaling rule).
// The inverse-transform flag `in_inv` travels with each sample, through the
// delay as well, so that it stays attached to the data it describes.
// Interface: valid/re/im/inv in and out. The output is registered: a sample
// accepted at cycle t produces a result at cycle t+1 when it is a sum, or D
// valid samples later when it is a difference. out_valid stays low until the
// first butterfly has been computed, so the first D inputs give no output.
module bf1 #(
  parameter int unsigned W = 16,
  parameter int unsigned D = 128
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
  localparam int unsigned CW = $clog2(2 * D);

  logic [CW-1:0] cnt;
  logic          cnt_wrap, primed_q;
  logic          sel;           // 1 during the second half of a block: butterfly
  logic          primed;        // feedback delay holds data of this stream

  sample_counter #(.W(CW)) u_cnt (
    .clk, .rst_n, .en(in_valid), .count(cnt), .wrap(cnt_wrap), .first_wrap(primed_q)
  );

  assign sel    = cnt[CW-1];
  assign primed = primed_q | sel;

  // Feedback delay word: {inv, re, im}
  logic [2*W:0] fb_in, fb_out;
  logic signed [W-1:0] a_re, a_im;
  logic                a_inv;

  assign {a_inv, a_re, a_im} = fb_out;

  sdf_delay #(.W(2 * W + 1), .D(D)) u_fb (
    .clk, .rst_n, .en(in_valid), .din(fb_in), .dout(fb_out)
  );

  // Halve a W+1-bit sum with rounding to nearest (ties upward).
  function automatic logic signed [W-1:0] half(input logic signed [W+1:0] s);
    logic signed [W+1:0] t;
    t = (s + 1) >>> 1;
    return t[W-1:0];
  endfunction

  logic signed [W+1:0] sum_re, sum_im, dif_re, dif_im;
  logic signed [W-1:0] nxt_re, nxt_im;
  logic                nxt_inv;

  always_comb begin
    sum_re = (W + 2)'(a_re) + (W + 2)'(in_re);
    sum_im = (W + 2)'(a_im) + (W + 2)'(in_im);
    dif_re = (W + 2)'(a_re) - (W + 2)'(in_re);
    dif_im = (W + 2)'(a_im) - (W + 2)'(in_im);
    if (sel) begin
      nxt_re  = half(sum_re);
      nxt_im  = half(sum_im);
      nxt_inv = a_inv;
      fb_in   = {in_inv, half(dif_re), half(dif_im)};
    end else begin
      nxt_re  = a_re;
      nxt_im  = a_im;
      nxt_inv = a_inv;
      fb_in   = {in_inv, in_re, in_im};
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
        out_inv <= nxt_inv;
      end
    end
  end
endmodule
