// tfm: twiddle-factor multiplier (TFM) between two Radix-2^2 stages of span L.
// It multiplies each sample leaving BF-II by W_L^(n3*(k1+2*k2)), the non-trivial
// twiddle of the radix-2^2 decomposition, with a fully pipelined complex
// multiplier of six clock cycles latency built from four real multipliers, one
// adder and one subtractor, as the published architecture specifies:
//   (xr + j*xi)(a + j*b) = (xr*a - xi*b) + j(xi*a + xr*b).
// Position in the L-sample block: the top two bits of a local log2(L)-bit counter
// give the segment q (0..3), the rest give n3; the exponent is n3*{0,2,1,3}[q],
// because BF-II emits its outputs in the order (k1,k2) = (0,0),(0,1),(1,0),(1,1).
// Pipeline: 1 operand and twiddle-ROM register, 2 products, 3 sum/difference,
// 4 rounding offset, 5 shift and saturation, 6 output register. The product is
// rounded to nearest and saturated to W bits (this implementation's choice).
// Interface: valid/re/im/inv in and out; out appears exactly 6 cycles after in.
module tfm #(
  parameter int unsigned W   = 16,
  parameter int unsigned TW  = 16,
  parameter int unsigned L   = 256
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
  localparam int unsigned LW = $clog2(L);
  localparam int unsigned PW = W + TW;          // product width
  localparam int unsigned SW = PW + 1;          // sum width
  localparam int unsigned FB = TW - 2;          // fraction bits of the twiddle

  // ---- twiddle address --------------------------------------------------
  logic [LW-1:0] cnt;
  logic          cnt_wrap, cnt_first;
  logic [1:0]    seg;
  logic [LW-1:0] n3, addr;

  sample_counter #(.W(LW)) u_cnt (
    .clk, .rst_n, .en(in_valid), .count(cnt), .wrap(cnt_wrap), .first_wrap(cnt_first)
  );

  always_comb begin
    seg = cnt[LW-1 -: 2];
    n3  = LW'(cnt[LW-3:0]);
    unique case (seg)
      2'd0:    addr = '0;
      2'd1:    addr = LW'(n3 << 1);
      2'd2:    addr = n3;
      default: addr = LW'(n3 * 3);
    endcase
  end

  logic signed [TW-1:0] tw_re, tw_im;

  twiddle_rom #(.L(L), .TW(TW)) u_rom (
    .clk, .addr, .tw_re, .tw_im
  );

  // ---- pipeline ----------------------------------------------------------
  logic [5:0]           v;                 // valid per stage
  logic [5:0]           inv;               // inverse flag per stage
  logic signed [W-1:0]  s1_re, s1_im;
  logic signed [PW-1:0] s2_ra, s2_ib, s2_ia, s2_rb;
  logic signed [SW-1:0] s3_re, s3_im, s4_re, s4_im;
  logic signed [W-1:0]  s5_re, s5_im;

  function automatic logic signed [W-1:0] sat(input logic signed [SW-1:0] x);
    logic signed [SW-1:0] y;
    y = x >>> FB;
    if (y > SW'((longint'(1) << (W - 1)) - 1))  return {1'b0, {(W-1){1'b1}}};
    if (y < -SW'(longint'(1) << (W - 1)))       return {1'b1, {(W-1){1'b0}}};
    return y[W-1:0];
  endfunction

  always_ff @(posedge clk) begin
    if (!rst_n) v <= '0;
    else        v <= {v[4:0], in_valid};
  end

  always_ff @(posedge clk) begin
    inv   <= {inv[4:0], in_inv};
    // 1: operands (the ROM registers the twiddle in the same cycle)
    s1_re <= in_re;
    s1_im <= in_im;
    // 2: four real products
    s2_ra <= PW'(s1_re) * PW'(tw_re);
    s2_ib <= PW'(s1_im) * PW'(tw_im);
    s2_ia <= PW'(s1_im) * PW'(tw_re);
    s2_rb <= PW'(s1_re) * PW'(tw_im);
    // 3: one subtractor, one adder
    s3_re <= SW'(s2_ra) - SW'(s2_ib);
    s3_im <= SW'(s2_ia) + SW'(s2_rb);
    // 4: rounding offset
    s4_re <= s3_re + SW'(longint'(1) << (FB - 1));
    s4_im <= s3_im + SW'(longint'(1) << (FB - 1));
    // 5: scale back and saturate
    s5_re <= sat(s4_re);
    s5_im <= sat(s4_im);
    // 6: output
    out_re <= s5_re;
    out_im <= s5_im;
  end

  assign out_valid = v[5];
  assign out_inv   = inv[5];
endmodule
