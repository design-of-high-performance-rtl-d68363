// ofdm_rx: OFDM receiver with QPSK subcarriers.
// The cyclic prefix (first CP samples of each CP + N) is dropped, the
// remaining time samples go through the R2^2SDF processor in forward mode,
// which yields the N subcarrier values of each OFDM symbol in bit-reversed
// order, and a QPSK sign detector turns each value back into its two bits.
// Subcarrier values keep their bit-reversed order; rx_index names the
// subcarrier of each decision, so no reorder memory is needed here.
// Interface: rx_in_valid/rx_in_re/rx_in_im, one sample per cycle at most.
// rx_data is high for each recovered bit pair rx_bits of subcarrier rx_index;
// pcnt counts the packets (OFDM symbols) fully received, and wraps around.
// Timing: an OFDM symbol is decoded while the next one's first N-1 samples
// enter, plus the pipeline register cycles.
module ofdm_rx #(
  parameter int unsigned N  = 256,
  parameter int unsigned W  = 16,
  parameter int unsigned TW = 16,
  parameter int unsigned PW = 16,
  parameter int unsigned CP = N / 4
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic                 rx_in_valid,
  input  logic signed [W-1:0]  rx_in_re,
  input  logic signed [W-1:0]  rx_in_im,
  output logic                 rx_data,
  output ofdm_pkg::qpsk_bits_t rx_bits,
  output logic [$clog2(N)-1:0] rx_index,
  output logic [PW-1:0]        pcnt
);
  localparam int unsigned LOGN = $clog2(N);

  logic                c_valid, c_sof;
  logic signed [W-1:0] c_re, c_im;

  cp_remove #(.N(N), .W(W), .CP(CP)) u_cp (
    .clk, .rst_n, .in_valid(rx_in_valid), .in_re(rx_in_re), .in_im(rx_in_im),
    .out_valid(c_valid), .out_re(c_re), .out_im(c_im), .out_sof(c_sof)
  );

  logic                f_valid, f_inverse, f_sof;
  logic signed [W-1:0] f_re, f_im;
  logic [LOGN-1:0]     f_index;

  r22_fft #(.N(N), .W(W), .TW(TW)) u_fft (
    .clk, .rst_n, .in_valid(c_valid), .in_re(c_re), .in_im(c_im), .inverse(1'b0),
    .out_valid(f_valid), .out_re(f_re), .out_im(f_im), .out_inverse(f_inverse),
    .out_index(f_index), .out_sof(f_sof)
  );

  qpsk_demapper #(.W(W), .IW(LOGN)) u_demap (
    .clk, .rst_n, .in_valid(f_valid), .in_re(f_re), .in_im(f_im), .in_index(f_index),
    .out_valid(rx_data), .out_bits(rx_bits), .out_index(rx_index)
  );

  // Packet counter: one packet per N decisions.
  logic [LOGN-1:0] scnt;
  logic            scnt_wrap, scnt_first;

  sample_counter #(.W(LOGN)) u_scnt (
    .clk, .rst_n, .en(rx_data), .count(scnt), .wrap(scnt_wrap), .first_wrap(scnt_first)
  );

  always_ff @(posedge clk) begin
    if (!rst_n)                 pcnt <= '0;
    else if (rx_data && scnt_wrap) pcnt <= pcnt + 1'b1;
  end
endmodule
