// ofdm_system: QPSK OFDM link built on the 256-point Radix-2^2 SDF FFT/IFFT.
// The transmitter maps the serial message bits to QPSK symbols, one per
// subcarrier, and modulates them with the inverse transform; the receiver
// demodulates with the forward transform and detects the bits again. Here the
// transmitter output feeds the receiver input directly (an ideal channel), and
// the transmitted samples are also brought out. Each OFDM symbol is sent with a
// cyclic prefix of CP samples, which the receiver discards.
// Interface: mess_ready high means bit_in holds a message bit; when it is low no
// data is transmitted and the link holds its state. tx_* are the transmitted
// time samples, CP + N per OFDM symbol, tx_sof on the first. rx_data is high for every recovered bit pair rx_bits, which
// belongs to subcarrier rx_index; pcnt counts the packets (OFDM symbols of N
// subcarriers, 2*N bits) received.
// Timing: the transmit and receive transforms each hold back one OFDM symbol
// until the next one arrives, so packet p is counted while the message bits of
// packet p+2 enter (plus register latency).
module ofdm_system #(
  parameter int unsigned N  = ofdm_pkg::FFT_N,
  parameter int unsigned W  = ofdm_pkg::DATA_W,
  parameter int unsigned TW = ofdm_pkg::TW_W,
  parameter int unsigned PW = 16,
  parameter int unsigned CP = N / 4
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic                 mess_ready,
  input  logic                 bit_in,
  output logic                 tx_valid,
  output logic signed [W-1:0]  tx_re,
  output logic signed [W-1:0]  tx_im,
  output logic                 tx_sof,
  output logic                 rx_data,
  output ofdm_pkg::qpsk_bits_t rx_bits,
  output logic [$clog2(N)-1:0] rx_index,
  output logic [PW-1:0]        pcnt
);
  ofdm_tx #(.N(N), .W(W), .TW(TW), .CP(CP)) u_tx (
    .clk, .rst_n, .mess_ready, .bit_in, .tx_valid, .tx_re, .tx_im, .tx_sof
  );

  ofdm_rx #(.N(N), .W(W), .TW(TW), .PW(PW), .CP(CP)) u_rx (
    .clk, .rst_n, .rx_in_valid(tx_valid), .rx_in_re(tx_re), .rx_in_im(tx_im),
    .rx_data, .rx_bits, .rx_index, .pcnt
  );
endmodule
