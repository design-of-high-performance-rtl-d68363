// ofdm_tx: OFDM transmitter with QPSK subcarriers.
// The serial input bits are grouped in pairs and mapped to QPSK symbols, N
// consecutive symbols form one OFDM symbol (one per subcarrier, subcarrier k
// carrying symbol k), and the R2^2SDF processor in inverse mode turns them into
// N time samples. A reorder buffer puts the time samples, which the pipeline
// delivers in bit-reversed order, back into natural order and sends each OFDM
// symbol preceded by its cyclic prefix, a copy of its last CP samples.
// Interface: mess_ready/bit_in carry one bit per cycle when mess_ready is high;
// with mess_ready low nothing is sent and the whole chain holds its state.
// tx_valid/tx_re/tx_im/tx_sof give the time samples, CP + N per OFDM symbol;
// tx_sof marks the first sample of each (the first prefix sample).
// Timing: the IFFT pipeline keeps N-1 symbols in its feedback delays, so an OFDM
// symbol is emitted once the bits of the next one (2*N-2 bits) have entered.
// Samples come out with a scale of 1/N: each is the mean of the N subcarrier
// contributions.
module ofdm_tx #(
  parameter int unsigned         N   = 256,
  parameter int unsigned         W   = 16,
  parameter int unsigned         TW  = 16,
  parameter logic signed [W-1:0] AMP = W'(1 << (W - 2)),
  parameter int unsigned         CP  = N / 4
) (
  input  logic                clk,
  input  logic                rst_n,
  input  logic                mess_ready,
  input  logic                bit_in,
  output logic                tx_valid,
  output logic signed [W-1:0] tx_re,
  output logic signed [W-1:0] tx_im,
  output logic                tx_sof
);
  logic                 sym_valid;
  logic signed [W-1:0]  sym_re, sym_im;
  ofdm_pkg::qpsk_bits_t sym_bits;

  qpsk_mapper #(.W(W), .AMP(AMP)) u_map (
    .clk, .rst_n, .bit_valid(mess_ready), .bit_in,
    .sym_valid, .sym_re, .sym_im, .sym_bits
  );

  logic                 t_valid, t_inverse, t_sof;
  logic signed [W-1:0]  t_re, t_im;
  logic [$clog2(N)-1:0] t_index;

  r22_fft #(.N(N), .W(W), .TW(TW)) u_ifft (
    .clk, .rst_n, .in_valid(sym_valid), .in_re(sym_re), .in_im(sym_im), .inverse(1'b1),
    .out_valid(t_valid), .out_re(t_re), .out_im(t_im), .out_inverse(t_inverse),
    .out_index(t_index), .out_sof(t_sof)
  );

  bitrev_buffer #(.N(N), .W(W), .CP(CP)) u_reorder (
    .clk, .rst_n, .in_valid(t_valid), .in_re(t_re), .in_im(t_im),
    .out_valid(tx_valid), .out_re(tx_re), .out_im(tx_im), .out_sof(tx_sof)
  );
endmodule
