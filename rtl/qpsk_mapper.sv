// qpsk_mapper: QPSK modulator of the OFDM transmitter.
// It takes the serial binary input stream, groups it into pairs of bits (the
// serial-to-parallel step) and maps each pair to a constellation point with
// equal-magnitude real and imaginary parts. The first bit of a pair (b1) sets
// the sign of the real part, the second (b0) the sign of the imaginary part,
// 0 giving +AMP and 1 giving -AMP: a Gray mapping in which neighbouring points
// differ in one bit. The mapping itself and AMP are choices of this
// implementation; the published system specifies only that two bits form one QPSK symbol.
// Interface: bit_valid/bit_in carry one bit per cycle at most and may pause at
// any time; sym_valid pulses for one cycle, the cycle after the second bit of a
// pair arrives, with the symbol on sym_re/sym_im and its bits on sym_bits.
module qpsk_mapper #(
  parameter int unsigned             W   = 16,
  parameter logic signed [W-1:0]     AMP = W'(1 << (W - 2))
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic                 bit_valid,
  input  logic                 bit_in,
  output logic                 sym_valid,
  output logic signed [W-1:0]  sym_re,
  output logic signed [W-1:0]  sym_im,
  output ofdm_pkg::qpsk_bits_t sym_bits
);
  logic have_first;     // first bit of a pair is held in `first`
  logic first;

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      have_first <= 1'b0;
      first      <= 1'b0;
      sym_valid  <= 1'b0;
      sym_re     <= '0;
      sym_im     <= '0;
      sym_bits   <= '0;
    end else begin
      sym_valid <= 1'b0;
      if (bit_valid) begin
        if (!have_first) begin
          first      <= bit_in;
          have_first <= 1'b1;
        end else begin
          have_first <= 1'b0;
          sym_valid  <= 1'b1;
          sym_bits   <= {first, bit_in};
          sym_re     <= first  ? -AMP : AMP;
          sym_im     <= bit_in ? -AMP : AMP;
        end
      end
    end
  end
endmodule
