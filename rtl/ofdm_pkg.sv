// ofdm_pkg: constants and helpers shared by the Radix-2^2 FFT/IFFT processor and
// the QPSK OFDM transmitter/receiver built around it.
// The transform size (256) and the six-cycle twiddle multiplier latency follow
// the published architecture; the word widths, twiddle format and QPSK amplitude are
// choices of this implementation.
package ofdm_pkg;
  // Transform size of the main configuration.
  localparam int unsigned FFT_N   = 256;
  // Sample word width (real and imaginary part each, two's complement).
  localparam int unsigned DATA_W  = 16;
  // Twiddle word width; 1.0 is represented as 2**(TW_W-2).
  localparam int unsigned TW_W    = 16;
  // Latency of the pipelined twiddle-factor multiplier, in clock cycles.
  localparam int unsigned TFM_LAT = 6;

  // QPSK symbol: two bits, bit 1 selects the sign of I, bit 0 the sign of Q.
  typedef logic [1:0] qpsk_bits_t;

  // Reverse the lowest `width` bits of `v`.
  function automatic logic [31:0] bitrev(input logic [31:0] v, input int unsigned width);
    logic [31:0] r;
    r = '0;
    for (int unsigned i = 0; i < width; i++) r[i] = v[width-1-i];
    return r;
  endfunction
endpackage
