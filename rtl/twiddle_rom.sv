// twiddle_rom: twiddle-factor table of one Radix-2^2 stage of span L.
// Entry e holds W_L^e = cos(2*pi*e/L) - j*sin(2*pi*e/L), rounded to TW-bit two's
// complement with 1.0 represented as 2**(TW-2). The table is computed while the
// design is elaborated (no data file), and it is read synchronously: the value
// addressed in cycle t is on tw_re/tw_im in cycle t+1. For an inverse transform
// the same table is used; the processor conjugates data instead (see r22_fft).
// The published architecture reads twiddles from a table addressed by its stage counter; the
// number format and the full-period table size are this implementation's choice.
module twiddle_rom #(
  parameter int unsigned L  = 256,
  parameter int unsigned TW = 16
) (
  input  logic                     clk,
  input  logic [$clog2(L)-1:0]     addr,
  output logic signed [TW-1:0]     tw_re,
  output logic signed [TW-1:0]     tw_im
);
  localparam real PI = 3.14159265358979323846;

  function automatic logic signed [TW-1:0] quant(input real val);
    real s;
    s = val * real'(longint'(1) << (TW - 2));
    return TW'($rtoi(s >= 0.0 ? s + 0.5 : s - 0.5));
  endfunction

  logic signed [TW-1:0] rom_re [L];
  logic signed [TW-1:0] rom_im [L];

  for (genvar e = 0; e < int'(L); e++) begin : g_tab
    assign rom_re[e] = quant($cos(2.0 * PI * real'(e) / real'(L)));
    assign rom_im[e] = quant(-$sin(2.0 * PI * real'(e) / real'(L)));
  end

  always_ff @(posedge clk) begin
    tw_re <= rom_re[addr];
    tw_im <= rom_im[addr];
  end
endmodule
