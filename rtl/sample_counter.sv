// sample_counter: the log2(L)-bit binary counter that sequences one pipeline
// element of the Radix-2^2 FFT.
// The published architecture uses one log2(N)-bit counter both as the twiddle address counter and
// as the synchronisation controller. Here that counter is kept as one copy per
// butterfly and per twiddle multiplier, each counting the valid samples that
// reach that element, so every copy stays aligned with its own data even when
// the input stream has gaps (a design choice of this implementation).
// Interface: `en` advances the count by one (mod 2**W); `count` is the position
// of the sample currently presented; `wrap` is high while count is all ones.
// `first_wrap` goes high after the first full period and stays high, which the
// butterflies use to tell when their feedback delay holds real data.
// Timing: count updates on the clock edge after `en`; synchronous active-low reset.
module sample_counter #(
  parameter int unsigned W = 8
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         en,
  output logic [W-1:0] count,
  output logic         wrap,
  output logic         first_wrap
);
  assign wrap = &count;

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      count      <= '0;
      first_wrap <= 1'b0;
    end else if (en) begin
      count <= count + 1'b1;
      if (wrap) first_wrap <= 1'b1;
    end
  end
endmodule
