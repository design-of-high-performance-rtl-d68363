// bitrev_buffer: double-buffered reorder memory of the OFDM transmitter. It
// turns the bit-reversed output order of the pipelined transform into natural
// order and extends each OFDM symbol by its cyclic prefix.
// Two banks of N complex words: while one bank is filled, sample u of the
// incoming frame written at address bitrev(u), the other, once full, is read
// out one word per cycle: first its last CP words (addresses N-CP..N-1, the
// cyclic prefix), then addresses 0..N-1. The buffer keeps up as long as the
// input delivers at most N samples in every N+CP cycles (the QPSK transmitter
// delivers one every two cycles at most); an assertion flags an overflow.
// Cyclic-prefix insertion follows the OFDM description; its length is not given
// there and is a parameter. The reorder step itself is this implementation's
// addition: the receiver's transform needs time samples in natural order.
// Interface: in_valid/in_re/in_im in; out_valid/out_re/out_im out, registered;
// out_sof marks the first word of each extended symbol (the first prefix word,
// or sample 0 when CP = 0). A frame starts leaving the cycle after its last
// sample arrives.
module bitrev_buffer #(
  parameter int unsigned N  = 256,
  parameter int unsigned W  = 16,
  parameter int unsigned CP = 64
) (
  input  logic                clk,
  input  logic                rst_n,
  input  logic                in_valid,
  input  logic signed [W-1:0] in_re,
  input  logic signed [W-1:0] in_im,
  output logic                out_valid,
  output logic signed [W-1:0] out_re,
  output logic signed [W-1:0] out_im,
  output logic                out_sof
);
  import ofdm_pkg::*;

  localparam int unsigned AW = $clog2(N);

  logic [2*W-1:0] mem [2*N];
  localparam int unsigned RW = $clog2(N + CP + 1);

  logic [AW-1:0]  wcnt;
  logic [RW-1:0]  rcnt;          // position in the extended symbol
  logic [AW-1:0]  raddr;
  logic           wbank, rbank;
  logic [1:0]     full;          // bank holds a complete frame not yet read
  logic           reading;

  assign reading = full[rbank];
  // Prefix positions 0..CP-1 read addresses N-CP..N-1, then 0..N-1 follow.
  assign raddr   = (rcnt < RW'(CP)) ? AW'(rcnt + RW'(N - CP)) : AW'(rcnt - RW'(CP));

  always_ff @(posedge clk) begin
    if (in_valid) mem[{wbank, AW'(bitrev(32'(wcnt), AW))}] <= {in_re, in_im};
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      wcnt      <= '0;
      rcnt      <= '0;
      wbank     <= 1'b0;
      rbank     <= 1'b0;
      full      <= '0;
      out_valid <= 1'b0;
      out_sof   <= 1'b0;
      out_re    <= '0;
      out_im    <= '0;
    end else begin
      logic [1:0] nfull;
      nfull     = full;
      out_valid <= reading;
      out_sof   <= reading && rcnt == '0;
      if (reading) begin
        {out_re, out_im} <= mem[{rbank, raddr}];
        if (rcnt == RW'(N + CP - 1)) begin
          rcnt         <= '0;
          nfull[rbank] = 1'b0;
          rbank       <= ~rbank;
        end else begin
          rcnt <= rcnt + 1'b1;
        end
      end
      if (in_valid) begin
        wcnt <= wcnt + 1'b1;
        if (&wcnt) begin
          nfull[wbank] = 1'b1;
          wbank       <= ~wbank;
        end
      end
      full <= nfull;
    end
  end

  // The bank being written must not hold an unread frame.
  assert property (@(posedge clk) disable iff (!rst_n) in_valid |-> !full[wbank])
    else $error("bitrev_buffer: overflow, bank %0d still full", wbank);
endmodule
