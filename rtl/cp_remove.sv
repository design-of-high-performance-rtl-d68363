// cp_remove: cyclic-prefix removal at the OFDM receiver input.
// The incoming stream consists of extended OFDM symbols of CP + N samples, the
// first CP of which repeat the symbol's last CP samples. A counter of valid
// samples (mod N+CP) drops the first CP samples of each extended symbol and
// passes the N that follow, so the transform sees plain N-sample frames.
// Symbol alignment is by counting from the first sample after reset, like the
// rest of the pipeline; the OFDM description calls for discarding the prefix but not the
// synchronisation, which is outside its scope. With CP = 0 every sample passes.
// Interface: in_valid/in_re/in_im in, out_valid/out_re/out_im out, registered
// (one cycle latency); out_sof marks sample 0 of each symbol.
module cp_remove #(
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
  localparam int unsigned RW = $clog2(N + CP + 1);

  logic [RW-1:0] pos;

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      pos       <= '0;
      out_valid <= 1'b0;
      out_sof   <= 1'b0;
      out_re    <= '0;
      out_im    <= '0;
    end else begin
      out_valid <= in_valid && pos >= RW'(CP);
      out_sof   <= in_valid && pos == RW'(CP);
      if (in_valid) begin
        out_re <= in_re;
        out_im <= in_im;
        pos    <= (pos == RW'(N + CP - 1)) ? '0 : pos + 1'b1;
      end
    end
  end
endmodule
