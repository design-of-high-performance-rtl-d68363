// qpsk_demapper: QPSK hard-decision detector of the OFDM receiver.
// It recovers the two bits of each received subcarrier value from the signs of
// its real and imaginary parts, the inverse of qpsk_mapper: a negative real part
// gives b1 = 1, a negative imaginary part gives b0 = 1. The subcarrier index
// travels along with the decision. The published system names the receiver's demodulation
// but not its insides; sign decisions are the simplest detector for QPSK.
// Interface: one value per cycle at most; result registered, one cycle latency.
module qpsk_demapper #(
  parameter int unsigned W  = 16,
  parameter int unsigned IW = 8
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic                 in_valid,
  input  logic signed [W-1:0]  in_re,
  input  logic signed [W-1:0]  in_im,
  input  logic [IW-1:0]        in_index,
  output logic                 out_valid,
  output ofdm_pkg::qpsk_bits_t out_bits,
  output logic [IW-1:0]        out_index
);
  always_ff @(posedge clk) begin
    if (!rst_n) begin
      out_valid <= 1'b0;
      out_bits  <= '0;
      out_index <= '0;
    end else begin
      out_valid <= in_valid;
      if (in_valid) begin
        out_bits  <= {in_re[W-1], in_im[W-1]};
        out_index <= in_index;
      end
    end
  end
endmodule
