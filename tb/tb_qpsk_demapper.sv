// tb_qpsk_demapper: random subcarrier values and indices in, random gaps; each
// decision must carry the signs of the value's parts (1 = negative) and the
// same index, one cycle later.
module tb_qpsk_demapper;
  localparam int W = 16;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic in_valid = 0, out_valid;
  logic signed [W-1:0] in_re = 0, in_im = 0;
  logic [7:0] in_index = 0, out_index;
  ofdm_pkg::qpsk_bits_t out_bits;
  int checks = 0, failures = 0;
  logic pv; logic [1:0] pb; logic [7:0] pi;

  qpsk_demapper dut (.clk, .rst_n, .in_valid, .in_re, .in_im, .in_index, .out_valid, .out_bits, .out_index);

  initial begin
    repeat (2) @(posedge clk);
    rst_n <= 1;
    @(posedge clk);
    for (int i = 0; i < 300; i++) begin
      in_valid <= 1'($urandom_range(3) != 0);
      in_re    <= W'($urandom);
      in_im    <= W'($urandom);
      in_index <= 8'($urandom);
      @(posedge clk);
      pv = in_valid; pb = {in_re < 0, in_im < 0}; pi = in_index;
      #1;
      checks++;
      if (out_valid != pv || (pv && (out_bits != pb || out_index != pi))) begin
        failures++;
        $display("step %0d: got %b %b %0d expected %b %b %0d", i, out_valid, out_bits, out_index, pv, pb, pi);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (1000) @(posedge clk);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end
endmodule
