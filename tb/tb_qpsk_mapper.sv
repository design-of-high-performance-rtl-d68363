// tb_qpsk_mapper: feeds random bits with random pauses and checks that every
// pair (b1, b0) becomes one symbol, real part -AMP for b1 = 1 and +AMP for
// b1 = 0, imaginary part likewise from b0, one cycle after the pair's second bit.
module tb_qpsk_mapper;
  localparam int W = 16;
  localparam int AMP = 1 << (W - 2);
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic bit_valid = 0, bit_in = 0, sym_valid;
  logic signed [W-1:0] sym_re, sym_im;
  ofdm_pkg::qpsk_bits_t sym_bits;
  int checks = 0, failures = 0, nsym = 0, nbits = 0;
  bit sent [$];
  bit pair_done = 0;

  qpsk_mapper dut (.clk, .rst_n, .bit_valid, .bit_in, .sym_valid, .sym_re, .sym_im, .sym_bits);

  initial begin
    repeat (2) @(posedge clk);
    rst_n <= 1;
    @(posedge clk);
    for (int i = 0; i < 400; i++) begin
      bit_valid <= 1'($urandom_range(2) != 0);
      bit_in    <= 1'($urandom_range(1));
      @(posedge clk);
      // the monitor below sees sym_valid the edge after the pair completes
      pair_done = bit_valid && (nbits % 2 == 1);
      if (bit_valid) begin sent.push_back(bit_in); nbits++; end
    end
    bit_valid <= 0;
    repeat (3) @(posedge clk);
    checks++;
    if (nsym != nbits / 2) begin failures++; $display("%0d symbols for %0d bits", nsym, nbits); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(posedge clk) begin
    #1;
    checks++;
    if (sym_valid !== pair_done) begin
      failures++;
      $display("sym_valid=%b expected %b", sym_valid, pair_done);
    end
    if (sym_valid) begin
      bit b1, b0;
      b1 = sent[2 * nsym]; b0 = sent[2 * nsym + 1];
      if (sym_re != W'(b1 ? -AMP : AMP) || sym_im != W'(b0 ? -AMP : AMP) || sym_bits != {b1, b0}) begin
        failures++;
        $display("symbol %0d: got (%0d,%0d) for bits %b%b", nsym, sym_re, sym_im, b1, b0);
      end
      nsym++;
    end
  end

  initial begin
    repeat (1000) @(posedge clk);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end
endmodule
