// tb_bitrev_buffer: reorder and cyclic-prefix buffer at N = 16, CP = 4.
// Frames of random words enter in bit-reversed order (word u of a frame is
// time sample bitrev(u)), at most one every other cycle plus random pauses.
// Each frame must leave as its last CP samples followed by samples 0..N-1 in
// natural order, back to back, with out_sof on the first prefix word.
module tb_bitrev_buffer;
  import ofdm_pkg::*;
  localparam int N = 16;
  localparam int CP = 4;
  localparam int W = 16;
  localparam int FR = 6;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic in_valid = 0, out_valid, out_sof;
  logic signed [W-1:0] in_re = 0, in_im = 0, out_re, out_im;

  bitrev_buffer #(.N(N), .W(W), .CP(CP)) dut (.clk, .rst_n, .in_valid, .in_re, .in_im,
                                              .out_valid, .out_re, .out_im, .out_sof);

  logic [W-1:0] tr [FR][N], ti [FR][N];     // time sample t of frame f
  int checks = 0, failures = 0, nout = 0, gaps = 0;

  initial begin
    for (int f = 0; f < FR; f++)
      for (int t = 0; t < N; t++) begin
        tr[f][t] = W'($urandom); ti[f][t] = W'($urandom);
      end
    repeat (2) @(posedge clk);
    rst_n <= 1;
    @(posedge clk);
    for (int f = 0; f < FR; f++)
      for (int u = 0; u < N; u++) begin
        automatic int t = int'(bitrev(32'(u), 4));
        in_valid <= 0;
        @(posedge clk);
        while ($urandom_range(3) == 0) begin
          gaps++;
          @(posedge clk);
        end
        in_valid <= 1; in_re <= tr[f][t]; in_im <= ti[f][t];
        @(posedge clk);
      end
    in_valid <= 0;
    repeat (3 * (N + CP)) @(posedge clk);
    checks++;
    if (nout != FR * (N + CP)) begin failures++; $display("%0d words out", nout); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(posedge clk) begin
    if (rst_n && out_valid) begin
      int f, j, t;
      f = nout / (N + CP); j = nout % (N + CP);
      t = (j < CP) ? N - CP + j : j - CP;
      checks++;
      if (f >= FR || out_re != tr[f][t] || out_im != ti[f][t] || out_sof != (j == 0)) begin
        failures++;
        if (failures < 8) $display("frame %0d word %0d: got %h %h sof=%b", f, j, out_re, out_im, out_sof);
      end
      nout++;
    end
  end

  initial begin
    repeat (FR * N * 8 + 500) @(posedge clk);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end
endmodule
