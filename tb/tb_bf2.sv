// tb_bf2: self-checking test of butterfly type II with a D = 4 feedback delay.
// A software model pairs sample n with sample n+D of every 2*D-sample window (the second element multiplied by -j in odd windows, i.e. the last quarter of each 4*D block),
// forms the halved, rounded sum and difference, and predicts the output order:
// the window's D sums, then its D differences. Random input pauses are applied.
// Every result must appear exactly one cycle after the input sample that
// completes it, and the inverse flag must come out with its own sample.
module tb_bf2;
  localparam int W = 16;
  localparam int D = 4;
  localparam int WINS = 12;
  localparam int NS = WINS * 2 * D;
  localparam bit ROT = 1;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic in_valid = 0, in_inv = 0, out_valid, out_inv;
  logic signed [W-1:0] in_re = 0, in_im = 0, out_re, out_im;

  bf2 #(.W(W), .D(D)) dut (.clk, .rst_n, .in_valid, .in_re, .in_im, .in_inv,
                              .out_valid, .out_re, .out_im, .out_inv);

  int xr [NS], xi [NS];
  bit xv [NS];
  int er [NS], ei [NS], esrc [NS];
  bit ev [NS];
  int ne = 0, cyc = 0;
  int acc_cyc [NS];
  int checks = 0, failures = 0, nout = 0, pauses = 0, rots = 0;

  function automatic int half(int s);
    return (s + 1) >>> 1;
  endfunction

  initial begin
    for (int i = 0; i < NS; i++) begin
      xr[i] = int'($urandom_range(65535)) - 32768;
      xi[i] = int'($urandom_range(65535)) - 32768;
      xv[i] = 1'(i / (4 * D) % 2);
    end
    // reference model
    for (int w = 0; w < WINS; w++) begin
      for (int j = 0; j < D; j++) begin
        int a, b, ar, ai, br, bi;
        a = w * 2 * D + j; b = a + D;
        ar = xr[a]; ai = xi[a]; br = xr[b]; bi = xi[b];
        if (ROT && (w % 2 == 1)) begin
          int t;
          t = br; br = bi; bi = -t;      // multiply by -j
        end
        er[ne] = half(ar + br); ei[ne] = half(ai + bi); ev[ne] = xv[a];
        esrc[ne] = b; ne++;
        er[ne + D - 1] = half(ar - br); ei[ne + D - 1] = half(ai - bi); ev[ne + D - 1] = xv[a];
        esrc[ne + D - 1] = (w + 1) * 2 * D + j;
      end
      ne += D;
    end
    repeat (2) @(posedge clk);
    rst_n <= 1;
    @(posedge clk);
    for (int i = 0; i < NS; i++) begin
      while ($urandom_range(4) == 0) begin
        in_valid <= 0;
        pauses++;
        @(posedge clk);
      end
      in_valid <= 1;
      in_re <= W'(xr[i]); in_im <= W'(xi[i]); in_inv <= xv[i];
      acc_cyc[i] = cyc;
      if (ROT && (i / (2 * D)) % 2 == 1 && (i % (2 * D)) >= D) rots++;
      @(posedge clk);
    end
    in_valid <= 0;
    repeat (10) @(posedge clk);
    checks++;
    // all windows but the last give 2*D results, the last only its sums
    if (nout != NS - D) begin failures++; $display("%0d results, expected %0d", nout, NS - D); end
    checks++;
    if (pauses == 0 || (ROT && rots == 0)) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // The driver records the cycle before the edge that accepts a sample and the
  // monitor sees a result one edge after it is registered, hence cyc - 2.
  always @(posedge clk) begin
    cyc <= cyc + 1;
    if (rst_n && out_valid) begin
      checks++;
      if (nout >= NS - D || out_re != W'(er[nout]) || out_im != W'(ei[nout]) || out_inv != ev[nout]
          || acc_cyc[esrc[nout]] != cyc - 2) begin
        failures++;
        if (failures < 8)
          $display("result %0d: got (%0d,%0d,%b) at cycle %0d, expected (%0d,%0d,%b) at %0d", nout,
                   out_re, out_im, out_inv, cyc, er[nout], ei[nout], ev[nout], acc_cyc[esrc[nout]] + 2);
      end
      nout++;
    end
  end

  initial begin
    repeat (NS * 3 + 100) @(posedge clk);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end
endmodule
