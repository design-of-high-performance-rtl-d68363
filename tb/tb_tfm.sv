// tb_tfm: self-checking test of the twiddle-factor multiplier for a stage of
// span L = 16. Random samples enter with random pauses; sample u of each
// 16-sample block must leave multiplied by exp(-j*2*pi*e/16) with
// e = (u mod 4) * {0,2,1,3}[u / 4], within one LSB, exactly six cycles after it
// entered, and with its inverse flag.
module tb_tfm;
  localparam int W = 16;
  localparam int L = 16;
  localparam int NS = 8 * L;
  localparam int LAT = 6;
  localparam real PI = 3.14159265358979323846;

  function automatic real rabs(real v);
    return v < 0.0 ? -v : v;
  endfunction

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic in_valid = 0, in_inv = 0, out_valid, out_inv;
  logic signed [W-1:0] in_re = 0, in_im = 0, out_re, out_im;

  tfm #(.W(W), .TW(16), .L(L)) dut (.clk, .rst_n, .in_valid, .in_re, .in_im, .in_inv,
                                    .out_valid, .out_re, .out_im, .out_inv);

  int xr [NS], xi [NS], tin [NS];
  real er [NS], ei [NS];
  int cyc = 0, nout = 0, checks = 0, failures = 0;
  int map [4] = '{0, 2, 1, 3};

  initial begin
    for (int i = 0; i < NS; i++) begin
      int u, e;
      real c, s;
      // moderate amplitudes so that no product saturates
      xr[i] = int'($urandom_range(40000)) - 20000;
      xi[i] = int'($urandom_range(40000)) - 20000;
      u = i % L;
      e = (u % 4) * map[u / 4];
      c = $cos(2.0 * PI * e / L); s = -$sin(2.0 * PI * e / L);
      er[i] = xr[i] * c - xi[i] * s;
      ei[i] = xi[i] * c + xr[i] * s;
    end
    repeat (2) @(posedge clk);
    rst_n <= 1;
    @(posedge clk);
    for (int i = 0; i < NS; i++) begin
      while ($urandom_range(3) == 0) begin
        in_valid <= 0;
        @(posedge clk);
      end
      in_valid <= 1; in_re <= W'(xr[i]); in_im <= W'(xi[i]); in_inv <= 1'(i % 3 == 0);
      tin[i] = cyc;
      @(posedge clk);
    end
    in_valid <= 0;
    repeat (12) @(posedge clk);
    checks++;
    if (nout != NS) begin failures++; $display("%0d outputs", nout); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // cyc - 1 - LAT: see the one-edge offset between driver and monitor.
  always @(posedge clk) begin
    cyc <= cyc + 1;
    if (rst_n && out_valid) begin
      checks++;
      if (nout >= NS || rabs(real'(out_re) - er[nout]) > 1.0 || rabs(real'(out_im) - ei[nout]) > 1.0
          || out_inv != (nout % 3 == 0) || tin[nout] != cyc - 1 - LAT) begin
        failures++;
        if (failures < 8)
          $display("out %0d: got (%0d,%0d) at %0d expected (%f,%f) at %0d", nout, out_re, out_im, cyc,
                   er[nout], ei[nout], tin[nout] + 1 + LAT);
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
