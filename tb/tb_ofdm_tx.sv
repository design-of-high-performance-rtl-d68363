// tb_ofdm_tx: transmitter test at N = 256. Random bits (with pauses of
// mess_ready) form PKTS OFDM symbols plus one more that pushes the last through
// the IFFT. Each transmitted sample n of symbol p must equal
// (1/N) * sum_k S_p(k) * exp(+j*2*pi*n*k/N), S_p(k) the QPSK point of the k-th
// bit pair, within TOL LSBs, in natural order, preceded by a cyclic prefix of
// its last CP = N/4 samples, with tx_sof on the first prefix sample.
module tb_ofdm_tx;
  import ofdm_pkg::*;
  localparam int N = FFT_N;
  localparam int W = 16;
  localparam int AMP = 1 << (W - 2);
  localparam int PKTS = 2;
  localparam int CP = N / 4;
  localparam int NX = N + CP;
  localparam real TOL = 6.0;
  localparam real PI = 3.14159265358979323846;

  function automatic real rabs(real v);
    return v < 0.0 ? -v : v;
  endfunction

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic mess_ready = 0, bit_in = 0, tx_valid, tx_sof;
  logic signed [W-1:0] tx_re, tx_im;

  ofdm_tx dut (.clk, .rst_n, .mess_ready, .bit_in, .tx_valid, .tx_re, .tx_im, .tx_sof);

  logic [1:0] sym [PKTS+1][N];
  real er [PKTS][N], ei [PKTS][N];
  int checks = 0, failures = 0, nout = 0, pauses = 0;

  initial begin
    for (int p = 0; p <= PKTS; p++)
      for (int k = 0; k < N; k++) sym[p][k] = 2'($urandom_range(3));
    for (int p = 0; p < PKTS; p++)
      for (int n = 0; n < N; n++) begin
        real sr, si, a, xr, xi;
        sr = 0; si = 0;
        for (int k = 0; k < N; k++) begin
          xr = sym[p][k][1] ? -AMP : AMP;
          xi = sym[p][k][0] ? -AMP : AMP;
          a = 2.0 * PI * real'((n * k) % N) / N;
          sr += xr * $cos(a) - xi * $sin(a);
          si += xr * $sin(a) + xi * $cos(a);
        end
        er[p][n] = sr / N; ei[p][n] = si / N;
      end
    repeat (2) @(posedge clk);
    rst_n <= 1;
    @(posedge clk);
    for (int p = 0; p <= PKTS; p++)
      for (int k = 0; k < N; k++)
        for (int b = 1; b >= 0; b--) begin
          while ($urandom_range(7) == 0) begin
            mess_ready <= 0; pauses++;
            @(posedge clk);
          end
          mess_ready <= 1; bit_in <= sym[p][k][b];
          @(posedge clk);
        end
    mess_ready <= 0;
    repeat (N + 100) @(posedge clk);
    checks++;
    if (nout != PKTS * NX) begin failures++; $display("%0d samples, expected %0d", nout, PKTS * NX); end
    checks++;
    if (pauses == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(posedge clk) begin
    if (rst_n && tx_valid) begin
      int p, n;
      // position j of an extended symbol carries time sample N-CP+j (prefix)
      // for j < CP, then sample j-CP
      p = nout / NX; n = nout % NX;
      n = (n < CP) ? N - CP + n : n - CP;
      checks++;
      if (p >= PKTS || rabs(real'(tx_re) - er[p][n]) > TOL || rabs(real'(tx_im) - ei[p][n]) > TOL
          || tx_sof != (nout % NX == 0)) begin
        failures++;
        if (failures < 8)
          $display("symbol %0d sample %0d: got (%0d,%0d) expected (%f,%f)", p, n, tx_re, tx_im,
                   er[p % PKTS][n], ei[p % PKTS][n]);
      end
      nout++;
    end
  end

  initial begin
    repeat (2 * N * (PKTS + 1) * 2 + 2000) @(posedge clk);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end
endmodule
