// tb_ofdm_rx: receiver test at N = 256. The testbench builds PKTS+1 OFDM
// symbols itself: random QPSK points S(k) = +-AMP +- j*AMP, time samples
// x(n) = (1/N) * sum_k S(k) * exp(+j*2*pi*n*k/N) rounded to integers, sent with
// random pauses, each symbol preceded by a cyclic prefix of its last CP = N/4
// samples. Every decision must give the bits of S(rx_index) for the
// current packet, and pcnt must count PKTS packets.
module tb_ofdm_rx;
  import ofdm_pkg::*;
  localparam int N = FFT_N;
  localparam int W = 16;
  localparam int AMP = 1 << (W - 2);
  localparam int PKTS = 2;
  localparam int CP = N / 4;
  localparam real PI = 3.14159265358979323846;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic rx_in_valid = 0, rx_data;
  logic signed [W-1:0] rx_in_re = 0, rx_in_im = 0;
  qpsk_bits_t rx_bits;
  logic [7:0] rx_index;
  logic [15:0] pcnt;

  ofdm_rx dut (.clk, .rst_n, .rx_in_valid, .rx_in_re, .rx_in_im, .rx_data, .rx_bits, .rx_index, .pcnt);

  logic [1:0] sym [PKTS+1][N];
  int xr [PKTS+1][N], xi [PKTS+1][N];
  int checks = 0, failures = 0, nout = 0, pauses = 0, pkt_steps = 0;
  logic [15:0] last_pcnt = 0;

  initial begin
    for (int p = 0; p <= PKTS; p++) begin
      for (int k = 0; k < N; k++) sym[p][k] = 2'($urandom_range(3));
      for (int n = 0; n < N; n++) begin
        real sr, si, a, s_r, s_i;
        sr = 0; si = 0;
        for (int k = 0; k < N; k++) begin
          s_r = sym[p][k][1] ? -AMP : AMP;
          s_i = sym[p][k][0] ? -AMP : AMP;
          a = 2.0 * PI * real'((n * k) % N) / N;
          sr += s_r * $cos(a) - s_i * $sin(a);
          si += s_r * $sin(a) + s_i * $cos(a);
        end
        xr[p][n] = $rtoi(sr / N + (sr >= 0 ? 0.5 : -0.5));
        xi[p][n] = $rtoi(si / N + (si >= 0 ? 0.5 : -0.5));
      end
    end
    repeat (2) @(posedge clk);
    rst_n <= 1;
    @(posedge clk);
    for (int p = 0; p <= PKTS; p++)
      for (int j = 0; j < N + CP; j++) begin
        // cyclic prefix first: samples N-CP..N-1, then 0..N-1
        automatic int n = (j < CP) ? N - CP + j : j - CP;
        while ($urandom_range(5) == 0) begin
          rx_in_valid <= 0; pauses++;
          @(posedge clk);
        end
        rx_in_valid <= 1; rx_in_re <= W'(xr[p][n]); rx_in_im <= W'(xi[p][n]);
        @(posedge clk);
      end
    rx_in_valid <= 0;
    repeat (100) @(posedge clk);
    checks++;
    // the last packet's first decision leaves with its last sample
    if (nout != PKTS * N + 1) begin failures++; $display("%0d decisions", nout); end
    checks++;
    if (pcnt != 16'(PKTS) || pkt_steps != PKTS) begin failures++; $display("pcnt=%0d", pcnt); end
    checks++;
    if (pauses == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(posedge clk) begin
    if (rst_n && rx_data) begin
      int p;
      p = nout / N;
      checks++;
      if (rx_bits != sym[p][rx_index] || rx_index != 8'(bitrev(32'(nout % N), 8))) begin
        failures++;
        if (failures < 8) $display("packet %0d subcarrier %0d: got %b expected %b", p, rx_index, rx_bits, sym[p][rx_index]);
      end
      nout++;
    end
    if (rst_n && pcnt != last_pcnt) begin
      pkt_steps++;
      last_pcnt <= pcnt;
    end
  end

  initial begin
    repeat (N * (PKTS + 1) * 3 + 2000) @(posedge clk);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end
endmodule
