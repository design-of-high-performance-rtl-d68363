// tb_ofdm_system: end-to-end test of the QPSK OFDM link at its default size
// (N = 256 subcarriers, 16-bit samples).
// Random message bits are sent for PKTS packets plus two further packets that
// push the last ones through the two transform pipelines. mess_ready drops at
// random, also in the middle of a packet. Every recovered bit pair is compared
// with the bits sent on that subcarrier of that packet, the packet counter must
// end at PKTS, and each transmitted OFDM symbol must leave with its first
// sample flagged and with a cyclic prefix equal to its last N/4 samples. The test also counts how often each mechanism occurred:
// pauses of mess_ready, reorder-bank swaps on the transmit side (frames sent),
// packets counted by the receiver.
module tb_ofdm_system;
  import ofdm_pkg::*;

  localparam int N    = FFT_N;
  localparam int PKTS = 3;
  localparam int TOT  = PKTS + 2;
  localparam int NX   = N + N / 4;     // samples per OFDM symbol with prefix

  logic clk = 0;
  logic rst_n = 0;
  always #5 clk = ~clk;

  logic                 mess_ready, bit_in;
  logic                 tx_valid, tx_sof, rx_data;
  logic signed [15:0]   tx_re, tx_im;
  qpsk_bits_t           rx_bits;
  logic [$clog2(N)-1:0] rx_index;
  logic [15:0]          pcnt;

  ofdm_system dut (
    .clk, .rst_n, .mess_ready, .bit_in, .tx_valid, .tx_re, .tx_im, .tx_sof,
    .rx_data, .rx_bits, .rx_index, .pcnt
  );

  qpsk_bits_t sent [TOT][N];
  int checks = 0, failures = 0;
  int pauses = 0, tx_frames = 0, tx_samples = 0, rx_pkts = 0, rx_cnt = 0, prefixes = 0;
  logic [31:0] sym_buf [NX];           // current transmitted symbol, prefix included
  logic [15:0] last_pcnt;
  logic sending_done = 0;

  initial begin
    for (int p = 0; p < TOT; p++)
      for (int k = 0; k < N; k++) sent[p][k] = qpsk_bits_t'($urandom_range(3));
    mess_ready = 0; bit_in = 0;
    repeat (3) @(posedge clk);
    rst_n <= 1;
    @(posedge clk);
    for (int p = 0; p < TOT; p++)
      for (int k = 0; k < N; k++)
        for (int b = 1; b >= 0; b--) begin
          while ($urandom_range(9) == 0) begin
            mess_ready <= 0;
            bit_in     <= 1'($urandom_range(1));
            pauses++;
            @(posedge clk);
          end
          mess_ready <= 1;
          bit_in     <= sent[p][k][b];
          @(posedge clk);
        end
    mess_ready <= 0;
    repeat (1000) @(posedge clk);
    sending_done = 1;
  end

  // Monitor: transmitted frames and received decisions.
  initial begin
    last_pcnt = 0;
    forever begin
      @(posedge clk);
      if (rst_n) begin
        if (tx_valid) begin
          checks++;
          if (tx_sof != (tx_samples % NX == 0)) begin
            failures++;
            $display("tx_sof wrong at sample %0d", tx_samples);
          end
          if (tx_sof) tx_frames++;
          sym_buf[tx_samples % NX] = {tx_re, tx_im};
          // at the end of a symbol its prefix must repeat its last N/4 samples
          if (tx_samples % NX == NX - 1) begin
            checks++;
            prefixes++;
            for (int j = 0; j < NX - N; j++)
              if (sym_buf[j] != sym_buf[N + j]) begin
                failures++;
                $display("symbol %0d: prefix word %0d differs", tx_samples / NX, j);
                break;
              end
          end
          tx_samples++;
        end
        if (rx_data) begin
          automatic int p = rx_cnt / N;
          checks++;
          if (p >= TOT || rx_bits != sent[p][rx_index]) begin
            failures++;
            if (failures < 10)
              $display("packet %0d subcarrier %0d: got %b", p, rx_index, rx_bits);
          end
          rx_cnt++;
        end
        if (pcnt != last_pcnt) begin
          rx_pkts++;
          checks++;
          if (pcnt != last_pcnt + 1 || rx_cnt != int'(pcnt) * N + (rx_data ? 1 : 0)) begin
            failures++;
            $display("pcnt %0d after %0d decisions", pcnt, rx_cnt);
          end
          last_pcnt = pcnt;
        end
      end
    end
  end

  initial begin
    wait (sending_done);
    checks++;
    if (pcnt != 16'(PKTS)) begin failures++; $display("pcnt=%0d, expected %0d", pcnt, PKTS); end
    checks++;
    // The pipeline delay is N-1 samples, so the last received frame's first
    // subcarrier leaves with the frame's last sample: PKTS*N + 1 decisions.
    if (rx_cnt != PKTS * N + 1) begin failures++; $display("%0d decisions, expected %0d", rx_cnt, PKTS * N + 1); end
    checks++;
    if (pauses == 0) begin failures++; $display("mess_ready never paused"); end
    checks++;
    if (tx_frames < PKTS + 1) begin failures++; $display("only %0d frames sent", tx_frames); end
    checks++;
    if (prefixes == 0) begin failures++; $display("no cyclic prefix sent"); end
    checks++;
    if (rx_pkts != PKTS) begin failures++; $display("pcnt advanced %0d times", rx_pkts); end
    $display("mechanisms: mess_ready pauses=%0d tx frames (reorder bank swaps)=%0d cyclic prefixes=%0d rx packets=%0d",
             pauses, tx_frames, prefixes, rx_pkts);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2 * N * TOT * 2 + 5000) @(posedge clk);
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end
endmodule
