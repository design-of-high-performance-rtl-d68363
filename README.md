# Radix-2² pipelined FFT/IFFT and a QPSK OFDM link

An OFDM link puts one QPSK symbol on each of N subcarriers. The transmitter
turns the N symbols into N time samples with an inverse FFT. The receiver gets
the symbols back with a forward FFT. This RTL builds that link around one
transform engine: a **256-point Radix-2² single-path delay-feedback (R2²SDF)
pipeline**. It takes one complex sample per clock and gives out one per clock.
The same engine does the FFT and the IFFT.

The architecture follows the paper "Design of High Performance FFT Algorithm in
OFDM Communication System". That paper describes a modified Radix-2² pipelined
FFT/IFFT of 256 points, a six-cycle pipelined twiddle multiplier, a QPSK
modulator, and a transmit/receive demonstration with a message-ready input, a
receive-data strobe and a packet counter. Word widths, scaling, handshakes and
the QPSK mapping are not given there. They are choices made here, and each file
header says which parts follow the paper and which are choices.

```
 bits ─► qpsk_mapper ─► r22_fft (inverse) ─► bitrev_buffer ──► channel ──► cp_remove ─► r22_fft (forward) ─► qpsk_demapper ─► bits, pcnt
        (2 bits/sym)                         (natural order +              (drop CP)                         (sign decisions)
                                              cyclic prefix)
 └────────────────────────── ofdm_tx ──────────────────────────┘          └──────────────────────── ofdm_rx ───────────────────────┘
                                             ofdm_system (top, ideal channel)
```

## The R2²SDF pipeline (`r22_fft`)

### Decomposition

Radix-2² writes each time index as n = (N/2)·n1 + (N/4)·n2 + n3. It writes each
frequency index as k = k1 + 2·k2 + 4·k3. The DFT then becomes four DFTs of
length N/4. Their inputs come from two radix-2 butterflies and one twiddle
multiplication:

* **BF-I** combines x(n3) with x(n3 + N/2), which gives the sum (k1 = 0) and
  the difference (k1 = 1).
* **BF-II** combines the BF-I results N/4 apart. Before that, it multiplies the
  second operand by (−j)^k1. Multiplying by −j only swaps the real and imaginary
  parts and changes a sign, so no multiplier is needed.
* **TFM**, the twiddle-factor multiplier, multiplies by W_N^(n3·(k1+2k2)), with
  W_N = exp(−j2π/N).

Repeating this log₄N times gives the pipeline. For N = 256 that is four stages
of span L = 256, 64, 16 and 4:

| stage | BF-I delay | BF-II delay | twiddle multiplier |
|------:|-----------:|------------:|--------------------|
| 0     | 128        | 64          | TFM, L = 256       |
| 1     | 32         | 16          | TFM, L = 64        |
| 2     | 8          | 4           | TFM, L = 16        |
| 3     | 2          | 1           | none (all twiddles are 1) |

If N is a power of 2 but not of 4 (for example 32), the pipeline ends in one
extra BF-I with a one-word delay. The parameter `N` accepts any power of 2 of at
least 4. N = 256, 32 and 16 are simulated.

### How a delay-feedback butterfly works (`bf1`, `bf2`, `sdf_delay`)

A BF-I of delay D handles blocks of 2·D samples, in two halves:

1. **First half.** Each incoming sample goes into the D-word feedback buffer.
   At the same time, the word leaving the buffer is sent downstream. That word
   is a difference the butterfly stored during the previous block.
2. **Second half.** The buffer's output a and the incoming sample b meet. The
   butterfly sends out (a+b)/2 and writes (a−b)/2 back into the buffer.

So the butterfly's output stream is its input stream delayed by D samples. Each
block comes out as D sums, then D differences.

BF-II does the same on 2·D windows. It also applies −j to the incoming sample in
the last quarter of each 4·D block. It does this by routing: real and imaginary
parts are swapped, and the adder and subtractor exchange roles. So:

* the sum is (a_re + b_im) + j(a_im − b_re)
* the difference is (a_re − b_im) + j(a_im + b_re)

The feedback buffer (`sdf_delay`) is a circular buffer. In one cycle it reads
the word under its pointer and writes the new word in the same place. This
gives exactly D samples of delay with one memory.

### Twiddles and their order (`tfm`, `twiddle_rom`)

BF-II sends out each L-sample block in four segments:

| segment | (k1, k2) | twiddle exponent |
|--------:|:--------:|:----------------:|
| 0       | (0,0)    | 0                |
| 1       | (0,1)    | 2·n3             |
| 2       | (1,0)    | n3               |
| 3       | (1,1)    | 3·n3             |

n3 is the position within the segment. The TFM takes the segment from the top
two bits of its counter and n3 from the rest. It reads W_L^e from its stage's
table.

Each table holds all L entries cos(2πe/L) − j·sin(2πe/L). The values are
computed during elaboration, so there are no data files. A 16-bit twiddle
represents 1.0 as 2¹⁴.

The multiplier has six pipeline stages and uses four real multipliers, one
subtractor and one adder:

| cycle | work                                       |
|------:|--------------------------------------------|
| 1     | register the operand and the twiddle       |
| 2     | compute the four products                  |
| 3     | real = xr·a − xi·b, imag = xi·a + xr·b     |
| 4     | add the rounding offset                    |
| 5     | shift back and saturate to 16 bits         |
| 6     | output register                            |

The paper prints the real part with a plus sign. That cannot be right with one
adder and one subtractor, so the correct complex product is used.

### Control

The paper drives the whole pipeline from a single log₂N-bit counter. Here every
butterfly and every TFM has its own copy of that counter (`sample_counter`).
Each copy counts only the valid samples that reach its element. Because of
this:

* the input may pause at any time (`in_valid` low), and
* the output registers and the six-cycle multipliers do not shift the control
  out of step with the data.

A butterfly keeps `out_valid` low until its buffer holds real data. Because of
this, downstream counters start exactly at the first real sample.

### Numbers, order and latency

* **Scaling.** Every butterfly halves its results, rounding to nearest. The
  forward transform therefore computes X(k) = (1/N)·Σ x(n)·W_N^(nk) without
  growing the word width. Only the twiddle multiplier can saturate, and only
  for inputs near full scale in both parts.
* **Inverse transform.** When `inverse` is high, the real and imaginary parts
  are swapped at the input and again at the output. This gives
  (1/N)·Σ X(k)·exp(+j2πnk/N). The mode bit travels with each sample, through
  the feedback buffers too, so it can change between frames.
* **Output order.** Results leave in bit-reversed order. `out_index` gives the
  bin of each result, and `out_sof` marks bin 0.
* **Latency.** The feedback buffers hold N−1 = 255 samples. Result u of a
  frame leaves once input sample u + N − 1 (counted from the frame's start) has
  been accepted. After that come 26 register cycles: 8 butterfly registers and
  3 × 6 multiplier stages. So a frame only leaves while the next frame enters.
  To get the last frame out, push zeros.

## The OFDM link

### Transmitter (`ofdm_tx`)

* **QPSK mapper.** `qpsk_mapper` collects the serial bits (`mess_ready`,
  `bit_in`) into pairs. The first bit of a pair gives the sign of I and the
  second gives the sign of Q. 0 maps to +AMP and 1 to −AMP, with AMP = 2¹⁴.
  This is a Gray mapping.
* **IFFT.** Symbol k of a packet goes on subcarrier k. A packet is N symbols,
  that is 512 bits for N = 256.
* **Reorder and prefix.** `bitrev_buffer` has two banks. Each IFFT frame is
  written at bit-reversed addresses. The frame is read out as its last CP
  samples (the cyclic prefix), then samples 0 to N−1, at one per cycle.
  `tx_sof` marks the first prefix sample.
* **Rate limit.** The buffer keeps up as long as at most N samples arrive in
  any N + CP cycles. The QPSK front end meets this, since it delivers at most
  one symbol every two cycles. An assertion reports an overflow.

### Receiver (`ofdm_rx`)

* **Prefix removal.** `cp_remove` counts samples modulo N + CP and drops the
  first CP of each symbol. Symbol alignment comes from counting from reset;
  there is no synchronisation logic.
* **FFT.** The forward transform gives each subcarrier as ±AMP/N ± j·AMP/N,
  that is ±64 for the defaults. This is far above the rounding noise.
* **Detection.** `qpsk_demapper` reads the two bits from the signs.
  Decisions stay in bit-reversed order: `rx_index` names the subcarrier and
  `rx_data` strobes each pair.
* **Packet counter.** `pcnt` counts completed packets (OFDM symbols).

### System (`ofdm_system`)

The top connects the transmitter to the receiver directly, as an ideal
channel, and also brings the transmitted samples out. The transmit IFFT and the
receive FFT each hold back one OFDM symbol. So packet p is counted while the
bits of packet p + 2 are being sent. While `mess_ready` is low, nothing moves
at the input and no new data enters the link.

## Parameters

| parameter | default | where | meaning |
|-----------|--------:|-------|---------|
| `N`  | 256 | all | transform size, a power of 2 (the paper's size) |
| `W`  | 16  | all | bits per real/imaginary part (chosen) |
| `TW` | 16  | FFT | twiddle bits, 1.0 = 2^(TW−2) (chosen) |
| `CP` | N/4 = 64 | tx, rx, system | cyclic-prefix length; 0 disables it (chosen) |
| `AMP`| 2^(W−2) | tx | QPSK amplitude (chosen) |
| `PW` | 16  | rx, system | packet-counter width (chosen) |

## Differences from the paper, and limits

* **BF-I operation.** The paper's BF-I text describes adding the real parts
  and the imaginary parts in separate multiplexer phases. Here BF-I is the
  usual R2SDF butterfly, which the paper also calls it, and it handles both
  parts in one cycle.
* **Counters.** The single pipeline counter is replicated per element, as
  described under Control.
* **Multipliers.** The paper reports 9 hardware multipliers for its FPGA
  build. This RTL uses 12: three TFMs with four real multipliers each, as the
  paper's own multiplier description implies.
* **Reported results not checked here.** The paper's clock rate (209 MHz) and
  resource counts come from an FPGA tool flow that was not repeated.
* **Added blocks.** The bit-reversal reorder buffer and the prefix length are
  additions. The paper does not mention output order, and it mentions the
  cyclic prefix but not its length.
* **Not modelled.** There is no channel impairment and no synchronisation.
  MIMO, mentioned as future work, is not built.
* **Sizes for standards.** For 802.11a (64 subcarriers), set `N = 64`. For the
  larger WiMAX OFDMA sizes, raise `N`.

## Files and simulation

Files in `rtl/`, one module or package per file:

| file | contents |
|------|----------|
| `ofdm_pkg` | shared constants, the QPSK bit type, `bitrev` |
| `sample_counter`, `sdf_delay`, `bf1`, `bf2`, `twiddle_rom`, `tfm`, `r22_fft` | the transform |
| `qpsk_mapper`, `bitrev_buffer`, `ofdm_tx` | the transmitter |
| `cp_remove`, `qpsk_demapper`, `ofdm_rx` | the receiver |
| `ofdm_system` | the top |

Every module in `rtl/` has a self-checking testbench in `tb/` called
`tb_<module>`. Each testbench prints `TB_RESULT checks=… failures=…`.

* **Processor test.** `tb_r22_fft` checks N = 256, 32 and 16 against a
  floating-point DFT, in both directions, with random input pauses. It uses
  `tb/fft_checker.sv`.
* **Link test.** `tb_ofdm_system` runs the full-size link at the default
  parameters. It checks every received bit, the packet count and every cyclic
  prefix, and it reports how often `mess_ready` paused.

To run a test with Verilator 5:

```
verilator --binary --timing --assert -Irtl -Itb rtl/ofdm_pkg.sv tb/tb_ofdm_system.sv \
          --top-module tb_ofdm_system -Mdir obj && obj/Vtb_ofdm_system
```

Replace `tb_ofdm_system` with any other testbench name. All of them finish in
seconds.
