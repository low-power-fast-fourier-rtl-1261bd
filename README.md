# MC-CDMA receiver for a sensor-network cluster head

In a wireless sensor network the nodes of a cluster usually take turns on the
channel. A TDMA schedule hands out the turns. The schedule costs energy to keep
in step, and it makes a node with fresh data wait. Multi-carrier CDMA removes
the schedule. Every node spreads its bit over all subcarriers of an OFDM symbol
with its own orthogonal code, and all nodes transmit at the same time on the
same band. The cluster head separates them again by correlating with each code.

This repository holds the digital back end of such a cluster-head receiver in
synthesizable SystemVerilog. It has two main blocks and a monitor:

```
 baseband I/Q  +-----------+  subcarriers  +-----------+  bits, decision  +---------+
 ------------->|  fft_sdf  |-------------->| combiner  |----------------->| snr_est |--> SNR
  (DR, DI)     | pipelined |  (DOR, DOI,   | estimate, |  values per      |         |
               | SDF FFT   |   index)      | combine,  |  user            +---------+
               +-----------+               | despread, |
                                           | decide    |--> bits[NU]
                                           +-----------+
```

`mccdma_rx` is the top level. At its defaults it is a 64-subcarrier receiver
with a radix-4 FFT, 16-bit I/Q and four users decoded per symbol. The
architecture comes from a 2019 PhD thesis on low-power MC-CDMA receivers for
sensor networks: a pipelined FFT of 16, 64 or 256 points with radix 4 or 8,
then a combiner that does channel estimation, despreading and demodulation,
plus an SNR module. That source describes these blocks only at the level of
what they do. The internal structure, word widths, signal format and SNR
method below are therefore this design's own. The section "What is fixed and
what is chosen" lists each choice.

## Signal format the receiver expects

The transmitter side is not part of the RTL. The receiver assumes this format:

* **Symbols.** A symbol is N time-domain samples. These are synchronised
  baseband samples with any guard interval already removed. The first sample
  after reset starts a frame.
* **Frame.** One pilot symbol is followed by `DSYM` data symbols (default 8),
  and the pattern repeats.
* **Pilot.** Subcarrier k carries ±P. The sign comes from the binary sequence
  a[n+7] = a[n] xor a[n+1], with a[0..6] = 1,0,0,0,0,0,0. A 0 means +P and a
  1 means −P. A pseudo-random pilot keeps the time-domain peak low, which an
  all-ones pilot would not (an all-ones pilot is an impulse in time).
* **Data.** User u sends one BPSK bit per data symbol: 0 is sent as +1 and 1
  as −1. The bit is multiplied by Walsh-Hadamard code `code[u]` on every
  subcarrier, where chip k is −1 when `code[u] & k` has odd parity. So the
  spreading factor equals N, and up to N users are orthogonal.
* **Amplitude.** Keep |I| and |Q| below 2^(DW−2). The FFT then cannot overflow
  (see below).

## Pipelined FFT (`fft_sdf`, `sdf_stage`)

The FFT is a chain of single-path delay-feedback (SDF) stages using
decimation in frequency. It takes one complex sample per clock and gives one
per clock.

**One stage** (`sdf_stage`, radix R, group length L) handles blocks of R·L
samples. It treats a block as R groups x_0 … x_(R−1) of L samples each. It
has R−1 delay buffers of L words, addressed by the position j inside the
group. A counter steps through R phases of L samples each:

| phase | what enters | what leaves | buffer p at address j |
|-------|-------------|-------------|-----------------------|
| 0 … R−2 | x_phase[j] | y_(phase+1)[j] of the previous block, read from buffer `phase` | buffer `phase` takes x_phase[j] |
| R−1 | x_(R−1)[j] | y_0[j], straight from the butterfly | buffers 0 … R−2 take y_1 … y_(R−1) |

In phase R−1 an R-point butterfly combines the R−1 buffered samples with the
current input:

  y_q[j] = (1/R) · Σ_p x_p[j] · W_R^(p·q)

Results y_1 … y_(R−1) go back into the buffers that just emptied. They leave
during the next block's first R−1 phases, while that block's samples take
their place. This is why the path is a "delay feedback": one buffer set holds
both kinds of data, and the stage never stalls. A single complex multiplier
on the output applies the twiddle W_(R·L)^(q·j). The output then consists of R
sub-sequences of length L, each of which still needs an L-point transform. The
next stage, with L/R, does that.

**The chain.** For N points and radix R there are ⌊log_R N⌋ stages of radix
R with L = N/R, N/R², …. If N is not a power of R, one last stage of the
leftover radix follows, with L = 1. That gives these configurations:

| N | radix 4 | radix 8 |
|---|---------|---------|
| 16 | 4·4 | 8·2 |
| 64 | 4·4·4 (default) | 8·8 |
| 256 | 4·4·4·4 | 8·8·4 |

**Constants.** Butterfly constants and twiddle factors are worked out during
elaboration from cos/sin, using 14 fraction bits. The values 0 and ±1 are
exact, so a radix-4 butterfly is exact apart from its final rounding. Each
stage stores its own constant table, R·L entries long.

**Scaling.** Each butterfly divides by its radix, with rounding. The output is
therefore X[k]/N. The real and imaginary parts of a butterfly output stay
within √2 times the input peak, so inputs below 2^(DW−2) cannot overflow.
Against a double-precision DFT, the error is a few LSB at 256 points.

**Output order and index.** Outputs leave in digit-reversed order: the first
stage's digit is the least significant digit of the frequency index. The FFT
does not reorder. Instead `out_bin` gives the subcarrier index k of each
output, and `out_sop` marks the first output of a symbol. The combiner uses k
as a memory address, so it never needs natural order.

**Timing and flow control.**

* The pipeline moves only on cycles with `in_valid` high. A gap in the input
  stalls every stage together.
* With no gaps, the first output of a symbol is valid N−1+S cycles after the
  cycle in which the symbol's first sample is presented. S is the number of
  stages. At the default this is 66 cycles.
* When a symbol's last sample enters, only its first output is on its way
  out. Its remaining outputs wait in the delay buffers. The last symbol of a
  burst therefore comes out only while N further samples are fed in: the next
  symbol, or padding.
* `out_valid` stays low until the first butterfly phase after reset. This
  keeps the start-up contents of the buffers from leaving the FFT.

## Combiner (`combiner`)

The combiner handles one subcarrier value per valid cycle. It counts
subcarriers and symbols itself. An assertion checks that its count agrees with
the FFT's `out_sop`.

* **Channel estimation (pilot symbol).** The estimate is H[k] = Y[k]·(±1),
  where ±1 is the known pilot sign. It is stored at address k of two N-word
  memories, one for I and one for Q. `est_valid` pulses when the last
  subcarrier of the pilot has been stored. Each pilot symbol replaces the
  whole estimate, so the receiver follows a channel that changes from frame
  to frame.
* **Combining.** On a data symbol each subcarrier gives
  z[k] = Re(Y[k]·conj(H[k])) = Y_re·H_re + Y_im·H_im. This is maximum-ratio
  combining. It removes the channel phase and weights each subcarrier by its
  gain, and it needs no divider.
* **Despreading.** Each of the `NU` accumulators adds +z[k] or −z[k]. The
  sign is chip k of its user's code, which is just the parity of
  `code[u] & k`, so no code memory is needed.
* **Decision.** After the last subcarrier, `out_acc[u]` holds the decision
  statistic and `out_bits[u]` is its sign bit. `out_valid` pulses one clock
  after the last subcarrier enters.

Maximum-ratio combining keeps the users orthogonal only on a flat channel.
When |H| varies across subcarriers, some interference between users remains.
For a two-path channel with an echo at 0.2 of the main path and four users,
this interference sets the decision SNR near 49 dB. A channel with deep fades
and many users would need equal-gain or MMSE combining, which this design does
not implement.

## SNR monitor (`snr_est`)

The monitor needs no reference data. For BPSK, the decision values a are ±A
plus noise. Over a window of M = NU·2^WLOG2 values (default 64: four users,
16 data symbols) it accumulates Σ|a| and Σa². From these it reports:

* `sig_pow = (Σ|a|/M)²`
* `noise_pow = Σa²/M − sig_pow`
* `snr_db`, which is about 10·log10(sig_pow/noise_pow), in 1/16 dB.

M is a power of two, so both divisions are shifts. The logarithm is
piecewise-linear: the position of the leading one plus the next four bits,
then multiplied by 771/256 ≈ 10·log10 2. Its error is below 0.3 dB. If
`noise_pow` is 0, `snr_db` reads 0x7FFF. A report appears two clocks after the
last decision of its window. The estimate includes any interference between
users, and it is biased low at very low SNR, where |a| no longer tracks A.

## Top level (`mccdma_rx`)

| parameter | default | meaning |
|-----------|---------|---------|
| `N` | 64 | FFT points = subcarriers = code length |
| `RADIX` | 4 | FFT radix (4 or 8) |
| `DW` | 16 | I/Q width |
| `NU` | 4 | users decoded per symbol (a power of two, for the SNR window) |
| `DSYM` | 8 | data symbols per pilot symbol |
| `WLOG2` | 4 | SNR window: 2^WLOG2 data symbols |

Ports:

* Inputs:
  * `clk`
  * `rst_n`: asynchronous reset, active low
  * `in_valid`, `in_re`, `in_im`: the sample stream
  * `code[NU]`: the Walsh code index of each user to decode
* Outputs:
  * `fft_*`: the FFT stream, for monitoring
  * `est_valid`
  * `bits_valid`, `bits[NU]`, `acc[NU]`: one set per data symbol
  * `snr_valid`, `sig_pow`, `noise_pow`, `snr_db`: one report per window

The widths are `AW = 2·DW+1+log2 N` for the statistics and `2·AW` for the
powers.

With no input gaps, a data symbol's bits are valid 2N−1+S cycles after the
cycle in which its first sample is presented (131 at the default). This is the
FFT latency, plus N−1 cycles for the rest of the symbol's subcarriers, plus
one register in the combiner.

## Verification

Each block has a self-checking testbench in `tb/`. Each one prints
`TB_RESULT checks=… failures=…` and has a cycle watchdog.

* **`tb_fft_sdf`** compares every output against a double-precision DFT
  scaled by 1/N. It covers all six size/radix configurations from the table
  above, plus the default again with random gaps in `in_valid` and 256-point
  radix 8 with gaps. It also checks that every subcarrier index appears once
  per symbol, that `out_sop` is placed correctly, and the latency.
* **`tb_combiner`** builds subcarrier values for three frames, each with its
  own random channel, four users and noise, and presents the subcarriers in
  scrambled order. The expected decision statistics are computed in 64-bit
  integers and must match exactly. The bits must equal the bits sent. It also
  checks the result timing and the `est_valid` count.
* **`tb_snr_est`** sends six windows of ±A plus noise, one of them noise-free.
  The powers must match exactly and `snr_db` must be within 0.4 dB. It also
  checks the report latency.
* **`tb_mccdma_rx`** runs the whole receiver end to end at its default
  parameters. A transmitter model spreads four users' random bits and applies
  a two-path channel with a new phase every frame. It converts the result to
  time domain with a floating-point inverse DFT and adds ±2 LSB of noise. It
  sends four frames (128 bits) with random input gaps. Every bit must be
  decoded correctly, the SNR must be at least 20 dB, and each mechanism must
  occur at least once: channel estimate updates, data symbols, SNR reports,
  input gaps, and decisions of 0 and of 1.
* **`tb_mccdma_rx_configs`** runs the same end-to-end test with the same
  checks on receivers built for the other five FFT configurations: 16 and 256
  points with radix 4, and 16, 64 and 256 points with radix 8. It uses
  `tb/rx_harness.sv` and scales the subcarrier amplitudes by 8/√N. All bits
  are decoded in every configuration. The reported SNR shows the interference
  between users that maximum-ratio combining leaves: about 25–32 dB with four
  users among 16 codes, about 49 dB at 64 points, and 65–70 dB at 256 points.

Each testbench runs in well under a second. To run one with Verilator 5:

```
verilator --binary --timing --assert -Irtl -Itb rtl/mccdma_pkg.sv \
    tb/tb_mccdma_rx.sv --top-module tb_mccdma_rx -Mdir obj_rx
./obj_rx/Vtb_mccdma_rx
```

Replace the name for the other testbenches. `tb_fft_sdf` also uses
`tb/fft_harness.sv`, and `tb_mccdma_rx_configs` also uses `tb/rx_harness.sv`.
Verilator finds both through `-Itb`. Verilator has only two states, so the
testbenches ignore outputs while reset is asserted.

## What is fixed and what is chosen

These points follow the source design:

* The receiver is an FFT followed by a combiner.
* The FFT is pipelined, with sizes of 16, 64 and 256 points and radix 4 or 8.
* The combiner does channel estimation, despreading and demodulation, and
  recovers each node's bits.
* An SNR module sits on the receiver.
* The goal is simultaneous reception from several nodes without scheduling.

These are this design's own choices, because the source does not specify
them:

* the SDF structure, decimation in frequency, and mixed radix for radix 8 at
  16 and 256 points;
* 16-bit I/Q, divide-by-radix scaling, and twiddles with 14 fraction bits;
* a digit-reversed output with an index, instead of a reorder buffer;
* Walsh-Hadamard codes, BPSK, and one pilot symbol per frame with a
  pseudo-random sign pattern;
* maximum-ratio combining;
* four users decoded in parallel, with selectable codes;
* the moment-based SNR estimator with its window and its dB format;
* 64 points with radix 4 as the default configuration.

Not included:

* the radio front end, ADC, timing and frequency synchronisation, and
  guard-interval removal;
* the transmitter;
* the display on the FPGA evaluation board;
* any low-power techniques at gate or layout level.

The source reports power and area for a 90 nm library and resource use on an
FPGA. These numbers describe its own implementation and were not reproduced.
