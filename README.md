# MC-CDMA baseband link: convolutional code, PN spreading, QPSK and 8-point OFDM

This is a synthesizable SystemVerilog model of a multi-carrier CDMA (MC-CDMA)
baseband transmitter and receiver. The link combines two ideas. The CDMA side
makes the stream hard to read: each bit goes through a convolutional encoder and
is then XORed with a pseudo-noise (PN) sequence. The OFDM side gives speed and
good use of the spectrum: the coded, scrambled bits become QPSK points on 8
orthogonal subcarriers. An 8-point inverse FFT turns these into a time-domain
symbol, and a cyclic prefix guards against inter-symbol interference. The
receiver undoes each step in reverse order and ends with a hard-decision Viterbi
decoder, which also corrects isolated bit errors picked up on the way.

```
 in_bit ─► conv_encoder ─► spreader ─► qpsk_framer ─► ifft8 ─► piso_cp ─► tx_sample
           (R=1/2, K=3)    (PN XOR)    (8 points)     (DIF)    (+prefix)      │
                                                                   low-pass filters and
                                                                   channel: not modelled,
                                                                   loop tx_* to rx_*
                                                                              │
 out_bit ◄─ viterbi_decoder ◄─ despreader ◄─ qpsk_deframer ◄─ fft8 ◄─ sipo_cp ◄─ rx_sample
            (BMU, ACSU, SMU)    (PN XOR)     (decision)       (DIT)   (−prefix)
```

The top module `mccdma_top` holds both chains side by side. The transmitter
drives the `tx_*` ports and the receiver reads the `rx_*` ports. The low-pass
filters and the channel are not modelled, so connecting `tx_*` straight to
`rx_*` gives a back-to-back link. The end-to-end testbench does exactly that,
and adds noise and forced symbol errors on the way.

## One OFDM symbol, end to end

- **8 data bits** enter the transmitter.
- The encoder turns them into **8 code pairs** (16 bits).
- The spreader XORs each pair with 2 PN chips, still **8 pairs**.
- The framer maps each pair to a QPSK point. Pair *i* goes on subcarrier *i*.
- The IFFT turns the 8 points into **8 complex time samples**.
- The PISO sends **CP_LEN + 8 = 10 samples**: the last 2 samples first (the
  cyclic prefix), then all 8 in order. It sends one sample per clock.

So the line carries 10 samples for every 8 data bits. The input side can take a
bit every clock, which is faster than that. The difference is absorbed by
back-pressure: once the framer holds a full frame and the IFFT pipeline cannot
move it into the busy PISO, the valid/ready chain lowers `in_ready`. A steady
source therefore settles at 8 bits per 10 clocks. When frames are waiting, the
PISO sends symbols with no gap between them.

On the receive side, the SIPO drops the 2 prefix samples and collects 8 samples.
The FFT then returns the 8 subcarrier values. The deframer decides each value to
a bit pair and sends the pairs one per clock. The despreader XORs them with the
same PN chips, and the Viterbi decoder releases each bit 15 trellis steps after
it entered.

The receive path has no back-pressure. It relies on symbols arriving at least 8
clocks apart, which holds for any prefix length. `rx_overrun` flags a violation.
Receive symbol timing comes from a start-of-symbol flag (`tx_first` →
`rx_first`) that travels with the samples.

## The convolutional code and its decoder

The encoder is a (2,1,3) code: one input bit, two output bits, constraint
length 3. Its state is the last two inputs, `{s1,s0}`, with `s1` the newer.

| u | state s1 s0 | next state | v1 v2 |
|---|---|---|---|
| 0 | 00 | 00 | 00 |
| 1 | 00 | 10 | 11 |
| 0 | 01 | 00 | 11 |
| 1 | 01 | 10 | 00 |
| 0 | 10 | 01 | 10 |
| 1 | 10 | 11 | 01 |
| 0 | 11 | 01 | 01 |
| 1 | 11 | 11 | 10 |

That is `v1 = u ⊕ s1 ⊕ s0` (taps 111) and `v2 = u ⊕ s0` (taps 101). The next
state is `{u, s1}`. This table is the reference for both the RTL and the
testbenches. Note that some descriptions of this code list the generator pair
the other way round, 101 for `v1` and 111 for `v2`. That variant produces a
different output and is **not** what is built here. To switch, change
`conv_code` in `mccdma_pkg` and `ENC_OUT` in `tb_ref_pkg`.

The decoder has three parts:

- **`viterbi_bmu`, the branch metric unit.** It computes the Hamming distance
  (0, 1 or 2) from the received pair to each of the four possible code pairs.
  It is combinational.
- **`viterbi_acsu`, add-compare-select with the path metric memory.**
  - Each next state `n` has two predecessors: `{n[0],0}` and `{n[0],1}`.
  - For each predecessor, the unit adds the branch metric of the connecting
    branch to that predecessor's stored metric.
  - It keeps the smaller sum. On a tie it keeps the predecessor with `s0 = 0`.
  - It records which predecessor won as the decision bit `dec[n]`.
  - It subtracts the minimum of the four new metrics before storing them. This
    keeps the metrics in 6 bits for ever.
  - It reports a state with metric 0 as `best_state`.
  - State 00 starts at metric 0 and the other states at 8, because the encoder
    starts in 00.
- **`viterbi_smu`, the survivor memory, in register-exchange form.**
  - Every state owns a 15-bit register that holds the input bits along its
    survivor path.
  - On each step, state `n` copies its winning predecessor's register, shifts
    it by one and appends its own input bit `n[1]`.
  - The decoded bit is the oldest bit in the best state's register.
  - Register exchange costs 4 × 15 flip-flops but needs no trace-back control.

Each decoded bit leaves 15 trellis steps after its pair arrived. It appears two
clocks after the pair of step *t* + 14 enters the decoder. The last 14 bits of
a message therefore stay in the decoder until more pairs push them out. To
flush them, follow a message with at least 14 zero bits, and pad the whole
stream to a multiple of 8 bits so that the last OFDM symbol is complete. The
end-to-end test uses 24 tail bits. The decoder's `clear` input restarts it in
state 00; the top ties `clear` low.

Survivor depth (`DEPTH`, 15 = five constraint lengths), metric width and
normalisation are choices of this implementation.

## Spreading

`pn_lfsr` is an m-stage Fibonacci shift register with XOR feedback. The default
is m = 7 with the primitive polynomial x⁷ + x⁶ + 1, which gives a period of 127
chips, and a seed of `1010101`. It advances two chips per step.

`spreader` XORs each code pair with the next two chips; bit 1 of the pair meets
the earlier chip. `despreader` does the same with its own generator, which
starts from the same seed at reset. So the two stay in step only if they see the
same number of pairs since reset.

Here spreading means one chip per coded bit: a scrambling with no bandwidth
expansion. A spreading factor above one, or one code per subcarrier, is not
built. To change the code, change `M`, `TAPS` and `SEED` of `pn_lfsr`; the
reference model in `tb_ref_pkg` hard-codes the 7-stage polynomial.

## QPSK mapping and the 8-point transforms

The QPSK points lie on the axes (carrier phases 0, π/2, π and 3π/2), with
amplitude A = 2048 in 16-bit two's complement:

| pair | point |
|---|---|
| 00 | (+A, 0) |
| 01 | (0, +A) |
| 11 | (−A, 0) |
| 10 | (0, −A) |

Neighbouring points differ in one bit. So a 90° error on one subcarrier costs
one code bit, which the decoder can correct.

The deframer decides each value by its nearest axis. If |I| ≥ |Q|, the point is
on the I axis and the sign of I picks 00 or 11. Otherwise the sign of Q picks 01
or 10.

Both transforms are fully parallel radix-2 butterfly networks. Each of the three
stages ends in a pipeline register, so each transform has a latency of 3 clocks
and takes one frame per clock.

- **`ifft8`, decimation in frequency.** Inputs come in natural order.
  - Stage 1 pairs element *i* with *i*+4 and multiplies the difference by
    W₈⁻ⁱ.
  - Stage 2 pairs elements 2 apart within each half, with W₈⁰ and W₈⁻².
  - Stage 3 pairs neighbours, with no twiddle.
  - The result comes out in bit-reversed order. Wiring puts it back into
    natural order.
  - The 1/8 of the inverse DFT is applied as a halving in every stage, at
    17-bit width so that nothing wraps.
- **`fft8`, decimation in time.** Wiring feeds the inputs in bit-reversed order
  (x0, x4, x2, x6, x1, x5, x3, x7).
  - Stage 1 works with W₂⁰.
  - Stage 2 works with W₄⁰ and W₄¹.
  - Stage 3 works with W₈⁰ to W₈³.
  - The outputs come out in natural order, with no scaling.

Twiddles are Q1.14, with 1/√2 as 11585, and products are rounded to nearest.

A time sample never exceeds A, so no FFT stage can exceed 8A = 2¹⁴. Against a
floating-point DFT, the IFFT is within 1.5 LSB and the FFT within 0.7 LSB. At
amplitude 2048 these errors are negligible. If you raise `QPSK_AMP` above 4095
or feed the FFT larger signals, widen `DATA_W`.

## Interfaces and timing

All registers reset synchronously on `rst_n` low. Every stage that can stall
follows the same rule: it accepts when `!out_valid || out_ready`, and its output
register holds while the consumer is not ready. The `valid`/`ready` pairs follow
the usual convention: a transfer happens in a clock where both are high.
Concurrent assertions in `conv_encoder`, `spreader`, `qpsk_framer`, `ifft8` and
`fft8` check that an output offered and not taken stays offered, and for the
two bit-pair stages also that it stays unchanged. They fire in simulation when
the simulator is run with assertions enabled (Verilator `--assert`).

| block | in → out latency | rate |
|---|---|---|
| conv_encoder, spreader, despreader | 1 clock | 1 pair / clock |
| qpsk_framer | frame valid in the clock after the 8th pair | 1 pair / clock |
| ifft8, fft8 | 3 clocks | 1 frame / clock |
| piso_cp | first sample 1 clock after the frame is taken | 1 sample / clock |
| sipo_cp | frame pulse 1 clock after the last sample | 1 sample / clock |
| qpsk_deframer | first pair 1 clock after the frame, 8 clocks per frame | — |
| viterbi_decoder | 15 trellis steps, plus 2 clocks | 1 pair / clock |

`mccdma_top` ports:

| port | dir | meaning |
|---|---|---|
| `in_valid`, `in_ready`, `in_bit` | in, out, in | data bit handshake |
| `tx_valid`, `tx_first`, `tx_sample` | out | transmit samples. `tx_first` marks the first prefix sample. `tx_sample` is `cplx_t` (`{re, im}`, 16 bits each). |
| `rx_valid`, `rx_first`, `rx_sample` | in | receive samples, same format |
| `out_valid`, `out_bit` | out | decoded data |
| `rx_cp_drop` | out | a prefix sample was discarded (status) |
| `rx_overrun` | out | symbols arrived faster than 8 clocks apart (status) |

Parameters of the top: `CP_LEN` (2), `DEPTH` (15) and `PN_M` (7). The package
`mccdma_pkg` fixes `N_SC = 8`, `DATA_W = 16` and `QPSK_AMP = 2048`. The
transform modules are written for exactly 8 points.

## What follows the original description and what is chosen here

**Taken from the description of the design:**

- the chain of blocks and their order;
- the (2,1,3) code and its state table;
- an LFSR with XOR feedback as the spreader;
- despreading by XOR with the same PN pattern;
- the QPSK constellation and its bit labels;
- the 8-point DIF IFFT and DIT FFT butterfly structures, with their twiddle
  placement and input and output orders;
- a cyclic prefix copied from the end of the symbol, added before serialisation
  and removed before the FFT;
- Hamming-distance branch metrics;
- add-compare-select feeding a path metric memory;
- a survivor memory unit that yields the decoded bits.

**Chosen in this implementation** (the description leaves these open):

- all word widths, the QPSK amplitude and the twiddle format;
- the IFFT scaling, and the pipeline registers in both transforms;
- the valid/ready flow control;
- the prefix length of 2;
- the PN length, polynomial and seed, and one chip per coded bit;
- the symbol-start flag for receiver timing;
- the nearest-axis decision rule;
- register exchange, depth 15, metric normalisation and the tie rule in the
  Viterbi decoder;
- a synchronous active-low reset.

**Not built:**

- **The transmit and receive low-pass filters.** Their order, coefficients and
  cut-off are unknown.
- **The channel.** It is not logic; the top brings out the sample streams where
  these parts would sit.
- **Timing closure.** Nothing here targets a particular FPGA or clock rate. The
  original implementation on a Virtex-5 FPGA is reported at about 429 MHz, with
  1382 LUTs and 2005 registers. After generic synthesis this RTL has about 2500
  flip-flop bits, mostly the 16-bit pipeline registers of the two transforms.
  Narrower words or fewer pipeline stages would bring that down.

## Verification

Every block has a self-checking testbench in `tb/`. Each one prints
`TB_RESULT checks=N failures=M`, and each stops on a watchdog. The testbenches
compare against models written independently of the RTL; they live in
`tb/tb_ref_pkg.sv`:

- the encoder as its state table;
- the PN generator bit by bit;
- the constellation as a table;
- the DFT in floating point.

| testbench | what it shows |
|---|---|
| `tb_conv_encoder` | every state-table row is exercised under random back-pressure; 1-clock latency; clear |
| `tb_pn_lfsr` | chip-exact against the model; period 127; reload |
| `tb_spreader`, `tb_despreader` | XOR with the right chips, in order, with stalls and gaps |
| `tb_qpsk_framer` | mapping and subcarrier order; frames held while stalled |
| `tb_ifft8`, `tb_fft8` | results within a few LSB of a floating-point DFT; 3-clock latency; stalls |
| `tb_piso_cp`, `tb_sipo_cp` | prefix content and order; gap-free symbols; prefix dropping with idle clocks inside and between symbols |
| `tb_qpsk_deframer` | decisions under ±900 LSB noise; serial timing; no overrun at 8-clock spacing |
| `tb_viterbi_bmu` | all 16 distances |
| `tb_viterbi_acsu` | metrics, decisions and best state against a forward trellis walk, ties included |
| `tb_viterbi_smu` | register exchange against a trace-back over the stored decisions |
| `tb_viterbi_decoder` | one flipped code bit per 16 pairs, all corrected; latency; clear |
| `tb_mccdma_top` | the whole link at default parameters (below) |

`tb_mccdma_top` runs the complete link at the default parameters. It sends 1600
random bits plus 24 tail bits: 203 OFDM symbols. It plays the channel itself:

- it adds ±40 LSB of noise to every sample;
- on every fourth symbol, it rotates one subcarrier's point by 90°.

Every decoded bit must match the input. The testbench also requires the
following to happen:

- input back-pressure occurs;
- symbols go out back to back;
- the prefix repeats the end of each symbol;
- the receiver drops 2 prefix samples per symbol;
- each injected rotation arrives at the decoder as exactly one wrong code pair,
  and is corrected (50 of them);
- the deframer never overruns.

To run a testbench with Verilator 5:

```
verilator --binary --timing --assert -Wno-fatal -Irtl -Itb -y rtl -y tb +libext+.sv \
  rtl/mccdma_pkg.sv tb/tb_ref_pkg.sv tb/tb_mccdma_top.sv --top-module tb_mccdma_top
./obj_dir/Vtb_mccdma_top
```

Replace `tb_mccdma_top` with any other testbench name. The simulations take
well under a second each.

Each module file begins with a comment that gives its function, timing and
the choices made in it.
