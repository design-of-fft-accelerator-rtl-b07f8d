# Variable-length FFT accelerator for 2x2 MIMO-OFDM receivers

OFDM standards use many FFT sizes: IEEE 802.11n needs 64 and 128 points,
IEEE 802.16e needs 128, 512, 1024 and 2048. Building a separate pipelined
FFT for every size and every antenna is expensive. This design instead
splits the work. A small, fixed 64-point pipelined FFT in hardware (the
*branch FFT*) does most of the arithmetic. A processor, reached over the
OPB (IBM CoreConnect On-chip Peripheral Bus), does the remaining
log2(N/64) stages for whatever size is in use. A single branch FFT serves
both antennas of a 2x2 MIMO receiver, taking their symbols in turn.

The hardware here is everything except the processor:

```
 antenna 0 ──► in_buffer ─┐                                ┌──► dp_ram (results) ◄─┐
 antenna 1 ──► in_buffer ─┤──► sched_ctrl ──► fft64_r23sdf ┘                       │
                          │        ▲                                         accel_regs ◄── opb_wrapper ◄──► OPB (processor)
                          └────────┴─────────── control (enable, size) ◄──────────┘
```

`fft_accel` is the top level. `fft64_r23sdf` is the branch FFT itself. It
can also be used on its own as a streaming 64-point FFT.

## How an N-point transform is divided

Let N = 64·L with L = 1, 2, 8, 16 or 32. The transform is split by
decimation in time. Sub-sequence l (l = 0..L-1) holds every L-th sample,
x(L·n1 + l) for n1 = 0..63. The branch FFT turns each sub-sequence into
Y_l(k), its 64-point DFT divided by 64. The processor then computes

    X(k) = Σ_{l=0}^{L-1}  W_N^(l·k) · 64 · Y_l(k mod 64),      W_N = e^(-j2π/N)

which is an L-point FFT, with twiddle factors, across the L results. For
N = 64 the processor only has to undo the 1/64 scaling.

`sched_ctrl` produces this order by reading the input memory at address
L·n1 + l. Sample i = 64·l + n1 of the stream sent to the FFT is read from
that address. Bin k of sub-sequence l is stored at result word
a·NMAX + 64·l + k, where a is the antenna.

## The 64-point R2³SDF pipeline

### Structure

The branch FFT is a radix-2³ single-path delay feedback (SDF) pipeline.
The 64-point decimation-in-frequency FFT is written as two radix-8 groups.
Each group is built from three radix-2 butterflies, so the only non-trivial
multiplication is the single one between the two groups:

| unit     | module   | feedback depth D | multiplies the incoming sample by       | control bits of the block position τ |
|----------|----------|------------------|-----------------------------------------|--------------------------------------|
| BF1      | `bf2i`   | 32               | –                                       | mode = τ[5]                          |
| BF2      | `bf2ii`  | 16               | −j when τ[5] = 1                        | mode = τ[4]                          |
| BF3      | `bf2iii` | 8                | W8^(τ[5] + 2τ[4])                       | mode = τ[3]                          |
| multiply | `cmult`  | –                | W64^(τ[2:0] · bitrev3(τ[5:3]))          | –                                    |
| BF4      | `bf2i`   | 4                | –                                       | mode = τ[2]                          |
| BF5      | `bf2ii`  | 2                | −j when τ[2] = 1                        | mode = τ[1]                          |
| BF6      | `bf2iii` | 1                | W8^(τ[2] + 2τ[1])                       | mode = τ[0]                          |

There are 32+16+8+4+2+1 = 63 feedback registers and one complex
multiplier.

These factors come from the index map n = 32n1 + 16n2 + 8n3 + n4,
k = k1 + 2k2 + 4k3 + 8k4:

    W64^(nk) = (−1)^(n1k1) · (−j)^(n2k1) (−1)^(n2k2) · W8^(n3(k1+2k2)) (−1)^(n3k3) · W64^(n4(k1+2k2+4k3)) · W8^(n4k4)

After BF1, position τ of a block holds (k1, n2, n3, n4) = (τ[5], τ[4],
τ[3], τ[2:0]). The later stages refine this in the same way. The second
group repeats the pattern on 8-sample blocks. Results leave in bit-reversed
order: the word at block position p is bin k = bitrev6(p), and `out_idx`
carries k.

### One butterfly stage

Every stage works the same way. The `mode` bit is high for the second
half of each 2D-sample block.

* **Mode 0 (first half).** The input is pushed into the D-word shift
  register (`sdf_delay`). The word that falls out of the register, a
  difference left by the previous block, goes to the output.
* **Mode 1 (second half).** The input x(n+D), after the stage's trivial
  rotation, meets the stored x(n). (x(n) + x(n+D))/2 goes to the output and
  (x(n) − x(n+D))/2 goes back into the shift register.

The output is registered. A result therefore leaves D+1 clock cycles
after its sample entered the stage.

The trivial rotations cost no multiplier:

* **−j** is a swap of the real and imaginary parts plus one negation.
* **W8^1 = (1−j)/√2 and W8^3 = (−1−j)/√2** need a sum or difference of the
  two parts, then a multiplication by √2/2. `sqrt2_mult` does that with
  shifts and adds: √2/2 ≈ 11585/2^14, and 11585 = 2^13+2^11+2^10+2^8+2^6+1.

### Twiddle factors

Only W64^a for a = 0..8 (angles 0 to π/4) is stored, in `twiddle_rom`:

* Q2.14 format, 1.0 = 16384
* real part R = round(16384·cos(2πa/64))
* imaginary part I = round(−16384·sin(2πa/64))

`twiddle_gen` computes m = n4·k (at most 7·7 = 49) and cuts the circle
into eight regions of eight steps: region r = m[5:3], offset o = m[2:0].
Even regions read ROM address o and odd regions read address 8 − o. The
coefficient is then rebuilt by swapping and negating:

| region | 0 | 1  | 2  | 3  | 4  | 5 | 6  | 7  |
|--------|---|----|----|----|----|---|----|----|
| re     | R | −I | I  | −R | −R | I | −I | R  |
| im     | I | −R | −R | I  | −I | R | R  | −I |

A 64-point transform reaches regions 0 to 6.

### Number format and accuracy

* **Samples.** Samples are 16-bit two's complement, real and imaginary
  parts packed as `cplx_t` {re, im}.
* **Scaling.** Each butterfly halves its results, truncating toward minus
  infinity. The output is therefore X(k)/64 in the same 16-bit format.
* **Overflow.** If every input has complex magnitude below full scale
  (|x| < 32768), nothing can overflow. Larger inputs can reach the
  saturation logic in the W8 and W64 multipliers.
* **Complex multiplier.** `cmult` rounds to nearest and saturates.
* **Measured error.** Against a double-precision DFT/64, random full-range
  inputs show at most 2 LSB of error per part.
* **SQNR.** With white inputs uniform in ±32768/√2, the measured
  signal-to-quantisation-noise ratio of the 64-point core is about 67.7 dB.
  The textbook estimate 2^(2B)/(5N − 4m − 3) for B = 16, N = 64, m = 6 is
  71.7 dB. Rounding instead of truncating in the butterflies was tried and
  changes the result by less than 0.3 dB. The estimate's noise model is
  simpler than this datapath, which also rounds after the W8 and W64
  multipliers.
* **Bit widths.** Wider words for long transforms, which the SQNR analysis
  behind the design calls for, are not provided.

### Timing and flow control

The pipeline takes one sample per clock, and blocks can follow each other
with no gap. The latency from a sample's acceptance to the output word at
the same block position is **71 cycles**:

* BF1 to BF3: 33 + 17 + 9 cycles
* multiplier: 2 cycles
* BF4 to BF6: 5 + 3 + 2 cycles

There is no handshake inside the pipeline. All stages advance together
(`adv`). Each stage takes its mode from one shared sample counter minus
the fixed offset of its input. `fft64_ctrl` cuts time into 64-cycle
slots:

* **Data slot.** A slot opens at counter value 0. If a sample is offered
  then, the slot carries data. The source must then supply 64 samples on
  64 consecutive cycles. An assertion checks this.
* **Flush slot.** If nothing is offered when a slot opens, but results are
  still inside the pipeline, the slot runs empty and pushes them out. The
  last block of a burst thus comes out without a following block.
  `in_ready` is low during a flush slot. An offer made then waits for the
  next slot boundary, at most 63 cycles.
* **Stop.** With nothing inside and nothing offered, the pipeline stops.

## System blocks

**`in_buffer`** (one per antenna) writes the continuous sample stream into
one of two banks of NMAX = 2048 words. After the N-th sample of a symbol
it pulses `sym_done`, names the bank it filled, and switches to the other
bank. The previous symbol can therefore be read while the next one
arrives. Clearing the enable bit restarts the symbol.

**`sched_ctrl`** keeps one pending flag per antenna and serves pending
antennas in round-robin order. For each symbol it:

1. primes the memory read for one cycle;
2. streams the N samples into the FFT in decimated order;
3. writes the results as they come out;
4. pulses `set_ready` for that antenna once its last result is written.

Input and output are decoupled. If another symbol is pending when the
last sample of one is accepted, its first read is issued in that same
cycle and it follows without a gap, so the FFT sees back-to-back blocks.
Up to four symbols may be inside the FFT at once. A four-entry queue
holds their antennas, oldest first, and the result side uses its head. A
symbol that becomes pending while the FFT is flushing waits, held off by
`in_ready`, until the next 64-cycle slot.

A symbol that completes while the same antenna's previous symbol is
still waiting or being read raises an overrun.

**`accel_regs`** holds the processor-visible registers (byte offsets from
the wrapper's base address):

| offset | access | contents |
|--------|--------|----------|
| 0x0000 | rw | CTRL: bit 31 enable, bits 2:0 log2(L) (N = 64 << log2(L)) |
| 0x0004 | r / w1c | STATUS: bits 1:0 result ready per antenna, bits 9:8 overrun per antenna, bit 16 busy. Writing 1 clears a ready or overrun bit. A set in the same cycle wins. |
| 0x0008 | r | number of symbols transformed |
| 0x8000 + 4·(a·2048 + 64·l + k) | r | result word {re[31:16], im[15:0]} of antenna a, sub-sequence l, bin k |

`irq` is high while any result is ready.

**`opb_wrapper`** is an OPB slave. It handles a select inside the 64 KB
window at `BASE` (default 0x8000_0000):

* A transfer becomes a one-cycle local-bus request.
* `Sl_xferAck` follows two cycles after the select, for one cycle. It
  carries the read data on `Sl_DBus`, which is zero at all other times.
* One idle cycle follows each transfer.
* Error, retry and timeout-suppress are tied low.
* Byte enables are not used.

The bus is numbered [31:0] with bit 31 as the MSB.

**`dp_ram`** is a one-write, one-read synchronous RAM with one cycle of
read latency. It is used for both the sample banks and the result memory.

## Using it

### Size and throughput

* **Block size.** Input blocks are 64 to 2048 samples per antenna, selected
  by CTRL. Change the size only while disabled. The test sequence is:
  write 0 to CTRL, then enable with the new size.
* **Antennas.** `fft_accel` has parameters `NANT` (antennas, default 2)
  and `NMAX` (largest symbol, default 2048). With `NANT = 1` it is the
  single-antenna system: each symbol is stored, then transformed by the
  branch FFT, while the next symbol fills the other bank.
* **Sample rate.** The branch FFT takes one sample per clock in all, so
  the antennas together must deliver, on average, less than one sample per clock,
  with some margin for symbols that wait for a slot boundary. The
  processor must read and clear an antenna's results before
  that antenna's next symbol has passed through the FFT.
* **Throughput.** When symbols are waiting, the branch FFT takes one
  sample per clock with no gap between symbols. Each symbol's results
  appear 71 cycles after its first sample is accepted.

The 802.11n 128-point case (40 MHz sampling, 4 µs symbols, two antennas)
needs 2·128 = 256 samples per 4 µs through the FFT. At one sample per
clock that is a clock of 64 MHz, so the document's 85 MHz figure leaves
margin for symbols that wait for a slot boundary. Whether a given technology reaches that clock is not known from
the RTL.

### Simulating

All files are SystemVerilog-2017. `rtl/fft_pkg.sv` must be read first.
With Verilator 5, from the directory that holds `rtl/` and `tb/`:

```
verilator --binary --timing --assert -Irtl rtl/fft_pkg.sv tb/tb_fft_accel.sv --top-module tb_fft_accel
./obj_dir/Vtb_fft_accel
```

Any other testbench runs the same way: replace `tb_fft_accel` with its
name. Every testbench prints `TB_RESULT checks=<n> failures=<n>` and has a
watchdog.

| testbench | checks |
|-----------|--------|
| `tb_fft_accel` | Whole accelerator at its default size (2 antennas, NMAX = 2048), with the testbench acting as processor over the OPB. Covers N = 64, 128, 512, 1024 and 2048. Every 64-point result is compared with a double-precision DFT (±6 LSB). The processor's combination is checked against a direct N-point DFT. Also covers an overrun, clearing status, and the symbol counter. Counts each mechanism (both antennas served, back-to-back blocks, flush slots, a start held off during a flush, size change, overrun) and fails if one never happens. |
| `tb_fft_accel_siso` | The same system built for one antenna (`NANT = 1`). Runs N = 64, 128 and 2048, then three 128-point symbols with no pause between them. One bank is read into the FFT while the next symbol fills the other; no overrun may be flagged and the last symbol's results must be correct. |
| `tb_fft64_r23sdf` | Impulse, DC, tones and random blocks against a reference DFT. Checks bit-reversed order, 71-cycle latency on every word, back-to-back blocks, flush, and an offer held off until the slot boundary. |
| `tb_fft64_sqnr` | Streams 48 random blocks back to back through the 64-point core. Measures the SQNR against a double-precision DFT/64. Requires it to be within 6 dB of the 71.7 dB estimate, and every word to be within ±6 LSB. |
| `tb_bf2i`, `tb_bf2ii`, `tb_bf2iii` | Each butterfly against sums and differences computed from the raw inputs, with random enable gaps. |
| `tb_sdf_delay`, `tb_cmult`, `tb_sqrt2_mult`, `tb_twiddle_rom`, `tb_twiddle_gen` | Arithmetic units against floating point, exhaustively where that is cheap. |
| `tb_fft64_ctrl`, `tb_sched_ctrl`, `tb_in_buffer`, `tb_dp_ram`, `tb_accel_regs`, `tb_opb_wrapper` | Control and memory blocks against models in the testbench. |

## Where this design goes beyond its source, and what it leaves out

**Follows the source.** These parts follow the published design:

* the R2³SDF structure with 63 feedback registers and one multiplier
* the 16-bit datapath and the 2^-6 output scaling
* the 71-cycle latency
* the nine-entry twiddle table with its region mapping
* the shift-and-add √2/2 multiplier
* the four-multiplier complex multiplier
* the sharing of one branch FFT by two antennas

**Choices made here.** The published region equations are inconsistent
for two of the eight regions. The mapping above was derived again from
the symmetries of sine and cosine, and is checked against floating point
for every exponent. The following are also this design's own choices:

* the rounding and pipeline-register placement
* the slot and flush flow control
* the decimation-in-time split between processor and hardware
* the two-bank input memory and the result memory
* the register map and the OPB signal subset
* round-robin service and overrun detection

**Not included:**

* **Processor.** It is not part of the hardware. The end-to-end testbench
  performs its role.
* **Schedule II.** The single-antenna "schedule II" variant adds an
  extra buffer so that hardware and processor each get a full symbol
  time. It is an alternative to the configuration built here.
* **Inverse FFT.** No inverse-FFT mode is provided.
* **Test and prototyping hardware.** The scan-test insertion and the FPGA
  prototyping harness (RS-232 pattern loader) are not reproduced.
