# Two-antenna LTE rank-1 precoding transmitter (64-QAM, 512-point OFDM)

This is the baseband of an LTE downlink transmitter for closed-loop rank-1
spatial multiplexing on two antennas (transmission mode 6). One data stream is
sent from both antennas at once. Each antenna gets its own complex weight, so
the two signals add up well at the receiver. The receiver picks one of four
weight vectors from a fixed codebook and reports the choice as a 2-bit
precoder matrix indicator (PMI). The transmitter applies that vector to every
data symbol and then OFDM-modulates each antenna's stream with a 512-point
inverse FFT.

```
            6 bits/cycle        Q3.12 symbol        antenna 0 ──► ifft512_r8 ──► ant0_o
input_generator ─────► qam64_mapper ─────► precoder ┤
   (PRBS-15)                               ▲        antenna 1 ──► ifft512_r8 ──► ant1_o
      ▲                                    │ PMI (captured per OFDM symbol)
      └──────────── sync_counter ◄─────────┴──────── out_last (OFDM symbol done)
```

Two blocks of a full LTE chain are left out on purpose. There is no layer
mapper, because rank 1 has only one layer. There is no resource-element
mapper: the 512 data symbols fill the 512 IFFT inputs in order. There is also
no cyclic prefix.

## Data path and number formats

All samples are complex numbers with 16-bit signed real and imaginary parts
(`lte_pkg::cplx_t`).

* **Mapper** (`qam64_mapper`). Six bits b0..b5 are mapped with the LTE 64-QAM
  Gray table: `I = (1-2b0)(4-(1-2b2)(2-(1-2b4)))/sqrt(42)`, and Q the same way
  from b1, b3, b5. The levels ±1, ±3, ±5, ±7 over sqrt(42) are stored in Q3.12
  (632, 1896, 3160, 4424), so the average symbol energy is 1.
* **Codebook** (`codebook_rom`) and **precoder** (`precoder`). The weight
  vectors are [1 1], [1 −1], [1 j] and [1 −j], each over sqrt(2), for PMI
  00, 01, 10 and 11. 1/sqrt(2) is the 16-bit word `0000101101010000` (2896 in
  Q3.12), and −1/sqrt(2) is `1111010010110000`. A j weight does not need a
  second word: a flag tells the precoder to swap real and imaginary parts and
  negate one of them. Products are rounded to nearest, back to Q3.12. The
  first weight is the same for every PMI, so antenna 0 always sends the plain
  symbol scaled by 1/sqrt(2), and `cb1_o` is a constant.
* **OFDM** (`ifft512_r8`). Each antenna's block computes
  `x[n] = (1/512) Σ X[k] e^{+j2πkn/512}`, with outputs in 16 bits.

A weight of ±1 or ±j maps the square 64-QAM grid onto itself. So whatever the
PMI, antenna 1 sends the same 64-point alphabet as antenna 0, only permuted.
The precoder testbench checks this.

## The radix-8 IFFT

This block takes the most logic and needs the most explanation. 512 = 8³, so
the transform is three radix-8 passes of Cooley–Tukey decimation in frequency.
They run in place over one working memory of 512 complex words per antenna.

**Phases.** `LOAD` accepts X[0..511] in order, one per `in_valid_i`. `COMPUTE`
runs 3 passes × 64 butterflies, one butterfly per cycle, which takes 192
cycles. `OUTPUT` streams x[0..511], one per cycle, and flags the last sample
with `out_last_o`. `in_ready_o` is high only during `LOAD`. The output cannot
be stalled.

**Butterfly addressing.** Pass s (s = 0, 1, 2) has span `L = 8^(2−s)`, which
is 64, 8 and 1. Butterfly b splits into a group `g = b / L` and an offset
`k = b mod L`. It reads the eight words at `g·8L + k + m·L`, for m = 0..7.
All of these are bit fields of a 9-bit address, so the address logic is only
shifts and ORs.

**Butterfly arithmetic** (`dft8_inv`). The eight words go through a scaled
8-point inverse DFT. Internally this is two 4-point transforms, whose twiddles
are only ±1 and ±j. Their odd half is then rotated by 1, (1+j)/√2, j and
(−1+j)/√2, and the two halves are combined. The only real multiplications are
the two by 1/√2. The sums carry four guard bits, and the result is divided by
8 with rounding. Output p is then multiplied by the twiddle
`e^{+j2π·p·k·8^s/512}` and written back to the address it came from. The
twiddles are a 512-entry Q1.14 table that is computed from `$cos`/`$sin` at
elaboration, so no data file is needed.

**Output order.** Decimation in frequency leaves the results in base-8
digit-reversed order. Time sample n is read from the address whose three octal
digits are those of n in reverse order.

**Scaling and accuracy.** Each pass divides by 8, so the magnitude of a sample
never grows. The whole transform carries the 1/512 factor, and no overflow can
occur for inputs with magnitude below 2^15. Against a double-precision inverse
DFT, the error seen in the testbenches is at most 1 LSB per component. The
price of this scaling is dynamic range. With precoded 64-QAM input, the output
RMS is about 100 LSB (x ≈ X/√512). A design that needs more output resolution
should widen `W` or drop the division in one pass.

**Cost.** Each instance needs 512 × 32 bits of storage, 8 read and 8 write
ports per cycle, one 8-point DFT and 7 complex multipliers. The
one-butterfly-per-cycle choice trades area for a short compute phase.

## Sequencing and timing

The blocks have no back-pressure between them. `sync_counter` keeps them in
step by counting symbols:

1. It releases exactly 512 symbols into the chain, one per cycle.
2. It waits until the IFFTs signal the end of that OFDM symbol.
3. It releases the next 512 symbols, as long as `run_i` is high.

The PMI is captured together with the first symbol of each OFDM symbol. A
change on `pmi_i` therefore takes effect at the next OFDM-symbol boundary.

Pipeline latencies: the generator takes 1 cycle, the mapper 1 cycle and the
precoder 2 cycles. The IFFT loads for 512 cycles, computes for 192 cycles and
outputs for 512 cycles. The resulting end-to-end figures, all checked by the
top-level testbench, are:

| quantity | cycles |
|---|---|
| first source symbol released → first output sample | 708 |
| one OFDM symbol to the next (`run_i` held high) | 1221 |
| output burst per OFDM symbol, per antenna | 512 consecutive |

At a 100 MHz clock this is 3072 data bits (512 × 6) every 12.21 µs, or
251.6 Mbit/s. The published implementation of this transmitter reports
1900 cycles per OFDM symbol, which is 161.68 Mbit/s. It also reports a
121-cycle precoder delay and 2021 cycles for the whole process. Its internal
architecture was not available, so those numbers are not reproduced. The
design here is faster per symbol because it runs one radix-8 butterfly per
cycle. It does not overlap loading and unloading, however: input is idle for
about 58% of the time. Double-buffering the IFFT memory would bring the
period down to about 512 + 192 cycles, if that is needed.

## Where this design departs from, or adds to, the published one

* **Codebook rows.** The published 16-bit codebook table lists the antenna-1
  word as +1/√2 for PMI 00 and 01, and −1/√2 for PMI 10 and 11. That gives
  only two distinct vectors and no j weights. It contradicts the LTE one-layer
  codebook that the same source also gives, with phases 0°, 180°, 90° and
  270°. The LTE codebook is implemented here. The 16-bit words are used as the
  encoding of ±1/√2.
* **Own choices where no detail was given:** the PRBS-15 data source and its
  6-bit-wide output; the LTE Gray 64-QAM table; the Q3.12 and Q1.14 formats;
  rounding; the memory-based one-butterfly-per-cycle IFFT with 1/8 scaling per
  pass; natural-order input and output; PMI capture per OFDM symbol;
  synchronous active-low reset; and the counter's states.
* **Not part of the RTL:** the FPGA board, its clock oscillator and its DDR
  memory (unused by the data path), and the vendor logic analyser used to
  observe the outputs. The outputs come out as ports instead.
* The 100 MHz clock target has not been checked by any timing analysis. The
  combinational path through one butterfly and twiddle multiplier is long, and
  pipelining the butterfly may be needed to reach it.

## Files

| file | contents |
|---|---|
| `rtl/lte_pkg.sv` | shared types (`cplx_t`, `pmi_t`) and constants |
| `rtl/input_generator.sv` | PRBS-15 bit source, 6 bits per enable |
| `rtl/qam64_mapper.sv` | 64-QAM mapper |
| `rtl/codebook_rom.sv` | PMI → weights |
| `rtl/precoder.sv` | weight multiplication, 2-stage pipeline |
| `rtl/dft8_inv.sv` | scaled 8-point inverse DFT (radix-8 butterfly) |
| `rtl/ifft512_r8.sv` | 512-point radix-8 IFFT |
| `rtl/sync_counter.sv` | per-OFDM-symbol release counter |
| `rtl/lte_precoding_top.sv` | the transmitter |
| `tb/tb_*.sv` | one self-checking testbench per block |

## Simulation

Each testbench prints `TB_RESULT checks=N failures=M` and stops by itself. It
also has a cycle watchdog. With Verilator 5:

```
verilator --binary --timing -Irtl -y rtl -y tb \
    --top-module tb_lte_precoding_top rtl/lte_pkg.sv tb/tb_lte_precoding_top.sv
./obj_dir/Vtb_lte_precoding_top
```

Replace the testbench name to run another one. Lint with
`verilator --lint-only -Wall -Irtl -y rtl rtl/lte_pkg.sv rtl/<module>.sv`.

What the testbenches check:

* `tb_lte_precoding_top` runs the full-size transmitter with no parameter
  overrides. It produces five OFDM symbols with PMI 00, 01, 10, 11 and 10.
  An independent model regenerates the bits, maps and precodes them, and takes
  a real-valued 512-point inverse DFT. Both antennas must match it within
  3 LSB. The testbench also checks:
  * that a change of PMI in the middle of an OFDM symbol is ignored;
  * the 708- and 1221-cycle timing;
  * that the counter waits for the IFFTs;
  * that output stops when `run_i` drops.

  It runs in well under a second.
* `tb_ifft512_r8` covers:
  * random, single-tone and all-equal (peak) inputs;
  * input with gaps;
  * the 193-cycle gap from the last input to the first output;
  * `out_last_o` and `in_ready_o`.
* `tb_precoder` checks random symbols and PMIs bit-exactly against a
  real-number model. It also checks the 2-cycle latency and that all four
  PMIs preserve the 64-point alphabet.
* `tb_qam64_mapper` checks all 64 points, that they are distinct, and their
  unit average energy.
* `tb_codebook_rom` checks the four weight vectors.
* `tb_input_generator` compares the source with a bit-serial PRBS model under
  a random enable.
* `tb_sync_counter` checks bursts of exactly N, `sof_o`, waiting, stop, and
  the frame count.

## Changing the design

* `ifft512_r8` takes `STAGES` (N = 8^STAGES) and `W`. The top uses
  `lte_pkg::NFFT` for the counter. A different size means changing `NFFT` and
  the `STAGES` values in the top together.
* The codebook and the mapper levels are constants in `lte_pkg`.
* `input_generator` can be replaced by any source that gives 6 bits one cycle
  after `en_i`.
