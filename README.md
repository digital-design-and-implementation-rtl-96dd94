# NB-IoT NPUSCH transmitter chain in SystemVerilog

This RTL turns one NB-IoT uplink transport block into the time-domain samples
of one NPUSCH (format 1) resource unit. It follows 3GPP Release 16 at 15 kHz
subcarrier spacing. The chain is:

```
transport block bits
  -> CRC24A attachment           crc24a
  -> rate-1/3 turbo encoder      turbo_encoder (turbo_qpp_lut, turbo_qpp_index, 2 x rsc_encoder)
  -> rate matching               rate_matcher
  -> channel interleaver         channel_interleaver
  -> scrambler                   scrambler
  -> BPSK / QPSK mapper          modulator
  -> transform precoder (DFT)    dft_input_buffer, dft12 (radix3_bf, radix2_bf), dft_output_serializer
  -> resource element mapper     rem
  -> 128-point IFFT              ifft_input_assembler, ifft128 (16 x radix2_bf)
  -> 128 complex samples per SC-FDMA symbol
```

The top level is `npusch_tx`. Shared types, constants and small functions are
in `npusch_pkg`:

- fixed-point types;
- the configuration struct;
- the I_sc decoder;
- the IFFT twiddle table;
- the sqrt(3)/2 shift-and-add constant.

The design is a hardware version of a published thesis design. It uses the
same block split and the same main choices:

- serial bit-level coding;
- a CRC built as an LFSR;
- a look-up table plus an index generator for the turbo interleaver;
- three sub-block memories for rate matching;
- a 12-point DFT from one radix-3 unit and one radix-2 unit;
- a 12 x 112 mapping grid;
- a 128-point IFFT from 16 radix-2 units in 28 cycles.

The places where it departs from that design are listed under "Departures" near
the end.

## Using the top level

1. Drive `cfg` (type `npusch_cfg_t`) and pulse `start` for one cycle. Every
   block latches its part of the configuration in that cycle. The fields are:
   - `tbs`: the transport block size A;
   - `qm`: 1 for BPSK, 2 for QPSK;
   - `g`: the number of coded bits;
   - `rv_idx`: the redundancy version;
   - `i_sc`: the subcarrier indication;
   - `dmrs_sym`: the reference-signal symbol within each slot, normally 3;
   - `n_rnti`, `n_f`, `n_s`, `n_id_ncell`: the scrambling identities.
2. Send the A transport block bits on `tb_bit` with `tb_en`, at most one per
   cycle. Gaps are allowed.
3. For each of the 7 x N_slots SC-FDMA symbols of the resource unit, the top
   pulses `sym_valid` with `sym_index`. `samples[0..127]` then hold the symbol's
   time samples in Q4.10. `done` comes with the last symbol.
4. `stage_done[5:0]` pulses, one bit per stage, when the CRC, turbo encoder,
   rate matcher, channel interleaver, scrambler and modulator (bit 0 to bit 5)
   have each finished the block. It helps to follow a block as it moves through
   the chain.

`g` must be the size of one resource unit: NSC x 6 x N_slots x Q_m, which is
96·Q_m for a single subcarrier and 144·Q_m otherwise. The chain does not handle
repetitions, several resource units, or several code blocks. The largest
transport block, 2536 bits, fits in one code block of K = 2560. `k_legal` is low
if TBS + 24 is not a turbo interleaver size.

I_sc selects the resource unit shape:

| I_sc | subcarriers (NSC) | first subcarrier | slots |
|------|-------------------|------------------|-------|
| 0-11 | 1 | I_sc | 16 |
| 12-15 | 3 | 3(I_sc-12) | 8 |
| 16-17 | 6 | 6(I_sc-16) | 4 |
| 18 | 12 | 0 | 2 |

## Flow control

The first three coding stages work on whole blocks:

- the CRC streams the block through;
- the turbo encoder stores the code block before encoding;
- the rate matcher stores the three coded streams before selecting bits.

Each of them is driven by the previous stage's valid strobe and never stalls.

From the channel interleaver onwards, every link is valid/ready. Three things
create back-pressure:

- **Scrambler warm-up.** After `start`, the scrambler's gold-sequence generator
  runs its 1600 discard shifts. Until then `in_ready` is low, so a short
  codeword waits in the channel interleaver.
- **DFT busy.** A 12-point transform takes 16 cycles. The DFT input buffer then
  holds its vector and stops taking symbols, and the stall reaches back to the
  modulator, scrambler and interleaver. The output serializer must also be
  empty before the next DFT starts.
- **IFFT busy.** The IFFT takes 28 cycles per symbol. While it runs, the
  assembler keeps its 12 subcarriers and the mapper's read-out waits.

The mapper stores the whole resource unit before reading it out column by
column. Symbols therefore leave the IFFT in order, including the empty
reference-signal symbols.

## The coding stages

**CRC24A** (`crc24a`). A 24-bit LFSR in division form with polynomial 0x864CFB.
Data bits pass straight through. The 24 parity bits follow, shifted out of the
register MSB first. With no input gaps, a block of A bits takes A + 25 cycles.

**Turbo interleaver.** `turbo_qpp_lut` is a case table of (f1, f2) for the 132
legal K up to 2560. `turbo_qpp_index` produces Π(i) = (f1·i + f2·i²) mod K with
no multiplier, using:

```
Π(0) = 0,   g(0) = f1 + f2,   Π(i+1) = Π(i) + g(i),   g(i+1) = g(i) + 2·f2     (all mod K)
```

Each step is two additions, each followed by a conditional subtraction of K.

**Turbo encoder** (`turbo_encoder`).

1. The K bits are written into a buffer.
2. In each encoding cycle the buffer is read twice: at i for the upper
   constituent encoder and at Π(i) for the lower one.
3. After K cycles, both encoders are flushed for three cycles with their own
   feedback as input.
4. The twelve tail bits are sent in the standard order, four per stream.

The output is three streams of K + 4 bits. They match the thesis' K = 40 worked
example bit for bit.

**Rate matcher** (`rate_matcher`). This stage is the hardest to follow. The
standard defines it with three 32-column matrices padded with <NULL> bits, a
column permutation, and a circular buffer of length 3·K_Π. The hardware does the
same thing as follows:

- Each stream i is stored in a K_Π = 32R-bit memory. Input bit k goes to address
  ND + k, where ND = 32R − D is the number of dummy bits. The padding is then
  exactly the addresses below ND, so a NULL bit is detected with a single
  comparison.
- The interleaved bit v(i) at column c and row r is at address {r, P(c)}, where
  P is the 5-bit bit reversal. For stream 2 it is at ({r, P(c)} + 1) mod K_Π.
  No permutation table is needed.
- The circular buffer is never built. A counter set (region, column, row, and
  for the second region which of stream 1 or 2) walks it one position per cycle,
  starting at k0 = R(24·rv + 2):
  - rv 0 starts at column 2 of the systematic region;
  - rv 1 starts at column 26 of the systematic region;
  - rv 2 starts at column 9 of the interlaced parity region;
  - rv 3 starts at column 21 of the interlaced parity region.
- NULL positions produce no output. The walk wraps at the end of the buffer,
  which gives repetition when E is larger than the buffer.

**Channel interleaver** (`channel_interleaver`).

- The E bits are written in order into a bit-addressed register file.
- They are then read as a matrix of C_mux = 6·N_slots columns of Q_m-bit
  symbols, column by column. The two bits of a QPSK symbol stay together.
- Row and column strides are kept in accumulators, and C_mux is formed as
  4·N_slots + 2·N_slots. The number of rows is counted while writing.

**Scrambler** (`scrambler`). Two 31-bit shift registers generate x1 and x2. The
second is loaded with:

```
c_init = n_RNTI·2^14 + (n_f mod 2)·2^13 + ⌊n_s/2⌋·2^9 + N_ID
```

Both registers run 1600 shifts before the first data bit. After that, each data
bit is XORed with x1(0) ⊕ x2(0) and both registers shift once.

## Modulation and SC-FDMA

**Modulator** (`modulator`). Amplitudes are ±181/256, which is 1/√2 in Q4.8.

- BPSK maps bit 0 to (+,+) and bit 1 to (−,−).
- QPSK uses the first bit for the sign of I and the second for the sign of Q.

**DFT** (`dft12`). An unscaled M-point DFT for M = NSC ∈ {1, 3, 6, 12}. It is
computed with one radix-3 unit and one radix-2 unit, each used once per cycle.
For M = 12, using 12 = 3 × 4:

| Cycles | Operation |
|--------|-----------|
| 0-3 | radix-3 on (x[n], x[n+4], x[n+8]); results multiplied by W12^(n·k1) |
| 4-9 | first radix-2 stage of the three 4-point DFTs; the odd difference is multiplied by −j |
| 10-15 | second radix-2 stage |

M = 6 uses two radix-3 cycles and then three radix-2 cycles. M = 3 is a single
radix-3 cycle, and M = 1 passes the input through.

Every twiddle needed (W12^1 to W12^6) is a combination of ½, sqrt(3)/2,
negation and swapping real and imaginary parts. sqrt(3)/2 ≈ 0.8657 is a sum of
eight shifted copies, so the DFT has no multiplier.

Internally the values are 20-bit Q8.12. Outputs are rounded and saturated to
12-bit Q4.8. The largest coherent sum of twelve symbols, 8.49, just exceeds the
Q4.8 range and saturates.

**Resource element mapper** (`rem`).

- Two 12 × 112 memories hold the real and imaginary parts, addressed 12·l + k.
- Input values fill the allocated subcarriers in increasing subcarrier order,
  then symbol order, skipping symbol `dmrs_sym` of every slot.
- On read-out, any element that is not an allocated data element reads as zero.
  This gives the zero-padded grid without a clearing pass.

**IFFT** (`ifft_input_assembler`, `ifft128`).

- Subcarrier k of the 12-subcarrier band is placed on IFFT bin (k − 6) mod 128.
  The values are widened to Q4.10.
- The transform is a radix-2 decimation-in-frequency FFT with +j twiddles, run
  in place on 128 registers. In stage s, cycle q, butterfly unit b handles
  butterfly j = 16q + b of that stage, so the 7 stages take 4 cycles each, 28 in
  total.
- Twiddles come from a 64-entry Q1.14 table.
- Intermediate values are 21 bits wide, so no scaling is needed inside the
  stages. The full 1/128 is one arithmetic shift by 7 at the output.
- The bit-reversed result is reordered by wiring.

## Numbers to expect

All timings assume no stalls from outside the block.

| Stage | Timing |
|-------|--------|
| CRC | A + 25 cycles |
| Turbo encoder | K input cycles, then 2 + K + 3 + 4 cycles |
| Rate matcher | D input cycles, then one cycle per circular-buffer position visited |
| Channel interleaver | H input cycles, then H output cycles |
| Scrambler | 1600 cycles of warm-up, then 1 bit per cycle |
| DFT | 16 / 5 / 1 / 1 cycles for NSC = 12 / 6 / 3 / 1 |
| IFFT | 28 cycles per symbol |

Accuracy, measured against floating point over the full chain:

- DFT outputs are within 2 LSB of Q4.8.
- Final samples are within about 1.3 LSB of Q4.10.

## Departures from the reference design

- **CRC latency.** The reference design quotes TBS + 50 cycles. This one takes
  A + 25, because each bit leaves one cycle after it enters. The output sequence
  is unchanged.
- **Block buffering.** The turbo encoder and the rate matcher store a whole
  block before producing output. The reference design streams part of the block
  and uses a smaller circular buffer. The output bits are identical.
- **IFFT twiddles.** The reference design multiplies the IFFT twiddles with
  fixed shifts. Here they are Q1.14 constants and the products are written as
  multiplications, so synthesis may infer multipliers.
- **BPSK rotation.** BPSK is the plain mapping, with no π/2 rotation between
  symbols. The BPSK table and test results of the reference design use plain
  BPSK, although its parameter table names π/2-BPSK.
- **QPSK bit order in the interleaver.** The interleaver keeps the two bits of
  a QPSK symbol in one matrix cell, as the standard does. One description in
  the reference design splits even and odd bits differently for BPSK.
- **Interleaver matrix width.** N_slots in C_mux follows the resource unit
  shape (16/8/4/2) instead of a fixed 16.
- **Handshakes and framing.** The `start` framing pulse, the valid/ready
  handshakes, the DFT input buffer, the DFT output serializer and the IFFT input
  assembler are this design's own additions. The reference design specifies
  each block's interface but not how they connect.

## What is not included

- generation of the demodulation reference signal (its symbol is left at zero);
- the cyclic prefix;
- the half-subcarrier (7.5 kHz) frequency shift;
- repetition over several resource units, and multiple code blocks;
- the 3.75 kHz numerology.

## Verification

Each module has a self-checking testbench `tb/tb_<module>.sv`. The testbenches
compare the RTL with the independent reference models in `tb/npusch_ref_pkg.sv`:

- CRC: long division;
- turbo encoder: direct QPP formula and bit-level constituent encoders;
- rate matcher: literal <NULL>-padded matrices and circular buffer;
- channel interleaver: literal matrix;
- scrambler: bit-by-bit gold sequence;
- DFT and IFFT: floating point.

Each testbench prints `TB_RESULT checks=N failures=M`. Where a latency is
defined it is checked: CRC, turbo encoder, rate matcher, interleaver, scrambler
warm-up, DFT and IFFT. The testbenches use random back-pressure and random input
gaps.

The turbo encoder testbench also replays the thesis' K = 40 example. The
rate-matcher testbench includes its TBS = 16, rv = 2, G = 24 case.

`tb_npusch_tx` runs the whole chain at default parameters. It covers 9
transmissions:

- TBS from 16 to 2536;
- all four NSC values;
- BPSK and QPSK;
- all four redundancy versions.

It checks the scrambled bits entering the modulator exactly, and every output
sample within 6 LSB. It also counts the scrambler warm-up stall, DFT stall, IFFT
stall, <NULL> skipping, repetition and input gaps, and fails if any of them
never occurs.

To run a testbench with Verilator:

```
verilator --binary --timing -Irtl -Itb -y rtl -y tb \
    rtl/npusch_pkg.sv tb/npusch_ref_pkg.sv tb/tb_npusch_tx.sv --top-module tb_npusch_tx
./obj_dir/Vtb_npusch_tx
```

The end-to-end run takes under a second of simulation time after about 20 s of
compilation.
