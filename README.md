# Five-channel MPEG-2 layer II audio encoder: an ASIP with two hardwired accelerators

The encoder must finish a 1,152-sample frame of five audio channels within
648,000 clock cycles: a 27 MHz system clock at a 48 kHz sample rate gives
562.5 cycles per sample. On a single RISC-style processor the work comes to
roughly 2.3 million cycles per frame. No one kind of engine suits all of it:

* The **transforms** are regular and heavy. These are the 32-band analysis
  filterbank of the five input channels and the 1,024-point FFT of the seven
  psychoacoustic channels (five inputs plus two downmixed channels).
* The **decisions** are irregular and change with the standard's
  recommendations. These are the psychoacoustic model, bit allocation,
  quantization and bitstream packing.

This design therefore splits the encoder into three modules:

| module | kind | work per frame |
|---|---|---|
| `fft_module` | hardwired, FSM-controlled | 7 x 1,024-point FFT + power spectrum |
| `af_module` | hardwired, FSM-controlled, two MACs | 5 x 36 blocks of polyphase analysis |
| `dsp_module` | application-specific instruction-set processor (ASIP) | psychoacoustic model, matrixing, scale factors, bit allocation, quantization, packing |

The DSP is the master. It starts the two accelerators by command and waits for
them. Data moves only through two memories, never through the DSP's registers:

* A **two-bank spectrum memory** (`bank_memory`) between the FFT module and
  the DSP.
* A **shared subband memory** (`subband_memory`) of 8,064 words
  (1,152 x 7 channels) between the AF module and the DSP.

`audio_encoder_top` wires the five blocks together.

## How a frame is scheduled

The hardware does not fix the frame schedule. The DSP program sets it, and the
hardware is arranged so that the following schedule needs almost no waiting:

```
cycles ->   0        45k       90k      ...                 ~320k             648k
FFT    :  [FFT ch0][FFT ch1][FFT ch2] ... [FFT ch6]
DSP    :           [PAM ch0][PAM ch1] ...          [PAM ch6][ others: matrixing,
                                                             scf, bit alloc, quant, pack ]
AF     :  [AF ch0 .. ch4  (in parallel, ~102k cycles)]
```

* **FFT and psychoacoustic model form a two-stage pipeline.** The FFT module
  writes the spectrum of channel *c+1* into one bank while the DSP analyses
  channel *c* in the other. When both are done the DSP issues `SWAP` and the
  banks exchange roles, so no data is copied. The FFT takes 44,034 cycles per
  channel, so the DSP has about the same time for each channel's model.
* **The filterbank runs in parallel with both.** Its output is needed only by
  the tasks at the end of the frame (matrixing onward), which begin after the
  last AF command. The DSP therefore never reads subband memory while the AF
  module writes it, and the memory needs no arbitration.
* After the seventh FFT the DSP runs the remaining tasks straight from subband
  memory. It writes the two downmixed channels into slots 5 and 6 and sends
  the packed words out through `bs_valid / bs_data / bs_ready`.

The end-to-end testbench runs this schedule with a small DSP program. The
frame takes 319,316 cycles from `run` to `HALT`. That program only does a
spectral peak search, a masking-style value and a downmix, not the real
encoder software (see *What is not included*).

## The DSP module (ASIP)

The DSP is a single-issue processor that executes one 32-bit instruction per
clock. It has sixteen 32-bit registers (`r0` reads as zero) and a program
memory of 1,024 words. The host loads the program through `prog_*` while the
DSP is halted; a `run` pulse starts it at address 0.

The datapath holds four units:

* an ALU;
* a 32x32 multiplier;
* a multiply-accumulate unit (`mac_unit`, 64-bit accumulator);
* the single-cycle `log_pow_unit`.

Instruction fields are `[31:26]` opcode, `[25:22]` rd, `[21:18]` ra, `[17:14]`
rb and `[15:0]` a signed immediate (rb and the immediate overlap). The
functions `asm_r` and `asm_i` in `enc_pkg` assemble instructions.

| group | instructions | effect |
|---|---|---|
| ALU | `ADD SUB AND OR XOR` rd,ra,rb; `ADDI` rd,ra,imm; `SHL SRA SRL` rd,ra,imm; `LDI` rd,imm; `LUI` rd,imm | the usual; `LUI` sets the upper half and keeps the lower |
| multiply | `MUL` rd,ra,rb | low 32 bits of the signed product |
| MAC | `MACLD` rd,ra,rb / `MAC` -,ra,rb / `MACRD` rd,imm | acc = r[rd] + r[ra]*r[rb] / acc += r[ra]*r[rb] / rd = acc >>> imm |
| log/pow | `LOG` rd,ra / `POW` rd,ra | 10·log10 and 10^(x/10), one cycle |
| memories | `LDBK` rd,ra,imm / `LDSB` rd,ra,imm / `STSB` rd,ra,imm | read a spectrum line / read or write a subband sample at r[ra]+imm |
| system | `FFTGO`; `AFGO` -,ra,n; `WAIT` mask; `SWAP`; `OUT` ra | start the FFT; filter n blocks of channel r[ra]; stall while FFT (bit 0) / AF (bit 1) is busy; swap the spectrum banks; emit a word |
| control | `BEQ BNE BLT` rd,ra,imm; `JMP` imm; `HALT` | branches compare r[rd] with r[ra] (BLT signed) and add imm to the PC |

Four instructions stall the processor: `FFTGO` and `AFGO` while their target
is busy, `WAIT` while a selected module is busy, and `OUT` while `bs_ready`
is low. Bank and subband reads are combinational, so a load completes in its
own cycle.

`MACLD` evaluates the piecewise-linear masking function `a*dz + b` in one
instruction. The model's individual thresholds can then be converted with
`POW` and summed in registers, with no round trip through memory.
`tb_masking_threshold` runs this kernel for a 126-index threshold grid and
eight maskers. An in-range masker/index pair costs 14 to 20 instructions:
the segment search, the two operand loads, `MACLD`, `MACRD`, `POW` and the
add. A masker that lies outside the -3 to +8 Bark range of the masking
function is skipped in 5 to 7. The whole grid takes 11,804 cycles, against
a budget of 28,000 for the masking-threshold steps.

The instruction set, its encoding, the register count and the load/run
protocol are this design's own. The architecture asks only for an ASIP with an
ALU, a multiplier, a MAC, the log/pow unit, master control of the
accelerators, bank switching and a bitstream output.

## The log_pow unit

The psychoacoustic model converts between linear power and decibels
thousands of times per frame. This unit does either conversion in one cycle,
from tables plus an adder or a shifter. It uses two number formats:

* linear power: 32-bit unsigned;
* level: signed 8.8 (8 integer bits, 8 fractional bits) in dB.

**LOG** computes `y = 10·log10(x)`. It writes `x = m·2^e` with `m` in
[0.5, 1):

1. A lead-one detector finds the position `p` of the leading one, so
   `e = p + 1`.
2. The 8 bits below the leading one address a 256-entry `manti_table` that
   holds `10·log10(m)`, taken at the middle of each interval.
3. `p` addresses a 32-entry `expo_table` that holds `(p+1)·10·log10(2)`.
4. The two entries are added.

The error stays below 0.02 dB. `x = 0` returns -128 dB (`16'h8000`).

**POW** computes `y = 10^(x/10) = 2^(I+f)`:

1. The 8.8 input is multiplied by `log2(10)/10`, held in 0.16 format. This
   gives the exponent in 16.16 format.
2. The top 10 bits of the fraction `f` address a 1,024-entry `pow_table` that
   holds `2^f` in 1.15 format.
3. A scaler shifts that entry by the integer part `I`.

Results are within 0.2 % or 2 LSB. `I > 31` saturates to all ones, and very
small values give 0.

All tables are computed at elaboration from their formulas.

## The FFT module

After `start` the module works in three phases:

1. **Load.** It accepts 1,024 PCM samples from its valid/ready stream and
   stores them bit-reversed in a complex working memory: 1,024 x (24+24) bits,
   holding the PCM value shifted left by 8.
2. **Transform.** It runs ten radix-2 decimation-in-time stages in place, one
   butterfly every 8 cycles:

   ```
   RD_A, RD_B   read A and B            (registered memory read)
   M0..M3       Tr = Br·cos + Bi·sin    (one multiplier, an adder)
                Ti = Bi·cos − Br·sin    (the same multiplier, a subtractor)
   WR_A, WR_B   A' = (A+T)/2, B' = (A−T)/2   (two adder/subtractors)
   ```

   Each stage halves its results, so the output is `X(k)/N` and cannot
   overflow. The twiddles are 16-bit Q2.14 values computed at elaboration.
3. **Power spectrum.** For k = 0..511 the same multiplier forms
   `Re² + Im²`. The result is written to the bank memory as a 32-bit
   unsigned line equal to `|X(k)/N|²` in squared PCM units.

A run takes 1,024 + 5,120·8 + 512·4 + a few cycles, or 44,034 in total. That
fits the 45,000-cycle budget per channel. The module applies no analysis
window: the input stream is expected to be windowed already.

## The AF module

A command `(start, cmd_ch, cmd_nblk)` filters `cmd_nblk` blocks of 32 samples
of one channel. A full frame is 36 blocks. Each channel keeps its own
512-sample circular history, so consecutive commands on a channel continue
where the last one stopped. The histories are cleared after reset, which takes
2,560 cycles with `busy` high.

Each block runs in five phases:

1. **Input.** 32 new samples enter the history.
2. **Windowing.** `Y[i] = Σ_{j=0..7} C[i+64j]·X[i+64j]` for i = 0..63. MAC 0
   computes `Y[i]` while MAC 1 computes `Y[i+32]`, 256 cycles in all.
3. **Folding.** The standard matrixing is
   `S[k] = Σ_{i=0..63} cos((2k+1)(i−16)π/64)·Y[i]`. The cosine is even, and
   `cos(π(2k+1) − a) = −cos(a)`, so this is a 32-point cosine transform

   ```
   S[k] = Σ_{m=0..31} cos((2k+1)mπ/64)·Z[m]
   Z[0] = Y[16]
   Z[m] = Y[16+m] + Y[16−m]   m = 1..16
   Z[m] = Y[16+m] − Y[80−m]   m = 17..31        (Y[48] has a zero coefficient)
   ```

   An adder/subtractor forms the 32 values `Z[m]`, one per cycle.
4. **Fast DCT, additions.** The transform uses Lee's recursive splitting,
   unrolled into levels. Each level works on blocks of M words (M = 32, 16,
   8, 4). The even inputs `a[2n]` go to the lower half of the block. The sums
   `a[2n+1] + a[2n−1]` go to the upper half; for n = 0 that is `a[1]` alone.
   Each level takes 32 cycles, one word per cycle.
5. **Fast DCT, butterflies.** Five levels follow, M = 2, 4, 8, 16, 32. In
   each block of M words, `g` is from the lower half and `h` from the upper
   half. The butterfly computes

   ```
   t          = h · 1/(2·cos((2k+1)π/(2M)))     k = 0..M/2−1
   out[k]     = g + t
   out[M−1−k] = g − t
   ```

   Every level has 16 butterflies, so the transform needs 80 multiplications.
   With the 49 input additions and 160 butterfly additions it needs 209
   additions. The 31 additions of the folding come on top.
   MAC 0 forms `t`, and the adder and subtractor finish the butterfly in
   the next cycle. That gives one butterfly per cycle and 17 cycles per
   level.

The words of each level sit in one of two 32-word scratch banks. The next
level writes the other bank. Scratch words are 48 bits with 16 fractional
bits. The 80 factors are computed at elaboration as 32-bit values with 24
fractional bits.

A block takes 567 cycles and a five-channel frame 102,060 cycles. The
budget is 350,000. Subband `k` of block `b` of channel `c` goes to address
`c·1152 + b·32 + k` in subband memory as a 24-bit value: PCM units with 8
fractional bits, saturated.

The 512 window coefficients `C[i]` are not built in. They are written through
the `coef_*` port as 16-bit values with 19 fractional bits, which covers the
range of the standard's analysis window. The testbenches use a Hann-windowed
sinc as a stand-in.

## Memories

* **`bank_memory`:** 2 x 512 x 32 bits. The FFT side writes the bank shown
  by `wr_bank`, and the DSP side reads the other bank combinationally. A
  `swap` pulse exchanges them; after reset the FFT writes bank 0. An
  assertion in the top checks that the DSP never swaps while the FFT is
  writing.
* **`subband_memory`:** 8,064 x 24 bits, for channels 0 to 6 at
  `channel·1152`. Port A (AF) only writes. Port B (DSP) reads combinationally
  and writes on the clock edge, and wins a same-address collision.

## What is not included, and where the design departs

* **The DSP software is not included.** The encoder tasks that run on the DSP
  are missing: psychoacoustic model 1, matrixing into Lo/Ro, scale-factor
  coding, dynamic transmission-channel allocation, bit allocation,
  quantization and packing. The hardware provides everything those programs
  need, but the programs must be written for the instruction set above.
* **The analysis window table is not built in.** The standard's table must
  be loaded through `coef_*`.
* **The FFT has no built-in analysis window.** The psychoacoustic model's
  window, if required, has to be applied to the FFT input stream.
* **These are this design's own choices**, which the architecture leaves
  open:
  * the ISA, and the valid/ready streams and program-load port;
  * the word widths: 16-bit PCM, 24-bit FFT data and subband samples,
    Q2.14 FFT twiddles and DCT factors with 24 fractional bits;
  * truncating arithmetic, and the reset behaviour.

## Simulation

Every block has a self-checking testbench in `tb/`. Each prints
`TB_RESULT checks=N failures=M` and has a watchdog.

| testbench | what it checks |
|---|---|
| `tb_log_pow_unit` | LOG/POW against floating point on ~6,500 operands; zero, saturation, underflow, round trip |
| `tb_mac_unit` | random load/accumulate sequences against a reference sum |
| `tb_bank_memory` | fill/swap/read rounds, the DSP side reading the previous spectrum while the next is written |
| `tb_subband_memory` | whole-range fill, dual-port writes with collisions |
| `tb_fft_module` | all 512 power lines against a floating-point DFT, two frames (one with input gaps), ≤ 45,000 cycles |
| `tb_af_module` | every subband sample against the direct 64-term polyphase formula, history kept across commands, ≤ 1,944 cycles per block |
| `tb_dsp_module` | a program covering every instruction group, against modelled accelerators and random bitstream back-pressure |
| `tb_masking_threshold` | a DSP program for the global masking threshold (126 indices, 8 maskers; MAC for `a·dz + b`, POW per term, LOG per index) against floating point within 0.15 dB, every masking-function segment used, within 28,000 cycles |
| `tb_audio_encoder_top` | one full frame at full size (see the schedule above): tone lines and levels of all seven spectra, all 5,760 subband samples, the downmix, the 648,000-cycle deadline, and that each mechanism (bank swap, FFT/AF parallelism, FFT/DSP overlap, stalls, back-pressure, LOG/POW/MAC) occurs |

Run one testbench with Verilator 5 from the directory that holds `rtl/` and
`tb/`:

```
verilator --binary --timing --assert -Irtl -Itb -y rtl rtl/enc_pkg.sv \
          tb/tb_audio_encoder_top.sv --top-module tb_audio_encoder_top -o sim
./obj_dir/sim
```

The full frame simulates in well under a second. Lint a module with
`verilator --lint-only -Wall -Irtl -y rtl rtl/enc_pkg.sv rtl/<module>.sv`.
The only warnings are unused bits, unused package constants, and the reset
used both as an asynchronous reset and in assertion `disable iff` clauses.

## Files

| file | content |
|---|---|
| `rtl/enc_pkg.sv` | frame constants, number formats, DSP opcodes, assembler functions |
| `rtl/audio_encoder_top.sv` | the three modules and two memories wired together |
| `rtl/dsp_module.sv` | the ASIP |
| `rtl/log_pow_unit.sv`, `rtl/lead_one_detector.sv` | dB/linear conversion |
| `rtl/mac_unit.sv` | multiply-accumulate unit (two in the AF module, one in the DSP) |
| `rtl/fft_module.sv` | FFT and power spectrum |
| `rtl/af_module.sv` | analysis filterbank |
| `rtl/bank_memory.sv`, `rtl/subband_memory.sv` | the two communication memories |
