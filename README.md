# Direct digital frequency synthesizer with a pipelined 24-bit accumulator and a "memoryless" sine ROM

A direct digital frequency synthesizer (DDFS) makes a sine wave from a clock.
Each clock it adds a frequency control word (FCW) to a phase register and turns
the phase into a sine sample. The output frequency is

    f_out = FCW * f_clk / 2^24

so FCW = 0x0EFFFF at 125 MHz gives 7.324 MHz.

This design has two ideas, one on each side of the phase word:

* **The phase accumulator is pipelined in 8-bit slices.** Each slice uses a
  carry look-ahead adder. The slices are lined up by delaying a single
  *load-enable bit* instead of delaying the FCW data bits ("shifted clocking").
* **The sine lookup stores no table.** The quarter-wave sine is split by angle
  into three 4-bit segments, A, B and C. Each segment's small sine table is
  written as two-level AND/OR logic, much like a seven-segment decoder. There
  are no storage registers and no read multiplexers.

Sizes: 24-bit accumulator, 14-bit phase word, 12-bit quarter-wave address,
12-bit output code.

```
            fcw[23:0], fcw_load
                  |
   +--------------v---------------+   phase[13:0]  +------------------------------+
   | phase_accumulator            |--------------->| quarter_wave_pac             |--> dac_code[11:0]
   |  shifted_clock (3 DFFs)      |                |  address fold (bit 12)       |    (offset binary,
   |  3 x { FCW reg, cla8, acc }  |                |  compressed_rom              |     to external DAC)
   |  carry DFFs, 6-bit align reg |                |    sin A / cos A / sin B /   |
   +------------------------------+                |    sin C logic, 2 mult, 2 add|
                                                   |  sign fold (bit 13)          |
                                                   +------------------------------+
```

## Phase accumulator (`phase_accumulator`, `shifted_clock`, `cla8`)

The 24-bit accumulator is cut into three 8-bit stages. Each stage has:

* an 8-bit FCW input register;
* an 8-bit carry look-ahead adder;
* an 8-bit accumulator register that feeds back into the adder.

A stage's carry out goes through one flip-flop and enters the next stage on
the next clock. Stage 0 has its carry input tied to 0. No carry ever ripples
through more than 8 bits in one cycle.

**How the pipelining skews the phase.** Stage *k* holds its byte of a given
phase step *k* cycles after stage 0 held its own byte of that step. Two things
follow:

* **Output alignment.** The phase word is bits 23:10, that is all 8 bits of
  stage 2 and the top 6 bits of stage 1. Stage 1 is one step ahead of stage 2,
  so its 6 bits go through a 6-bit register first. Then all 14 output bits
  belong to the same step.
* **FCW loading (shifted clocking).** A new FCW must reach stage *k* exactly
  *k* cycles after it reaches stage 0. Without that, the FCW change would tear
  the phase for a few cycles. A conventional design delays the FCW bits
  through triangular preskew registers: N(L+1)/2 = 48 flip-flops for
  N = 24, L = 3. Here the FCW bits are not delayed. `shifted_clock` delays one
  strobe through a chain of L flip-flops, and tap *k* enables the FCW register
  of stage *k*. That costs N + L = 27 flip-flops.

The price is a usage rule. Hold `fcw` stable for three cycles after the
`fcw_load` pulse, because the input registers read it one, two and three
cycles after the pulse.

**Timing.** Call the edge that samples `fcw_load` edge j0.

* The first `phase` value that contains the new FCW appears after edge j0 + 4.
* From then on, `phase` moves by the FCW every cycle (to 14-bit resolution).
* After reset, the FCW registers and the accumulator are zero.

**The adder (`cla8`).** Each bit pair goes through a half adder:
g = x & y, p = x ^ y. The carries are formed in three look-ahead groups:

| Group | Bits | Carries produced | Produced from |
|---|---|---|---|
| 1 | 0–2 | C1–C3 | Cin |
| 2 | 3–5 | C4–C6 | C3 |
| 3 | 6–7 | C7, Cout | C6 |

Each group is two gate levels deep. So the slowest path is
Cin → C3 → C6 → Cout: from bit 0 to Cout that is the half adder plus three
AND–OR pairs, 7 gate levels. The sums are S_i = p_i ^ C_i. The gate-level netlist is
left to synthesis.

## Amplitude path (`quarter_wave_pac`, `compressed_rom`, `memless_rom_sin{a,b,c}`)

### Quarter-wave folding

The phase word splits into three fields:

| Bits | Role |
|---|---|
| 13 | half period (sign) |
| 12 | odd or even quarter |
| 11:0 | 12-bit quarter-wave address |

In the 2nd and 4th quarters, bit 12 inverts the address bit by bit. This reads
the quarter backwards. In the 2nd half period, bit 13 inverts the 11-bit
magnitude. The output is a 12-bit offset-binary code:

    dac_code = {~sign, mag ^ {11{sign}}}    (2048 + mag, or 2047 - mag)

Only XOR gates are needed, no negating adder. The address inversion is exact
because the sine is sampled at half-step positions, angle ∝ (address + 1/2),
so the inverted address lands on the mirror angle. That half step is built
into the sin C table (see below).

### Angular decomposition

The 12-bit address splits into three 4-bit fields, A = [11:8], B = [7:4] and
C = [3:0]. The angle is θ = A + B + C, with B and C small. Then

    sin θ ≈ sin A + cos A · sin B + cos A · sin C

All values are scaled by 2^11 − 1 = 2047:

| Table | Value | Output width | Range |
|---|---|---|---|
| sin A | round(2047 · sin(π/2 · a/16)) | 11 bits | 0 … 2037 |
| sin B | round(2047 · sin(π/2 · b/256)) | 8 bits | 0 … 188 |
| sin C | round(2047 · sin(π/2 · (c + ½)/4096)) | 4 bits | 0 … 12 |
| cos A | sin A table read at address 15 − a = cos(π/2 · (a+1)/16) | 11 bits | |

Each product is scaled back by dropping its low 11 bits. The datapath is:

* the four table outputs, feeding two multipliers;
* three registers: sin A, cos A·sin B and cos A·sin C;
* two adders;
* an output register.

So `mag` shows the magnitude of the address applied two clock edges earlier.
An assertion checks that the sum never exceeds 11 bits (its maximum is 2037).

### "Memoryless" tables

Each table bit is a sum of products of the four address bits, minimised by
Karnaugh map. In the code, the address bits are named x[0]..x[3] with x[0] the
most significant. With that naming, the two most significant bits of sin A are

    A10 = x0 + x1·x2
    A9  = x1·~x2 + x0·x3 + x2·(x0 + ~x1·x3)

All other bits of sin A, sin B and sin C were minimised the same way.
`tb_memless_rom_sin*` checks every word against the table formulas above,
computed in floating point.

### Accuracy

The decomposition has a limited accuracy:

* The largest error of the quarter-wave magnitude against
  2047 · sin(π/2 · (addr+½)/4096) is 11.3 LSB.
* Over a full period, the signal-to-noise ratio of the output against an
  ideal sine is about 48 dB. `tb_quarter_wave_pac` prints it.

Two approximations cause most of the error:

* cos(B + C) is taken as 1.
* cos A is taken at the end of the A segment rather than at its start.

Even with an exact cos A, the formula stays near 55 dB. The 68 dB measured on
the source description's FPGA prototype is therefore **not** reached by this
formula as written. If spectral purity matters, consider these changes:

* a finer cos A (for example a separate cos table at the segment midpoint);
* a cos(B) correction term;
* rounding instead of truncating the products.

### Size and speed

The source design reports 161 gates for the three logic tables
(76 + 57 + 28) and 144 MHz on a Cyclone III FPGA. The equations here were
minimised independently, so their gate counts need not match. Timing on a
target technology has not been evaluated: only function is verified.

## Where this implementation makes its own choices

* **cos A.** The source describes cos A as "the complement of sin A values"
  XORed with logic high. Complementing the 11-bit sin A *word* gives
  2047 − sin A, which is not a cosine (about 33 dB SNR). Here the XOR with
  logic high is applied to the 4-bit *address* of a second copy of the sin A
  logic. The source claims a single sin A sub-ROM, but this choice needs a
  second copy of it.
* **Table scale.** 2047 (11 bits) is used, matching the 11-bit buses and the
  published A10/A9 equations. A 2^12 − 1 scale also appears in the source's
  formulas but fits neither.
* **sin C width.** 4 bits (C3..C0). The source's stored-bit total for ROM C
  would imply 5-bit words, but the largest value (12) fits in 4.
* **Half-LSB offset.** All of it sits in the sin C table. It is not spread
  over sin A and sin B, because the published sin A equations match values
  without an offset.
* **FCW register of stage 0.** In the source diagram it is clocked every
  cycle. Here it is enabled by the first shifted-clocking flip-flop, so the
  three stages load exactly one cycle apart. The set input drawn on that
  flip-flop has no stated purpose and is left out.
* **Interface details.** The output code format (offset binary), the reset
  (asynchronous, active low, clears everything), product truncation, and the
  3-cycle FCW hold rule are not specified by the source.
* **Not included.** The external 14-bit DAC and its low-pass filter. The
  conventional preskewed accumulator and the register-based sub-ROMs are
  comparison baselines only.

## Files

| File | Contents |
|---|---|
| `rtl/ddfs_pkg.sv` | shared widths |
| `rtl/ddfs_top.sv` | top level: accumulator → converter |
| `rtl/phase_accumulator.sv` | pipelined 24-bit accumulator (parameters `N`, `OUT_BITS`; N a multiple of 8) |
| `rtl/shifted_clock.sv` | load-enable flip-flop chain |
| `rtl/cla8.sv` | 8-bit carry look-ahead adder |
| `rtl/quarter_wave_pac.sv` | quadrant folding around the compressed ROM |
| `rtl/compressed_rom.sv` | sin A + cos A·sin B + cos A·sin C datapath |
| `rtl/memless_rom_sina.sv`, `..._sinb.sv`, `..._sinc.sv` | the three logic "ROMs" |
| `tb/tb_*.sv` | one self-checking testbench per module |
| `tb/ddfs_ref_pkg.sv` | floating-point reference model shared by the testbenches |

## Simulating

Each testbench prints `TB_RESULT checks=<n> failures=<m>` and stops itself. It
also has a watchdog that fails the run if it hangs. Example with Verilator 5:

    verilator --binary --timing --assert -Wno-fatal --timescale 1ns/1ps -Irtl -Itb -y rtl -y tb \
        rtl/ddfs_pkg.sv tb/ddfs_ref_pkg.sv tb/tb_ddfs_top.sv --top-module tb_ddfs_top
    ./obj_dir/Vtb_ddfs_top

What each testbench covers:

| Testbench | Checks |
|---|---|
| `tb_cla8` | all 2^17 input combinations |
| `tb_shifted_clock` | random strobes |
| `tb_phase_accumulator` | against a plain 24-bit accumulator, with FCW changes on the fly |
| `tb_memless_rom_sin*` | every word |
| `tb_compressed_rom` | all 4096 addresses |
| `tb_quarter_wave_pac` | all 16384 phases, plus SNR |
| `tb_ddfs_top` | whole design at full size: exact phase and output codes against the reference model for about 55 000 cycles |

`tb_ddfs_top` also:

* measures the output frequency of FCW = 0x0EFFFF (2344 periods in 40 000
  clocks, i.e. 7.325 MHz at 125 MHz);
* counts FCW loads, inter-stage carries, accumulator wrap-around and all
  quadrants, and fails if any of them never happens.
