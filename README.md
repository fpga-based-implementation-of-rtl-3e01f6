# Single-ROM linear-interpolation DDFS

A direct digital frequency synthesizer (DDFS) turns a phase that grows by a
fixed step every clock into sine samples. Storing the sine itself takes a
large table: a 15-bit phase and a 14-bit output need a 2^13 x 14 ROM even
after quarter-wave folding. Linear interpolation cuts the table down. The
first quadrant is split into s = 32 equal segments, and each segment is drawn
as a straight line `c_i + m_i * (x - x_i)`. The usual form of this method keeps
two small ROMs, one for the slopes `m_i` and one for the start values `c_i`.

This design keeps only the slope ROM. Because the segments have equal width,
the start value of a segment is the sum of the slopes of all segments before
it:

    c_i = (m_0 + m_1 + ... + m_{i-1}) / s

The phase walks through the segments in order, one at a time. An accumulator
can therefore build `c_i` on the fly by adding one slope every time the phase
enters a new segment. The second ROM becomes an 11-bit accumulator, a 5-bit
comparator and a few gates. The only memory left is 32 words of 6 bits
(192 bits). Measured against a 2^13 x 14 bit sine table, that is a 597:1
reduction.

## Datapath

```
FIW --> phase accumulator (24 b) --15 MSBs--> quadrant fold --+-- addr (5 b) --> slope ROM --m (6 b)--+
                                               |   |          |                       |              |
                                             MSB1 MSB2        |        segment comparator --En--+    |
                                               |   |          |                                 v    v
                                               |   +----------|-------------------------> slope integrator --c (11 b)
                                               |              +-- x (8 b) ---------+                 |
                                               |                                   v                 v
                                               |                        multiply-add: round((256 c + m x) / 32)
                                               |                                   | 14 b
                                               +---------------------------> sign stage --> sample (15 b, signed)
```

| Symbol | Meaning | Default |
|---|---|---|
| M | phase accumulator width | 24 |
| L | phase bits used for the sine | 15 |
| A | segment address bits, log2(s) | 5 |
| B | offset bits within a segment, L-2-A | 8 |
| N | slope word length | 6 |
| D | slope accumulator width, N + A | 11 |
| P | output magnitude bits, L-1 | 14 |

The sample is signed and P+1 = 15 bits wide.

1. **Phase accumulator** (`phase_accumulator`). Adds FIW every clock, modulo
   2^24. The output frequency is `Fout = FIW * fclk / 2^24`. Only the top 15
   bits go on.
2. **Quadrant fold** (`quadrant_folder`). MSB1 marks the negative half period.
   MSB2 marks the falling quarter of each half. In the falling quarters the
   13 low bits are inverted (one's complement), so the phase runs backwards
   over the first-quadrant curve. The folded 13 bits split into a 5-bit
   segment address and an 8-bit offset x.
3. **Slope ROM** (`slope_rom`). 32 words of 6 bits, read combinationally.
4. **Segment comparator** (`segment_comparator`). Keeps the address of the
   previous clock. It raises En when the current address differs from it.
5. **Slope integrator** (`digital_integrator`). Holds `c_i`, as explained in
   the next section.
6. **Multiply-add** (`multiply_add`). Computes `256*c + m*x`, 19 bits at full
   precision, and rounds it to 14 bits.
7. **Sign stage** (`output_complementer`). Negates the magnitude when MSB1 is
   set.

`ddfs_top` wires these blocks together. `ddfs_pkg` holds the default sizes,
the real slope values and the function that quantizes them.

## The slope integrator

This block replaces the start-value ROM, and most of the design's subtlety is
here.

**What it holds.** The register holds the sum of the slope codes of all
segments below the current address:

    c(addr) = m_0 + ... + m_{addr-1}

The multiply-add shifts it left by B = 8 bits, which is the same as dividing
by s in the formula above. The shift is only wiring.

**Rising address** (MSB2 = 0, quadrants 1 and 3). When the address goes from
i-1 to i, the slope to add is m_{i-1}, the slope of the segment just left. The
ROM already shows m_i, so the integrator takes m_{i-1} from a one-clock delay
register on the ROM output.

**Falling address** (MSB2 = 1, quadrants 2 and 4). When the address goes from
i+1 to i, the new value is `c_{i+1} - m_i`. Here the slope needed belongs to
the new address, which the ROM shows in that same clock. The live ROM word is
used.

**Subtraction without a +1 adder.** The selected slope is zero-extended from
6 to 11 bits and XORed with MSB2, which gives its one's complement when
falling. MSB2 also drives the adder's carry-in. Together these form the two's
complement. Without the 5 zero bits on top the negative step would not be
possible.

**Same-clock result.** On a transition the new sum is sent to the multiply-add
in the same clock as it is written to the register. So the first sample of
every segment already uses the right `c`. The sample output is combinational
from the phase register, the integrator register and the ROM.

**Quadrant edges need no special case.** At pi/2 the folded address is 31 on
both sides of the edge. At pi it is 0 on both sides. The sum therefore runs up
to `c_31` and back down to 0 without being reset. MSB2 of the current phase
is always the right direction, because a segment change never falls in the
same clock as a quadrant change.

**Frequency limit.** The integrator can take at most one step per clock, so
the phase may cross at most one segment boundary per clock:

    FIW <= 2^(M-L+B) = 2^17        (Fout <= fclk / 128)

An assertion in `segment_comparator` reports any address jump larger than one.
Above this limit the output is wrong. This follows from the accumulator
principle, not from the word lengths. The published results include a tone at
0.124 fclk, and this structure cannot produce it.

**Reset.** An asynchronous, active-low `rst_n` clears the phase, the
comparator's stored address and the sum. This matches phase 0 in segment 0.

## Slope table

The slopes are the least-squares-optimal slopes of `sin(theta)` over
[0, pi/2], in radians per radian. They are held as reals in `ddfs_pkg` and
turned into codes at elaboration:

    m_q[i] = floor((2^N - 1) * m_i + 0.5)

For N = 6 the codes are:

```
63 63 63 62 61 61 60 59 58 56 55 53 52 50 48 46
43 41 39 36 34 31 28 26 23 20 17 14 11  8  5  1
```

They sum to 1287, which fits the 11-bit integrator.

The scale is 2^N - 1 rather than 2^N for a reason. Rounding on 2^N would give
64 for the first three slopes, which does not fit 6 bits. The published
6-bit table uses the 63 scale, and it is followed here. The arithmetic still
treats a code as a fraction of 64, so the whole wave is smaller by 63/64.

## Multiply-add with early truncation

The sum `256*c + m*x` is 19 bits, and only its top 14 bits are kept, with
round-half-up. The low 8 bits of `256*c` are zero, so the adder is split into
three short sections. The multiplier's 4 lowest product bits are never used.

| Output bits | Inputs | Adder |
|---|---|---|
| [2:0] | product[7:5] plus product[4] (the rounding bit) | 3 half adders |
| [8:3] | c[5:0] + product[13:8] + carry | 6 full adders |
| [13:9] | c[10:6] + carry | 5 half adders |

The result is exactly `floor((256 c + m x + 16) / 32) mod 2^14`. The module is
written for general N, B, D and P, so the section widths follow the
parameters.

## Output level and accuracy

The slopes are radian slopes, but the hardware counts a quadrant as 2^13
phase steps. So the peak sample is about `2^14 * (2/pi) * (63/64)`, which is
10296, not full scale. If the DAC needs full scale, put a constant gain after
the sign stage. No such gain is built in.

Over one period the samples stay within 34 LSB of
`63/64 * 32768/pi * sin(theta)`. Most of that error is the sum of the slope
rounding errors, which grows along the quadrant.

Spectral purity was measured over one full period at FIW = 2^9. That is 32768
clocks, with every phase value visited once.

* The spurs from the segmentation itself, at harmonics 4s-1 = 127 and
  4s+1 = 129, are at -84.1 and -84.5 dBc. This matches the theoretical bound
  for 32 segments, `20 log10(1 + 16 s^2)`, about 84.2 dB.
* The largest spur is the 3rd harmonic at **-69.58 dBc**. It comes from the
  rounding errors of the independently rounded 6-bit slopes, which add up
  along the running sum. The published figure for 6 bits is 82.8 dBc, and
  this RTL does not reach it.
* A sweep over N = 4..8 gives 63.6, 59.1, 69.6, 78.6 and 74.4 dBc.

Even harmonics are exactly zero because the wave is half-wave antisymmetric.

## Where this RTL departs from the published design

* **Falling steps use the live ROM word.** The published block diagram feeds
  the integrator only from the delay register on the ROM output. That gives
  the wrong slope whenever the address falls.
* **Same-clock result.** Without it, the first sample of every segment would
  use the previous segment's start value.
* **Slope scale.** The quantization formula is stated with 2^N, but the
  published 6-bit table uses 2^N - 1. This RTL follows the table.
* **Single-segment stepping.** The design asserts FIW <= 2^17, a limit the
  published text does not state.
* **Design-specific choices.** There is no frequency register in front of the
  phase accumulator and no output register. The reset is asynchronous and
  active low.
* **DAC and reconstruction filter.** These are analog and not included. The
  15-bit signed sample is the top-level output.

## Files

| File | Contents |
|---|---|
| `rtl/ddfs_pkg.sv` | default sizes, real slopes, quantization function |
| `rtl/ddfs_top.sv` | the synthesizer |
| `rtl/phase_accumulator.sv`, `quadrant_folder.sv`, `slope_rom.sv`, `segment_comparator.sv`, `digital_integrator.sv`, `multiply_add.sv`, `output_complementer.sv` | its blocks |
| `tb/tb_ref_pkg.sv` | integer reference model shared by the testbenches |
| `tb/tb_<block>.sv` | one self-checking testbench per block |
| `tb/tb_ddfs_top.sv` | end-to-end test at default sizes |
| `tb/tb_ddfs_sfdr.sv` | one-period spectrum at default sizes |
| `tb/tb_ddfs_wordlength.sv` | N = 4..8 sweep |

Every testbench ends with a line `TB_RESULT checks=<n> failures=<n>`.

`tb_ddfs_top` runs four scenarios, all at the default sizes:

* FIW = 2^17, the largest legal step, for two periods; the second period is
  checked against the first.
* FIW = 4065 for one full period.
* 40000 clocks of random FIW values, changed every 2000 clocks.
* A reset in mid-wave.

In every clock it compares the sample and the En flag with the reference. It
also counts rising and falling integrator steps, entries into each quadrant,
negative samples, FIW changes and resets, and it fails if any of them never
occurs.

## Simulating

With Verilator 5, from the directory that holds `rtl/` and `tb/`:

```
verilator --binary --timing --assert -Irtl -Itb -y rtl -y tb +libext+.sv \
    rtl/ddfs_pkg.sv tb/tb_ref_pkg.sv tb/tb_ddfs_top.sv --top-module tb_ddfs_top
./obj_dir/Vtb_ddfs_top
```

To run another test, change the testbench file and the top-module name.
`tb_ddfs_wordlength` does not need `tb_ref_pkg.sv`. Each test runs in about a
second.

## Changing the design

* **N** (slope bits) can be changed, with D = N + 5. The ROM contents follow
  automatically. `multiply_add` needs `1 <= D + B - P < B`.
* **M** can be changed freely. The frequency limit then becomes
  FIW <= 2^(M-L+B).
* **A** must stay 5. Only the 32-segment slope set exists. A 64-segment
  version would need its own optimal slopes and D = 12.
* **L and P** set B = L-2-A. If you change them, keep P = L-1 and check the
  `multiply_add` condition.
