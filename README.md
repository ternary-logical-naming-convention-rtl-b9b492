# A ternary optical processor configured by standard operation names

A ternary optical computer represents a digit by the state of a light beam:
no light (D), horizontally polarized light (H) or vertically polarized light
(V). Its processor is an array of identical *processor bits*, each of which can
be set to any of the 3^9 = 19683 two-input ternary operations. Writing such an
operation as a 3x3 truth table is clumsy, so operations are given a compact
*standard name*: six column marks, each one octal digit. This RTL takes that
name literally as the configuration word of the hardware. A name goes in, is
checked, is translated into the control bits of six optical switching units,
and the processor bit then computes that operation.

On top of the processor sits the application that motivates it: carry-free
addition of modified signed-digit (MSD) numbers. Three adders of 14, 9 and 12
digits share one 192-bit processor, each built from five groups of processor
bits configured with four named operations (T, W, T', W'), and each pipelined
so that one addition enters per optical frame.

The optical devices (polarizers, liquid crystal cells, phototubes) are modelled
by their discrete effect on the three light states, so everything here is
ordinary synthesizable logic and can be simulated with Verilator.

## The standard name as a configuration word

The standard truth table lists rows (first input) and columns (second input)
in the order D, H, V. For each row the name gives two *marks*:

* the H mark: the set of columns where the output is H,
* the V mark: the set of columns where the output is V.

Every other cell outputs D. A mark is a 3-bit set with weight 1 for column D,
2 for column H and 4 for column V, so it is one octal digit. The name is the
six digits `[Hd Vd Hh Vh Hv Vv]`, rows D, H, V in turn, and in this RTL it is
simply an 18-bit octal literal (`ntr_t`, first row in the most significant
bits).

Example, the transfer operation T of MSD addition (digit 0 = D, -1 = H, 1 = V):

| row \ column | D | H | V | H mark | V mark |
|---|---|---|---|---|---|
| D | D | H | V | column H = 2 | column V = 4 |
| H | H | H | D | columns D,H = 3 | none = 0 |
| V | V | D | V | none = 0 | columns D,V = 5 |

so T is `18'o243005`. A name is *legal* when no column appears in both marks
of a row; each row then has 27 possible mark pairs, and there are 27^3 = 19683
legal names, one per operation. The value-feature part of a full name, which
says what the three symbols mean, is `D(0,-1,1)` for everything here and is
fixed in the digit-to-light mapping rather than carried in hardware.

`toc_pkg` holds the light-state type, the name and directive types, and the
names of the operations used:

| operation | name | use |
|---|---|---|
| T | `18'o243005` | MSD step 1 transfer, and step 3 sum |
| W | `18'o420110` | MSD step 1 weight |
| T' | `18'o002004` | MSD step 2 transfer |
| W' | `18'o241001` | MSD step 2 weight |
| S1, S2, J1/J2, J3 | `18'o203004`, `18'o060101`, `18'o601021`, `18'o400410` | operations of another MSD adder family, used by the tests only |

## How a processor bit computes a named operation

### The basic operation unit (`basic_op_unit`)

A unit has a main light path and a control path.

* Control path: the second input b is split three ways. Phototube g1 sits
  behind a V polarizer (high when b is V), g2 behind an H polarizer (high when
  b is H), g3 behind none (high when b is H or V). Selector S picks one tube by
  the directive bits {k2,k3}; code 00 selects none and S is low. An XOR gate Y
  inverts S when k1 is 1.
* Main path: light passes polarizer P1, a liquid crystal (LC) cell that
  rotates the polarization by 90 degrees or not, and polarizer P2. A high Y
  reverses the LC's static behaviour. The output is P2's polarization if the
  light gets through, D otherwise.

P1, P2 and the LC's static behaviour are fixed when a unit is built
(parameters). k1, k2, k3 are the reconfigurable part.

### Six units per bit (`processor_bit`)

Any operation needs at most six units: one per (row, output value) pair.

1. The main-path encoder lights one of three pixels with H light: the pixel
   of the value the first input a has. The other two pixels are dark.
2. Each pixel feeds two units, both controlled by b. The H unit (P1=H, P2=H,
   LC rotating when static) emits H exactly when its Y is high. The V unit
   (P1=H, P2=V, LC straight when static) emits V exactly when its Y is high.
3. The six outputs land on one output pixel. D adds nothing, so the result is
   the one non-dark light, or D.

For the lit row, the H unit must shine exactly when b is in the row's H mark,
and the V unit when b is in its V mark. Each unit therefore needs the (k1, S)
pair that makes Y equal to "b is in this mark". `ntr_translator` holds that
table:

| mark | columns | S | k1 |
|---|---|---|---|
| 0 | none | none | 0 |
| 1 | D | g3 | 1 |
| 2 | H | g2 | 0 |
| 3 | D, H | g1 | 1 |
| 4 | V | g1 | 0 |
| 5 | D, V | g2 | 1 |
| 6 | H, V | g3 | 0 |
| 7 | D, H, V | none | 1 |

k1 is simply bit 0 of the mark (column D is in the set). Thus the 18 bits of a
name map one-to-one onto the 18 directive bits of a processor bit. The
translator also flags names whose marks overlap. With such a name, H and V
could reach the output together. That is not a light state: the bit outputs D
and raises `conflict`.

### The processor (`optical_processor`)

`N_BITS` (192) processor bits run in parallel on a main-path data frame and a
control-path data frame. The decoder is a register that samples every output
on a clock edge with `frame_en` high. Bit i's directive comes from
`reconfig_unit`.

## Configuring: the reconstructed frame (`reconfig_unit`)

The host configures calculators by sending entries of the form {name, first
bit, last bit}, one per cycle. The unit translates the name once and writes
the directives of every bit in the inclusive range. An entry is refused, and
nothing is written, when the name is illegal or the range is empty or runs
past the last bit. `cfg_accept` or `cfg_reject` pulses in the next cycle.
After reset every bit holds the all-dark name `[00 00 00]`.

The default layout uses fifteen entries (0-based bit ranges):

| adder | digits | T | W | T' | W' | T (sum) |
|---|---|---|---|---|---|---|
| f1 | 14 | 0-13 | 14-27 | 28-42 | 43-57 | 58-73 |
| f2 | 9 | 74-82 | 83-91 | 92-101 | 102-111 | 112-122 |
| f3 | 12 | 123-134 | 135-146 | 147-159 | 160-172 | 173-186 |

Bits 187-191 stay dark.

## MSD addition on the processor (`msd_adder_pipe`)

MSD numbers are radix 2 with digits -1, 0, 1. Two n-digit numbers are added in
three digit-parallel steps. No carry ripples in any step.

1. t = T(a, b) and w = W(a, b) digit by digit, with a + b = 2t + w.
2. Shift t up one digit. Then t' = T'(t, w) and w' = W'(t, w). These two are
   chosen so that, once t' is shifted up, the digits of t' and w' at each
   position add up to -1, 0 or 1.
3. Shift t' up one digit. Then s = T(t', w'), which now just adds single
   digits.

Each digit of each step is one processor bit. An adder of width n therefore
takes a slice of n + n + (n+1) + (n+1) + (n+2) = 5n+4 bits, laid out in that
order with the least significant digit first. Operand b goes on the main path
and a on the control path. In steps 2 and 3, w and w' go on the main path and
the shifted t and t' on the control path. All four operations are symmetric,
so the choice does not change results.

**Pipelining.** All three steps exist at the same time on different bits.
Within one optical frame, step 1 works on the new operands, step 2 on the
decoded step-1 result of the previous frame, and step 3 on the decoded step-2
result. The shifts are plain wiring from the decoded frame back to the data
frame. So an adder accepts one addition per frame, and its n+2-digit sum is
available three frames later. `stage_busy` shows which steps hold real data in
the current frame. Frames with no new operands (bubbles) just flow through.

## Interface and timing of the top (`toc_msd_top`)

Parameters: `N_BITS` = 192, `N_ADDERS` = 3, `WIDTHS` = '{14, 9, 12},
`BASES` = '{0, 74, 123} (first bit of each slice), `MAXW` = 14 (width of the
operand ports; must be at least the widest adder). An elaboration-time
assertion checks that the slices fit and do not overlap.

| port | dir | meaning |
|---|---|---|
| `clk`, `rst_n` | in | clock; asynchronous active-low reset |
| `cfg_valid`, `cfg_ntr`, `cfg_first`, `cfg_last` | in | reconstructed-frame entry |
| `cfg_accept`, `cfg_reject` | out | outcome of the previous entry |
| `frame_en` | in | run one optical frame this cycle; the decoder latches at the edge |
| `op_valid[k]`, `op_a[k][i]`, `op_b[k][i]` | in | operands of adder k; digit i has weight 2^i; sampled in a `frame_en` cycle |
| `sum[k][i]`, `sum_valid[k]` | out | sum of adder k (WIDTHS[k]+2 digits, higher digits D); valid for the cycle after the third frame |
| `stage_busy[k]` | out | {step 3, step 2, step 1} carry valid data in this frame |
| `frame_done`, `conflict` | out | a decoded frame was just written; it contained an H+V bit |

Digits are `light_t` values: `LIGHT_D` = 0, `LIGHT_H` = -1, `LIGHT_V` = +1.

A typical session:

1. Reset.
2. Send the fifteen entries.
3. Raise `frame_en` with `op_valid` in as many consecutive cycles as there are
   additions. Idle cycles between frames are allowed.
4. Keep running frames (with or without new operands). Read `sum` whenever
   `sum_valid` is high.

## Simulating

Each block has a self-checking testbench in `tb/` (`tb_<module>.sv`). Shared
reference models are in `tb/tb_ref_pkg.sv`: the meaning of a name read
straight from its digits, and the printed truth tables of the MSD operations.
For example, the whole design:

```
verilator --binary --timing --assert -Irtl -Itb -y rtl -y tb \
  rtl/toc_pkg.sv tb/tb_ref_pkg.sv tb/tb_toc_msd_top.sv --top-module tb_toc_msd_top
./obj_dir/Vtb_toc_msd_top
```

Every testbench ends with a line `TB_RESULT checks=N failures=M`.

* `tb_basic_op_unit`: all eight unit builds against an optics model, every
  input and directive.
* `tb_ntr_translator`: all 2^18 codes. It expects exactly 19683 legal names
  and 8, 4, 4, 2, 4, 2, 2, 1 legal V marks for H marks 0..7. It checks the
  directive semantics through a model of the control path.
* `tb_processor_bit`: the eight named operations against their printed truth
  tables; random legal names on all nine input pairs; conflict detection.
* `tb_optical_processor`: 24 bits with random names and frames, the decoder's
  hold and valid timing, conflict reporting.
* `tb_reconfig_unit`: the fifteen-entry layout, random entries, and refused
  entries, compared bit by bit with a model.
* `tb_msd_adder_pipe`: the adder slice with a truth-table model of the
  processor. It runs a random stream with bubbles and idle cycles, and checks
  each sum's value and its three-frame latency.
* `tb_toc_msd_top` runs at the default size:
  * the fifteen-entry configuration plus two refused entries;
  * the six published operand pairs of each adder, back to back;
  * 300 random frames.

  It checks each sum's value and latency. It checks the first sum of each
  adder digit for digit against the published result (for example f1:
  `0u01111u110111 + 01u01u11101uu1 = 00000010110u010` = 346). It also counts
  refused entries, frames with all three steps busy, bubbles and idle cycles,
  and requires each to happen at least once. It runs in seconds.

## What is this design's own, and how far to trust it

These parts follow the published description:

* the naming convention, including mark semantics, row constraints and the
  names of T, W, T', W';
* the structure of a basic unit (three phototubes, selector, XOR, LC between
  two polarizers);
* at most six units per bit, and the superposition rule for D;
* 192 processor bits;
* the three-step T/W, T'/W', T adder and the bit allocation of the three
  adders.

These are this design's own choices:

* the 2-bit light encoding;
* the selector codes, including a "none" code that lets a unit be fully off or
  fully on;
* the mark-to-directive table and the polarizer/LC build of the two unit
  types;
* the one-hot pixel encoding of the main-path input (the description does not
  say how a row whose input is D gets light);
* H+V handling as a conflict;
* the configuration entry format and refusal rules;
* one clock edge per optical frame;
* the frame-by-frame pipeline between adder steps;
* the digit order within a bit range.

Known differences and limits:

* Sums are n+2 digits. Published results print some with fewer leading
  zeros; the values are the same.
* The published processor divides each main path into four polarizer
  regions (HH, HV, VH, VV). Here the encoder always emits H light, so only
  the HH and HV builds are used. The unit itself supports all four, and
  `tb_basic_op_unit` tests all of them.
* The placement of processor bits on the 24x24 liquid-crystal pixel array is
  not modelled. That array has three pixels per bit, with the left half and
  the right half mirrored.
* The host-side programming platform and the light source are outside the
  RTL. The testbenches play the host's role.
* The real optical devices have analog behaviour (contrast, timing, partial
  polarization) that the discrete model ignores.
