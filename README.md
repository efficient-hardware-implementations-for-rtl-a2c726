# Curve448 point multiplication at three area/speed levels

This RTL computes X448-style scalar multiplication on Curve448: given the
u-coordinate of a point P and a 448-bit scalar k, it returns the u-coordinate
of k·P. Everything is arithmetic modulo the Goldilocks prime

    p = 2^448 - 2^224 - 1

on the Montgomery ladder, in projective (X : Z) coordinates, with one field
inversion at the end.

The same algorithm is built three times, at three points of the area/time
trade-off:

| core | datapath | RAM word | adder | multiplier |
|---|---|---|---|---|
| Design I (lightweight) | 16 bit | 16 bit, 28 per element | digit-serial, 16 bit | product scanning with interleaved reduction on one 16x17 multiplier |
| Design II (area-time) | 112/128 bit | 112 bit, 4 per element | chunk-serial, 112 bit | two-level Karatsuba on one 64x64 multiplier |
| Design III (high-performance) | 448 bit | 448 bit, 1 per element | 224-bit adder, 4 phases | five-level Karatsuba, 81 base multipliers |

All three share the controller, the program ROM and the operand RAM, and differ
only in word width and in the field arithmetic unit. The top level,
`curve448_ecpm_top`, places the three cores side by side with separate ports.

## The field: reducing modulo 2^448 - 2^224 - 1

The prime is chosen so that reduction needs no multiplier. Because
2^448 ≡ 2^224 + 1 (mod p), a 896-bit product x = L + 2^448·H, with
H = Hl + 2^224·Hh (224-bit halves), folds to

    x ≡ L + H + Hh + (Hl + Hh)·2^224    (mod p)

which is a little above 2^448. The few carry bits k above bit 448 are folded
again as k + k·2^224, and a final conditional subtraction of p leaves a value
in [0, p). Every value stored in RAM is fully reduced.

The same identity gives the top level of the Karatsuba multipliers in Designs
II and III ("golden-ratio" Karatsuba, φ = 2^224, φ² ≡ φ + 1). With
A = A0 + φ·A1 and A10 = A0 + A1:

    A·B ≡ (A0·B0 + A1·B1) + 2^224·(A10·B10 - A0·B0)    (mod p)

so one 448-bit multiplication costs three 225-bit multiplications and some
additions, and the result is already partly reduced.

### Serial reduction (`fp_reduce_serial`)

Designs I and II reduce digit by digit (W = 16 or 112 bits). The upper half H
sits in a rotating register: after i rotations digit i of H is at the bottom
and digit i ± 224/W (mod 448/W) is 224 bits higher, which is exactly the other
term the fold needs. So the fold is one pass of a W-bit adder with a 3-bit
carry:

    digit i = L[i] + H[i] + H[i+NH]            for i <  NH
    digit i = L[i] + H[i] + H[i-NH] + H[i]     for i >= NH     (NH = 224/W)

Two carry-fold passes and one subtract-p pass follow. The second carry pass is
needed only for rare inputs, but always runs, so the reduction takes the same
4·(448/W) + 1 cycles for every value: a data-dependent latency would leak the
operands through timing.

### Additions (`fp_addsub_serial`, `d3_modadd`)

An addition forms a + b and a + b − p together (in Designs I and II as two
W-bit chains working on the same digit, one cycle per digit) and keeps the
second when the first reached p. A subtraction forms a − b and a − b + p and
keeps the second when the first borrowed. There is no second pass.
Design III does the same on one 224-bit adder with operand half registers
and a carry register: low half, high half with the carry, then the
correction by p in two halves, five cycles from start to done.

## The three multipliers

**Design I (`d1_modmul`)**: product scanning with interleaved
reduction. Column j of the 896-bit product, col(j) = Σ a[m]·b[j−m] over 16-bit
digits, has weight 2^(16j). For j ≥ 28 that weight folds below 2^448 by the
identity above. The 28 output digits are therefore built directly, least
significant first:

    digit i < 14:   col(i) + col(i+28) + col(i+42)
    digit i >= 14:  col(i) + col(i+14) + 2·col(i+28)

(terms whose column is beyond 54 are dropped). One partial product per cycle
goes into a 40-bit accumulator on a single multiplier (one DSP block). Its
second input is 17 bits wide, because the doubled column uses b shifted left
by one. When a digit is complete its low 16 bits are shifted out and the
accumulator moves down 16 bits. The upper columns are each visited twice,
so there are 1,162 partial products. The small carry left above bit 448 goes
through the serial reducer's passes. 1,276 cycles per multiplication; no
896-bit product register is needed.

**Design II (`d2_modmul`, `mul128_seq`)**: two Karatsuba levels.
The top level is the golden-ratio step above. Each of the three 225-bit products
X·Y is split at t = 2^112 and computed with the refined Karatsuba identity

    X·Y = (1 − t)·(x0·y0 − t·x1·y1) + t·(x0 + x1)·(y0 + y1)

in three one-cycle recombination steps: s1 = m0 − t·m1, s2 = s1 − t·s1,
s3 = s2 + t·m10. The intermediate s1 and s2 can be negative, so they are held
in two's complement; s3 cannot. The three sub-products (up to 114x114 bits) are
128x128 multiplications, each taking four cycles on one 64x64 multiplier
(`mul128_seq`). The three half-size results go to a three-entry internal
register file. They are combined into a value below 2^676 and reduced on 112-bit
chunks. 91 cycles per multiplication.

**Design III (`d3_modmul`, `kara_mul`)**: `kara_mul` is a recursive
Karatsuba tree. Four levels on 225-bit operands end in 3^4 = 81 base
multiplications of at most 16x16 bits, each with an output register. The
adders above them are combinational. One operand pair enters per cycle. The
golden-ratio level is pipelined through this single tree: A0·B0, A1·B1 and
A10·B10 enter on three consecutive cycles and leave in cycles 2 to 4. The
three products are combined, folded three times at full width and corrected
by p, one register stage each. 10 cycles per multiplication.

## Ladder, program and controller

`c448_prog_rom` holds 23 lines of the form `dst ← srcA op srcB` (op = add,
sub, mul) on 16 RAM slots (`c448_pkg::slot_e`). Lines 1 to 18 are one ladder
step, with ten multiplications and eight additions/subtractions:

    A = X2+Z2   B = X2-Z2   C = X3+Z3   D = X3-Z3
    AA = A²     BB = B²     DA = D·A    CB = C·B
    X2 = AA·BB  E = AA-BB   Z2 = E·(AA + a24·E)          a24 = 39081
    X3 = (DA+CB)²           Z3 = u·(DA-CB)²

`ecpm_ctrl` is the FSM that runs them:

1. **Load**: writes u, λ and the constants 1, 0 and a24 into the RAM, one
   word per cycle.
2. **Randomise** (line 0): the start points are (X2:Z2) = (1:0) and
   (X3:Z3) = (λ·u : λ). A random non-zero λ changes every intermediate value
   without changing the result; λ = 1 turns the randomisation off.
3. **Ladder**: one step per scalar bit, most significant first, over all
   KBITS bits. The conditional swap of the two ladder points is not a data
   move. While the current bit is 1 the controller swaps the RAM slots of
   (X2,Z2) and (X3,Z3) in its address mapping. Every step therefore runs
   the same instructions with the same timing, whatever the scalar. The
   two slot pairs always hold [m]P and [m+1]P, so no final swap is needed.
4. **Invert**: Z2^(p−2) by square-and-multiply over the fixed public
   exponent (447 squarings and 445 multiplications, lines 19 to 21), then
   x = X2 · Z2^−1 (line 22).
5. **Read out** the result.

Each line runs in the same way. Both operands are read word by word through
the two RAM ports (448/W + 1 cycles), the field unit runs, and the result is
written back through port A (448/W cycles).

The scalar is used exactly as given. Clamping, as X448 key exchange requires,
is up to the caller.

## Interfaces and timing

`ecpm_core #(DESIGN, KBITS)` and each core of the top have the same interface:
pulse `start` for one cycle with `k`, `u` and `lambda` (all held by the core
from then on). `busy` is high during the operation. `done` pulses for one
cycle when `x_out` holds u(k·P). Reset (`rst_n`) is asynchronous and active
low. Field units use the same start/done pulse pair and expect operands in
[0, p).

Measured cycles for one full point multiplication (448-bit scalar), the same
for every scalar and every λ:

| | Design I | Design II | Design III |
|---|---|---|---|
| point multiplication, this RTL | 7,481,037 | 596,583 | 107,511 |
| point multiplication, published design | 7,047,055 | 349,546 | 77,702 |
| field multiplication unit alone, this RTL | 1,276 | 91 | 10 |
| field addition unit alone, this RTL | 29 | 5 | 5 |
| field multiplication / addition, published (with RAM traffic) | 1,233 / 112 | 69 / 8 | 15 / 7 |

The unit figures leave out the RAM transfers the controller adds to each line:
about 2·448/W + 3 cycles. The published design overlaps additions with
multiplications and uses a shorter inversion chain; this RTL runs one line at a
time. Its Design II pays for the separate reduction and for the operand
transfers on every line.

## Where this RTL departs from the published architecture

- **Schedule**: the published cores run long unrolled programs (2183, 480
  and 1554 lines), with additions overlapping multiplications. Here a 23-line
  program is looped by the FSM, one operation at a time, and the same program
  serves all three cores.
- **Interleaved reduction**: Design I reduces while it multiplies, as
  published. In Designs II and III the reduction here follows the
  recombined product (Design II: serial reducer on 112-bit chunks; Design
  III: full-width fold stages).
- **Redundant representation**: the published Design II keeps 16 spare bits
  per 128-bit word for redundant values. Here values are always fully reduced
  and the RAM words are 112 bits wide.
- **Recombination**: the optimised digit-level recombination of the
  Design II Karatsuba steps (only five 128-bit additions, and digits cancelled
  by interleaved reduction) is done here as full-width additions in the same
  three steps. Design III's two 224/228-bit adders become one full-width
  adder stage.
- **Inversion**: plain square-and-multiply instead of an optimised addition chain.
- **Scalar blinding** (k → k + r·n) is not built; the random mask width and
  its source are not specified. A blinded scalar longer than 448 bits runs on
  a core with a larger `KBITS`. Point randomisation is built.
- **RAM**: the same dual-port array is used for all designs, 16 slots deep;
  Design III's would map to registers rather than block RAM.

## Files

| file | contents |
|---|---|
| `rtl/c448_pkg.sv` | p, a24, operation and slot enums, instruction struct, ROM entry points |
| `rtl/curve448_ecpm_top.sv` | the three cores side by side |
| `rtl/ecpm_core.sv` | one core: controller, ROM, RAM and the field unit for `DESIGN` = 1, 2, 3 |
| `rtl/ecpm_ctrl.sv` | controller FSM |
| `rtl/c448_prog_rom.sv` | program ROM |
| `rtl/dp_ram.sv` | dual-port operand RAM |
| `rtl/fp_addsub_serial.sv` | digit-serial modular add/sub (Designs I, II) |
| `rtl/fp_reduce_serial.sv` | digit-serial reduction (Designs I, II) |
| `rtl/d1_modmul.sv` | Design I multiplier |
| `rtl/mul128_seq.sv`, `rtl/d2_modmul.sv` | Design II multiplier |
| `rtl/kara_mul.sv`, `rtl/d3_modmul.sv`, `rtl/d3_modadd.sv` | Design III arithmetic |
| `tb/c448_ref_pkg.sv` | reference arithmetic for the testbenches: `%`-based field operations and the X448 ladder |
| `tb/tb_*.sv` | one self-checking testbench per module |

## Simulation

Every testbench checks against reference values computed with wide
SystemVerilog arithmetic and the `%` operator (`tb/c448_ref_pkg.sv`), not
against the RTL. Each prints `TB_RESULT checks=N failures=M` and stops itself
through a watchdog if the design hangs. Example with Verilator 5:

    verilator --binary --timing -Irtl -Itb rtl/c448_pkg.sv tb/c448_ref_pkg.sv \
        $(ls rtl/*.sv | grep -v c448_pkg) tb/tb_curve448_ecpm_top.sv \
        --top-module tb_curve448_ecpm_top
    ./obj_dir/Vtb_curve448_ecpm_top

(the packages go first; any other testbench is built the same way).

`tb_curve448_ecpm_top` runs two full 448-bit point multiplications on all
three cores at the default parameters, about 5.5 million cycles, in under a
minute. The first uses a clamped scalar and no randomisation; the second a
random λ. It compares the results with the reference ladder and checks that
both runs take the same number of cycles. It also checks that swapped and
unswapped ladder steps, every operation type, the inversion multiplies, the
point randomisation and non-zero carry folds all occurred. `tb_ecpm_core` runs
the three cores with short scalars. `tb_ecpm_ctrl` tests the controller with a
behavioural field unit. The unit testbenches check random and corner-case
operands (0, 1, p−1, all-ones) and the exact latency.

To change the design: `KBITS` sets the scalar length, and `DESIGN` selects the
datapath of `ecpm_core`. A new program needs only `c448_prog_rom` and the
entry points in `c448_pkg`. The serial units take any W that divides 224.
