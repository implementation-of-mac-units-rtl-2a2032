# Multiply-accumulate hardware for a lifting wavelet processor

This repository holds two small datapaths for DSP work. Both are written in
synthesizable SystemVerilog.

1. **A four-function arithmetic array.** A triangle of identical one-bit
   cells computes a product, a square, a quotient or a square root. Which one
   it computes depends only on a few control lines and on how the operands are
   applied. The array has three rows. Each row is a controlled
   adder/subtractor. A control cell at the left end of a row decides whether
   the row keeps its sum or passes its input on. The operand slides one
   column right from row to row. So the same rows do add-and-shift
   multiplication when they add, and restoring division or restoring square
   root when they subtract. The operands are tiny (3-bit divisor, 6-bit
   radicand). The interest is in the structure, not the width.

2. **A parallel-MAC lifting datapath.** It runs one lifting step of a
   discrete wavelet transform, for example the 5/3 predict step
   `d[i] = x[2i+1] - floor((x[2i] + x[2i+2]) / 2)`. An array of `n`
   multiply-accumulate units computes `n` staggered windows of the filter at
   once, so one filtered value leaves per clock. The sum then goes through
   three stages:
   - a multiplexer picks the MAC unit that has just finished;
   - a floor unit turns the fixed-point sum into an integer;
   - a subtractor takes it from the matching sample of the other
     polyphase stream, which a programmable delay has brought into line.

The arithmetic array was put forward as a building block for such MAC units.
The two datapaths are not wired together, though: a 3 × 2-bit multiplier with
no accumulator cannot do a 16-bit MAC. The top module `mac_dsp_top` therefore
holds both, side by side, each with its own ports (`ffp_*` and `lift_*`).

---

## 1. The four-function arithmetic array (`ffp_pipeline`)

### 1.1 The two cells

**A cell** (`ffp_acell`). This is a one-bit adder/subtractor with an enable.

```
T  = B ^ X                     X = 0: add B,  X = 1: add ~B (subtract)
S  = F ? (A ^ T ^ Ci) : A      F = 0: the cell passes A down unchanged
Co = T(A | Ci) | A·Ci          full-adder carry, towards the left
```

- X and F enter from the left and leave to the right unchanged.
- Ci comes from the right neighbour; Co goes to the left neighbour.
- A comes from above; S goes down.
- B and C arrive diagonally from the row above. D and E leave diagonally
  for the row below (see 1.3).

**K cell** (`ffp_kcell`). One sits at the left end of every row.

```
F  = X·Ci | P·~X     X = 0: F = P (this row's multiplier bit)
                     X = 1: F = Ci, the carry out of the row (1 = no borrow)
Co = Ci              the row's result bit CK
```

With X = 1 each row is one restoring step:

- **No borrow:** the row subtracts the operand and keeps the difference, and
  the result bit is 1.
- **Borrow:** the row passes its input down untouched, and the result bit
  is 0.

There is no separate restore adder: the restore is just F = 0.

### 1.2 Geometry

Columns are numbered by the weight of the A bit they line up with. Column 6
is an extra leading zero.

```
column:          6    5    4    3    2    1    0
A input:         0    A5   A4   A3   A2   A1   A0
row 1 (P0)  K  [A    A    A]                          3 cells, operand B2..B0 / C2..C0
row 2 (P1)  K  [A    A    A    A    A]                5 cells, A3 A2 enter here
row 3 (P2)  K  [A    A    A    A    A    A    A]      7 cells, A1 A0 enter here
```

How the rows connect:

- Each row's A inputs are the S outputs of the row above, plus two new A bits
  on the right.
- The B/C inputs of row r+1, column c, are the D/E outputs of row r,
  column c+1. So the operand moves one column to the right per row.
- Both free ends of the lower rows get B = C = 0.
- The rightmost cell of row 1 feeds its own X output back into its carry in:
  +1 when subtracting (two's complement), 0 when adding.

Outputs:

- `s[6:0]` = S6..S0 of row 3.
- `ck[2:0]` = CK2..CK0 = the K-cell outputs of rows 1, 2 and 3. CK2 is the
  most significant bit.

The array is purely combinational, with no registers and no clock. The
result settles after three row ripples. "Pipeline" here means the chain of
rows, not pipeline registers.

### 1.3 The four operations

| operation   | X | B2B1B0       | C2C1C0 | P2P1P0      | result |
|-------------|---|--------------|--------|-------------|--------|
| multiply    | 0 | multiplicand | = B    | P2 P1 0     | S6..S2 = B × (2·P1 + P2) |
| square      | 0 | 0 P1 P2      | = B    | P2 P1 0     | S6..S2 = (P1P2)² |
| divide      | 1 | divisor      | = B    | any, P0 = 1 | CK2..CK0 = A5A4A3A2 / B; remainder in S4..S2 |
| square root | 1 | 0 0 1        | 0 1 0  | any, P0 = 1 | CK2..CK0 = floor(sqrt(A5..A0)) |

**Multiply.** The multiplier is read with P1 as the most significant bit
(P2 is its LSB). P0 drives row 1 and must be 0. Row 2 adds B when P1 = 1 and
row 3 adds B when P2 = 1. Because the operand slides one column right per
row, this is the shift-and-add product, most significant bit first. Row 1
does nothing in this mode. A 3-bit × 2-bit product always fits in S6..S2.
Squaring is the same operation with B set to the number being squared.

**Divide.** This is restoring division, one quotient bit per row. It is
valid when B ≠ 0 and the quotient fits in 3 bits (A5..A2 < 8·B). The spare
cells at the right end of rows 2 and 3 carry B = 0 and a carry in of 1. They
therefore subtract 0, so they only widen the row. A1 and A0 do not affect the
quotient.

**Square root.** This is the hardest part of the array. Restoring square
root takes two radicand bits per step. Step k subtracts the trial value
`Q 0 1` (the root found so far, then 0, then 1) from the partial remainder
with the next two bits appended:

```
row 1: {0,A5,A4}                     - 0 0 1      (cols 6..4)
row 2: {R1,A3,A2}                    - Q1 0 1     (cols 4..2)
row 3: {R2,A1,A0}                    - Q1 Q2 0 1  (cols 3..0)
```

The array builds those trial values in place, with the diagonal B/C lines
and no extra wiring. Each (B, C) pair on a diagonal acts as a small token:

| (B,C) | meaning                           | D, E passed to the next row |
|-------|-----------------------------------|-----------------------------|
| (b,b) | ordinary operand bit b            | (b, b): a plain bypass      |
| (0,0) | zero                              | (0, 0)                      |
| (0,1) | "put this row's root bit here"    | (F, F): the root bit, from now on an ordinary bit |
| (1,0) | trailing 1 of this row's trial value | (0, 1): becomes the next row's marker |

In logic this is `D = C·(B | F)` and `E = D | B·~C`. For multiply, divide and
square, C = B everywhere, so D = E = B and the lines are plain bypasses.

Row 1 starts with B = 001 and C = 010:

- Column 5 holds the marker. Row 2 therefore receives Q1 there, at column 4.
- Column 4 holds the trailing 1. It turns into row 2's marker at column 3,
  which becomes Q2 in row 3.

The trailing 1 of rows 2 and 3 falls on a free end where B = 0. It is made
instead by a carry in of 0 to the rightmost cell:
`A - (4Q + 1) = A + ~(4Q) + 0`. So rows 2 and 3 take their rightmost carry in
as `X & ~sqrt_mode`, where `sqrt_mode` means row 1's rightmost cell holds the
(1,0) token (`E & ~D`). In every other mode this carry equals X, exactly like
row 1's loop.

Worked example, radicand 36 (100100):

- Row 1: 010 − 001 = 001, so q = 1.
- Row 2: 00101 − 00101 = 0, so q = 1.
- Row 3: 0 − 1101 borrows, so q = 0.
- Root = 110 = 6.

### 1.4 What is published and what is reconstructed

Taken from the original description:

- the two cell types;
- the S, Co and F equations;
- the three-row structure, with P0 on row 1 and 0, A5, A4 above the first
  row;
- the X loop into the first row's carry;
- the zero B/C inputs at the ends of row 2;
- A3/A2 entering row 2 and A1/A0 going further down;
- the operand conventions of the table above, and the example results.

The following are this design's own reconstruction, because the original
gives no equation for them:

- the D/E logic;
- the K cell's `Co = Ci`;
- the widths of rows 2 and 3 (5 and 7 cells);
- the square-root carry-in rule.

These choices reproduce every published example. The testbench also checks
the whole operand range of all four operations.

---

## 2. The lifting datapath (`lifting_mac_array`)

### 2.1 Streams

Three streams advance together on every clock with `en = 1`:

| port     | stream                                | goes to |
|----------|---------------------------------------|---------|
| `x_in`   | samples to be filtered (e.g. the even samples) | broadcast to every MAC |
| `tok_in` | coefficients `c[0..n-1]`, repeated, as `coef_tok_t` {valid, first, last, coef}; `first` on `c[0]`, `last` on `c[n-1]` | the R-register chain |
| `d_in`   | samples to be corrected (e.g. the odd samples) | the programmable delay |

Per-step settings:

- `taps` = n, the filter length of the current step (1..NMAC).
- `delay` = the programmable delay in enabled cycles (0..MAXD).
- `frac` = number of fraction bits in the coefficients.

Outputs:

- `y` = `d_delayed - floor(filter)`.
- `filt` = the floored filter value.
- `mac_idx` = the MAC unit that produced the output.
- `y_valid` = a one-clock strobe per output.

### 2.2 Why the coefficients, not the samples, go through the R chain

MAC j (`mac_unit`) sees the coefficient stream j cycles late
(`coef_delay_line`). Its accumulation windows therefore open j samples after
those of MAC 0. Over one period of n samples, the n units together start a
window at every sample position. MAC j computes

```
f[i] = sum_{k=0}^{n-1} c[k] · x[i+k]      for every i with i mod n = j
```

The windows close one after another, so exactly one unit finishes per cycle.
`mac_select` forwards that one (an assertion checks that no two finish
together). `round_floor` shifts right arithmetically by `frac` bits, which is
the floor. `lift_sub` subtracts.

With `delay = n`, output i pairs `f[i]` with `d[i]`. For a step that needs
`d[i+1]` (e.g. the 4-tap Deslauriers-Dubuc predict, which centres its window
on the odd sample) use `delay = n - 1`.

### 2.3 Timing

- Window i's sum is ready in its MAC at the clock edge that takes sample
  `x[i+n-1]`.
- Its output leaves the output register on the next enabled edge.
- So the first output of a step appears n + 1 enabled cycles after its first
  sample, and then one output follows per enabled cycle.

While `en = 0` nothing moves and `y_valid` stays low. To change `taps` between
steps, first send `taps + 1` enabled cycles of invalid tokens to empty the
chain. The samples fed during those cycles act as zero padding, and the last
windows of the step use them.

### 2.4 Number formats (defaults in `lift_pkg`)

| constant    | value | meaning |
|-------------|-------|---------|
| `DATA_W`    | 16    | signed samples |
| `COEF_W`    | 16    | signed coefficients, `FRAC_W` = 14 fraction bits (Q2.14) |
| `NMAC`      | 4     | MAC units; must be at least the longest lifting filter |
| `ACC_W`     | 34    | accumulator, `DATA_W + COEF_W + log2(NMAC)`, cannot overflow |
| `MAX_DELAY` | 16    | depth of the programmable delay |

Output widths: `y` is `ACC_W + 1` = 35 bits and `filt` is 34 bits, both
exact.

Coefficient examples:

- 5/3 predict: 1/2, 1/2 (8192, 8192 in Q2.14), or 1, 1 with `frac = 1`.
- 9/7 α step: −1.586134342 → −25987.

The update steps of a transform add rather than subtract. Feed them through
this datapath with negated coefficients. Note that `x - floor(-v)` equals
`x + ceil(v)`, not `x + floor(v)`.

### 2.5 What is published and what is chosen here

From the source architecture:

- an array of MAC units sized by the longest lifting filter;
- R registers between the units;
- the output MUX, the floor unit, the subtractor and the programmable delay;
- results coming out of MAC 1, 2, … on consecutive cycles after n cycles.

This design's own choices:

- which stream goes through the R chain (the source draws both simply as
  input streams);
- the first/last token markers;
- the stream enable;
- all widths;
- the run-time `frac`;
- driving the MUX select from the units' valid flags.

The source keeps the image in a memory of four sub-sampled blocks for
row- and column-wise 2-D processing. It does not describe that memory or its
address generation, and the memory is not part of this RTL: the three stream
ports are where it would connect.

---

## 3. Files

| file | contents |
|------|----------|
| `rtl/mac_dsp_top.sv` | top: both datapaths side by side |
| `rtl/ffp_pipeline.sv` | the three-row arithmetic array |
| `rtl/ffp_stage.sv` | one row: K cell + NCELL A cells |
| `rtl/ffp_acell.sv`, `rtl/ffp_kcell.sv` | the two cells |
| `rtl/lift_pkg.sv` | lifting constants and `coef_tok_t` |
| `rtl/lifting_mac_array.sv` | one lifting step: chain, MACs, MUX, ROUND, SUB, delay |
| `rtl/mac_unit.sv`, `rtl/coef_delay_line.sv`, `rtl/mac_select.sv`, `rtl/round_floor.sv`, `rtl/lift_sub.sv`, `rtl/prog_delay.sv` | its parts |
| `tb/tb_<module>.sv` | one self-checking testbench per module |

## 4. Simulating

Every testbench checks against values it computes itself and ends with a
line `TB_RESULT checks=N failures=M`. Each has a watchdog. With Verilator 5:

```
verilator --binary --timing --assert -Irtl -y rtl -y tb rtl/lift_pkg.sv \
          --top-module tb_mac_dsp_top tb/tb_mac_dsp_top.sv
./obj_dir/Vtb_mac_dsp_top
```

Replace the name to run another testbench. What they cover:

- `tb_ffp_pipeline` — the published examples, then every product, square,
  valid division (quotient and remainder) and square root.
- `tb_ffp_acell`, `tb_ffp_kcell` — exhaustive truth tables.
- `tb_ffp_stage` — one 5-cell row against integer add/subtract and restore.
- `tb_mac_unit`, `tb_coef_delay_line`, `tb_mac_select`, `tb_round_floor`,
  `tb_lift_sub`, `tb_prog_delay` — random and corner stimulus against
  reference models, including stalls.
- `tb_lifting_mac_array` — steps with 1 to 4 taps, random coefficients,
  different `frac`, random stalls. It checks every value, which MAC produced
  it, the n + 1 latency, and that outputs follow on consecutive cycles.
- `tb_mac_dsp_top` — the whole design at its default parameters. It runs
  three predict steps on one random signal (5/3, 9/7 α, 4-tap
  Deslauriers-Dubuc), with references written over the interleaved signal,
  plus all four arithmetic operations. It counts that every mechanism
  occurred: stalls, filter-length changes, two delay settings, negative
  floors, output from each MAC, and each operation.

## 5. How far to trust it

- **Arithmetic array.** The array's function is verified exhaustively over
  its whole legal operand range. The cell-level equations for S, Co and F
  match the published ones. Section 1.4 lists the reconstructed parts. A
  different internal arrangement in the original would not change any
  published result.
- **Illegal operands.** The array does not flag them (B = 0, a quotient above
  7, P0 = 1 in multiply). It returns whatever the rows compute.
- **Lifting datapath.** Its structure is the published one; its interface
  and formats are choices made here (Section 2.5). It is checked against
  bit-exact integer models of real lifting steps, not against published
  numbers: none were given for it.
- **Synthesis.** Both modules synthesize without latches or combinational
  loops. The four 16 × 16 multipliers dominate the lifting datapath.
