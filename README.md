# BCSE constant multipliers with buffer based adders

A constant multiplier multiplies a variable input `Y` by a coefficient `K` that
is fixed when the hardware is built, as the taps of a digital filter are. Written
as shifts and adds, a 16-bit coefficient with all bits set needs sixteen
shifted copies of `Y` and fifteen adders. Binary common subexpression
elimination (BCSE) cuts the coefficient into short bit groups. It builds the
few multiples of `Y` that these groups can ask for once, and lets every group
reuse them. What remains is one addition per group.

This RTL gives two such multipliers, one with 2-bit and one with 3-bit groups,
for a 16-bit unsigned input and a 16-bit constant. All of their adders can be
built from three adder structures that share one idea: a full adder that
**skips** work when two of its inputs agree. The three structures are:

* a ripple carry adder (RCA) of *buffer based* full adders;
* the same adder mapped onto 2-input NAND gates only;
* an area-reduced carry select adder (CSA) that replaces the second ripple
  chain with an incrementer.

Everything is combinational: there is no clock, register or reset.

## Number format

`K` is a fraction, `K = COEFF / 2^16`, so `0 <= K < 1`. The multipliers output
the exact 32-bit integer `p = y * COEFF`. Read `p` as a fixed-point number with
16 fraction bits and it is `Y*K`: `p[31:16]` is the integer part and `p[15:0]`
the fraction. No bit is truncated. In the fractional view, group patterns
stand for values such as `Y/2` or `Y + Y/2`. The RTL works in integers scaled
by a power of two, so these become `y`, `2y` and `3y`, and the scale factor is
a wiring shift.

## 2-bit BCSE (`bcse2_ppg`, `bcse2_const_mult`)

The 16 coefficient bits form eight 2-bit groups. Group 0 is the least
significant. A group pattern selects a multiple of `y`:

| pattern | fractional view | multiple | cost |
|---|---|---|---|
| 00 | 0 | 0 | none |
| 01 | Y/2 | y | wiring |
| 10 | Y | 2y | shift |
| 11 | Y + Y/2 | 3y | **one shared adder** |

One adder, 17 bits wide (`3y = 2y + y`), serves every `11` group. The constant
is a parameter, so each group's choice is fixed at elaboration and becomes
wiring. Eight partial products then need seven adder steps.

## 3-bit BCSE (`bcse3_ppg`, `bcse3_const_mult`)

The coefficient is padded with two zeros on the right to 18 bits. This gives
six 3-bit groups, and the last one holds the coefficient's lowest bit. All
eight multiples `g*y`, for `g = 0 … 7`, are prepared:

| pattern | fractional view (100 = Y) | multiple | how |
|---|---|---|---|
| 001, 010, 100 | Y/4, Y/2, Y | y, 2y, 4y | shifts |
| 011 | C/2, with C = Y + Y/2 | 3y | adder 1: 2y + y |
| 110 | C | 6y | adder 1's output shifted |
| 101 | A = Y + Y/4 | 5y | adder 2: 4y + y |
| 111 | Y + C/2 | 7y | adder 3: 4y + 3y |

The common subexpression `C` serves two patterns. So three adders do what five
would do without sharing. Adder 3 uses adder 1's result, so this unit is two
adders deep. Six partial products need five adder steps.

## Adder steps (`shift_add_acc`)

The partial products are added in a chain that starts at the least
significant group. After step `j-1`, the running sum is below `2^(16 + G*j)`,
and its lowest `G*j` bits cannot change any more. Those bits bypass the
adder. Only the upper 16 bits meet the next partial product, in an adder of
`16 + G` bits (18 or 19). That adder's sum is provably below `2^(16+G)`, so
its carry out is always zero and is left unconnected. The product is
therefore exact, yet no adder is wider than 19 bits.

## The buffer based full adder (`buf_full_adder`)

A full adder adds `a + b + c`. This cell first computes `sel = b ^ c`:

* `sel = 0` means `b == c`. Then the sum is `a` and the carry is `b`. The
  incrementer is skipped, and `a` and `b` pass straight through the two
  multiplexers.
* `sel = 1` means exactly one of `b`, `c` is set, so the cell computes `a + 1`.
  A one-bit incrementer gives sum `~a` and carry `a`.

Two 2:1 multiplexers, both selected by `sel`, choose between the two cases.
In the ripple adders the rippling carry enters at `c`.

## NAND mapping (`nand_buf_full_adder`, `nand2_gate`)

The same cell is built from nine 2-input NAND gates and no inverter:

* `sel` is a four-NAND XOR of `b` and `c`.
* The sum multiplexer `sel ? ~a : a` is `a ^ sel`. This is a second four-NAND
  XOR, into which the incrementer's inverter disappears.
* The carry multiplexer is `nand(nand(b,c), nand(a,sel))`. It reuses a gate
  from each XOR. When `sel = 0` it yields `b & c`, which equals `b`; when
  `sel = 1` it yields `a`.

The longest path is six NAND levels, from `b` or `c` to the sum. The carry
passes through two levels after `sel`.

## Area-reduced carry select adder (`mod_csa`, `bec_incrementer`)

A classic carry select adder computes the upper bits twice, once for carry-in
0 and once for carry-in 1. This one computes them once:

1. A half adder handles bit 0. Its carry does not ripple upwards; it becomes
   the multiplexer select.
2. A buffer based RCA adds bits `W-1…1` with carry-in 0.
3. An incrementer (an inverter on the lowest bit, then XOR with an AND chain)
   turns that result, carry included, into the carry-in-1 result.
4. A row of 2:1 multiplexers picks one of the two.

This saves the second adder chain at the cost of the incrementer's delay.
The adder has no carry input, which is all the multiplier needs.

## Parameters

All modules have the defaults below, so the design builds as described with
no overrides.

| parameter | default | meaning |
|---|---|---|
| `WY` | 16 | input width |
| `WK` | 16 | coefficient width |
| `COEFF` | `16'hFFFF` | the constant; all ones is the worst case |
| `PP_ADDER` | `ADD_BUF_RCA` | adder kind of the shared adders (`bcse_pkg::adder_kind_e`) |
| `ACC_ADDER` | `ADD_BUF_RCA` | adder kind of the adder steps |

`adder_kind_e` is one of `ADD_BUF_RCA`, `ADD_NAND_RCA` or `ADD_MOD_CSA`. Groups
whose constant bits are all zero give constant-zero partial products. Their
adder steps then add zero, and synthesis removes them.

`bcse_cm_top` has one input `y[WY-1:0]` and two outputs, `p2` and `p3`
(`WY+WK` bits each). `p2` comes from the 2-bit multiplier and `p3` from the
3-bit one. They always agree.

## Where this design makes its own choices

* **Exact output.** No right-shifted bit is dropped, so the adders are 17 to
  19 bits wide rather than 16.
* **Unsigned input.** Signed operation is not provided.
* **Pattern 111 and pattern 011.** In the fractional view these are read as
  `Y + C/2` and `C/2`, the values the patterns require.
* **Carry select adder.** The half adder carry serves only as the multiplexer
  select; it is not also fed into the upper chain. Feeding it in would leave
  nothing to select.
* **Adder arrangement.** The adder steps form a linear chain, not a tree.
* **NAND netlist.** The nine-gate netlist above is this design's own mapping
  of the buffer based cell.
* **Default adders.** The default uses buffer based RCAs in both roles. The
  NAND RCA and the carry select adder are alternatives chosen by parameter.
* **Timing.** There are no pipeline registers, so the whole multiplier is one
  combinational path. Add registers around `bcse_cm_top` if a clock rate must
  be met.

## Verification

Each module has a self-checking testbench in `tb/`. Each prints
`TB_RESULT checks=N failures=M` and has a watchdog.

* The full adder cells are tested on all 8 input patterns. Both the skip path
  and the increment path must occur.
* The adders and the incrementer are tested exhaustively at 4 bits (the
  incrementer at 16), plus random and corner operands at 16 to 19 bits.
* The partial product units are tested with constants that use every group
  pattern. Every `pp[j]` must equal `code_j * y`.
* Both multipliers are tested on all 65536 inputs for `16'hFFFF`, and on
  sampled inputs for five other constants and every adder kind.
* `tb_bcse_cm_top` tests four differently configured tops end to end. It also
  requires every 2-bit and 3-bit pattern, a zero group, each adder kind in
  each role, and an adder step carrying past 16 bits to occur.
* `tb_bcse_cm_top_full` runs the default top on every input.
* `tb_bcse_workloads` runs every input through all three adder kinds with
  the worst-case constant.

The testbenches check function, not delay or area. The skip behaviour of the
buffer based cell is a circuit-level delay property, and a two-state RTL
simulation does not show it.

## Simulating

With Verilator 5, from the directory that holds `rtl/` and `tb/`:

```
verilator --binary --timing -Irtl -Itb rtl/bcse_pkg.sv tb/tb_bcse_cm_top.sv \
    --top-module tb_bcse_cm_top -o sim
./obj_dir/sim
```

Replace the testbench name to run any other test. To lint a module, run
`verilator --lint-only -Wall -Irtl rtl/bcse_pkg.sv rtl/<module>.sv`.
