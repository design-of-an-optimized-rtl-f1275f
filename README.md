# Sampoornam: an input-aware Vedic multiplier

Each multiplication scheme taken from Vedic arithmetic is cheap for some operands
and expensive for others. Squaring costs about half of a general product. A
Nikhilam product of two numbers close to a power of two reduces to one small
multiplication plus some additions. A product with a power of two is only a
shift. Sampoornam ("complete") holds one unit of each kind and uses a small logic
block to look at the operands. Per operand pair it turns on the one unit that
suits them and routes that unit's product to the output. Units that are not
chosen get all-zero operands, so they do not toggle.

The RTL is fully combinational. It has no clock, no registers and no reset. A
product is ready one propagation delay after the operands change. The default
size is N = 128: two 128-bit unsigned operands give a 256-bit product.

## Selecting a unit

The base is b = 2^(N-1) and the threshold width is TS = N/4, so t = 2^TS - 1 (32
bits at N = 128). An operand is **above** the base if it lies in (b, b + t]. It
is **below** the base if it lies in [b - t, b). For both of these tests the
bit pattern is enough; no adder is needed:

| test  | bit N-1 | bits N-2..TS | bits TS-1..0 |
|-------|---------|--------------|--------------|
| above | 1       | all 0        | not all 0    |
| below | 0       | all 1        | not all 0    |

The logic block (`sampoornam_logic`) first orders the operands: `op_hi` is the
larger one and `op_lo` the other. The order comes from the carry out of one N-bit
carry look-ahead subtraction x - y. The zero flag of that same difference gives
x = y. Eight requests then go into an 8:3 priority encoder (`priority_encoder8`),
where the highest request wins:

| code | request                      | unit / product                  |
|------|------------------------------|---------------------------------|
| 111  | x = b                        | left shift: y << (N-1)          |
| 110  | y = b                        | left shift: x << (N-1)          |
| 101  | x = y                        | `ut_square` on x                |
| 100  | op_hi above, op_lo below     | `nikh_sg`                       |
| 011  | both below                   | `nikh_ss`                       |
| 010  | both above                   | `nikh_gg`                       |
| 001  | neither operand is zero      | `vedic_ut` (general case)       |
| 000  | x = 0 or y = 0               | constant 0                      |

The code is an output (`sel`, of type `vedic_pkg::design_sel_e`), so the unit
that was used can be seen from outside. Each unit's operands are ANDed with its
own enable, which is decoded from `sel`. An assertion checks that at most one
enable is high at a time.

Because the operands are ordered, the mixed case needs only one unit
(`op_hi` above, `op_lo` below). The reverse cannot happen.

## The general multiplier: Urdhva Tiryakbhyam with a three-product split

`vedic_ut` multiplies two N-bit numbers for N = 2, 4, 8, ..., 128.

* **Leaves.** `vedic_ut2` is four AND gates and two half adders.
  `vedic_ut4` forms each output column the "vertically and crosswise" way: the
  column's partial products are added to the carry from the column before, and
  the result gives one product bit plus a carry into the next column.
* **Scaling.** A 2n-bit multiplier (`vedic_utN`, built from
  `karatsuba_stage`) splits A = {AH, AL} and B = {BH, BL} into n-bit halves.
  It uses three n-bit multipliers, not four:
  * X = AH·BH and Y = AL·BL.
  * For the middle term, the sums Z1 = AH + AL and Z2 = BH + BL are n+1 bits wide.
    Only their low n bits go through the third multiplier, giving T1.
  * The top bits of Z1 and Z2 are handled by AND-gated copies of the other
    sum, shifted by n. These are T2 and T3.
  * The AND of the two top bits is a single bit at position 2n.
  * Z1·Z2 = T1 + T2 + T3 + that bit, and the cross term is
    R = Z1·Z2 - X - Y = AH·BL + AL·BH.
  * The product is X·2^(2n) + R·2^n + Y. X and Y do not overlap, so this is a
    single 3n-bit addition of R onto {X, upper half of Y}.
* A 128-bit product therefore uses 3^5 = 243 four-bit leaf multipliers.

The wrapper `vedic_ut` picks the per-size module (`vedic_ut8` ... `vedic_ut128`)
with a generate chain. Any size outside 2..128 stops elaboration with an
error. The per-size modules exist because the simulator used for verification
does not handle a module that instantiates itself.

## Squaring

`ut_square` uses the same split. A² = AH²·2^(2n) + 2·AH·AL·2^n + AL². Two half-size
squarers give the outer terms, and one half-size `vedic_ut` gives AH·AL. The
factor 2 is a wire shift, so everything is combined in one 3n-bit addition
(`square_stage`).

The leaves use two facts about squares:

* each crosswise product appears twice, so it is wired in one bit position higher;
* a_i·a_i = a_i, so the vertical terms need no gate.

For example, the 2-bit squarer `ut_square2` has only one AND gate.

## Nikhilam near the base

With r = 2^(N-1), let the excess of an operand above the base be a and its
deficit below the base be q. Each fits in TS bits.

* **both above** (`nikh_gg`): (r+a)(r+b) = r(r + a + b) + a·b. Because 2·TS < N-1,
  the three fields do not overlap. The product is the concatenation
  {1, a+b, a·b}, built from one TS-bit adder and one TS-bit `vedic_ut`. Only the
  low TS bits of each operand are ports.
* **both below** (`nikh_ss`): (r-a)(r-b) = r(x - b) + a·b. This needs two TS-bit two's
  complements, one N-bit subtraction and one TS-bit multiplication. It is again a
  concatenation.
* **one above, one below** (`nikh_sg`): (r+a)(r-q) = r(y + a) - a·q. This needs one N-bit
  addition, one TS-bit multiplication and one 2N-bit subtraction.

A 128 x 128 product near the base costs one 32 x 32 multiplication.

## Adders

Every addition and subtraction goes through `cla_adder`, a W-bit carry look-ahead
adder:

* Each bit has generate g = a·b, propagate p = a ⊕ b and sum s = p ⊕ c. These
  are the "partial full adder" equations.
* The group generate and propagate are combined in a log2(W)-level
  parallel-prefix network.
* Subtraction is a + ~b with carry in 1.

The prefix network replaces the 4-bit block hierarchy that is usual for CLAs.
It produces the same carries, is written once for any width, and keeps the
netlist small enough to simulate the 128-bit design quickly.

## Where this RTL departs from, or fills in, the original description

* Base b = 2^(N-1). The threshold is a TS-bit offset with TS = N/4 (2, 4, 8, 16 and
  32 bits for 8 to 128-bit operands). The ranges include b + t and b - t.
* The mixed Nikhilam range is read as y in (b - t, b).
* Code 111 (x = b) shifts y, and code 110 (y = b) shifts x.
* Priority-encoder input 1 is "neither operand is zero", not a constant 1.
  That way code 000 appears only for a zero operand.
* Operands are ordered before the range tests, so only one mixed-case
  unit is needed.
* Units are isolated by gating their operands to zero. There is no clock or power
  gating. Note that `nikh_gg` with zero inputs still outputs its constant r² term.
* Two schemes are **not** part of this multiplier, because the integrated design
  leaves them out:
  * the difference-of-squares multiplier (Design D), which needs operands of
    equal parity and costs more than `vedic_ut`;
  * bit-by-bit (successive) Nikhilam, which is a long chain of adders.
* Area, power and delay figures are a synthesis matter. Nothing here reproduces
  them. The per-class power estimate (the probability of each class times the
  unit's power) can be fed with the selection counts that the end-to-end
  testbench prints.

## Files

| file | contents |
|------|----------|
| `rtl/vedic_pkg.sv` | `design_sel_e`, the 3-bit select codes |
| `rtl/sampoornam.sv` | top: logic block, five units, operand gating, output mux |
| `rtl/sampoornam_logic.sv` | operand ordering, range/equality tests, encoder |
| `rtl/priority_encoder8.sv` | 8:3 priority encoder |
| `rtl/vedic_ut*.sv`, `rtl/karatsuba_stage.sv` | general multiplier, 2..128 bits |
| `rtl/ut_square*.sv`, `rtl/square_stage.sv` | squarer, 2..128 bits |
| `rtl/nikh_gg.sv`, `rtl/nikh_ss.sv`, `rtl/nikh_sg.sv` | Nikhilam units |
| `rtl/cla_adder.sv` | carry look-ahead adder, any width |
| `tb/tb_*.sv` | one self-checking testbench per block |
| `tb/sel_ref_pkg.sv` | reference model of the unit selection, written with plain comparisons |

Parameters: `N` (operand width, default 128), `TS` (threshold width, default N/4)
on the top, the logic block and the Nikhilam units; `N` on `vedic_ut` /
`ut_square`; `W` on `cla_adder`.

## Simulating

Every testbench prints `TB_RESULT checks=<n> failures=<n>` and stops on its own.
Each also has a watchdog. For example, the full-size end-to-end test:

```
verilator --binary --timing --assert -Irtl -Itb -y rtl \
    rtl/vedic_pkg.sv tb/sel_ref_pkg.sv tb/tb_sampoornam.sv \
    --top-module tb_sampoornam -j 4
./obj_dir/Vtb_sampoornam
```

It builds in about a minute and runs in well under a second. Other blocks follow
the same pattern with their own testbench. Add `tb/sel_ref_pkg.sv` for
`tb_sampoornam_logic` and `tb_sampoornam8`.

What the testbenches cover:

* `tb_sampoornam`: 128-bit top with default parameters. 1200 operand pairs are
  drawn in turn from every selection class, in both operand orders, plus
  corner pairs. It checks the product, the code and the isolation of every
  unused unit. It counts how often each code and the operand swap happened, and
  fails if any never did.
* `tb_sampoornam8`: the top at N = 8, all 65536 pairs.
* `tb_sampoornam_logic`: N = 8 exhaustively plus 128-bit directed cases, against
  the reference model.
* `tb_vedic_ut`, `tb_ut_square`: every size from 8 (or 2) to 128 against the
  simulator's own multiplication; the 2- and 4-bit leaves are tested
  exhaustively.
* `tb_nikh_*`: N = 8, 16 and 128, random offsets up to the threshold,
  including the extremes.
* `tb_cla_adder`: widths 1 to 256 with random and carry-chain patterns.
