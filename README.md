# MHSD adder: a hybrid signed digit adder with bounded carry chains

A ripple-carry adder is small and frugal, but its carry may have to travel
the whole word. A fully signed-digit adder is carry-free and fast, but every
digit costs two wires and a more complex cell. A *hybrid signed digit* (HSD)
number sits between the two: most positions are plain bits, and every
`D+1`-th position is a radix-2 signed digit in {-1, 0, +1}. A signed position
works out its carry from its own two digits alone, so it absorbs whatever
carry arrives from below and starts a fresh one. Carries therefore ripple
through at most `D` plain positions, all chains at once, and the delay grows
with `D`, not with the word length. `D` sweeps the whole range: `D = 0` is a
fully signed-digit adder, and `D >= N` is a plain ripple-carry adder.

This RTL implements the *modified* HSD (MHSD) adder. It differs from the
classic HSD adder in one way: **a signed position never passes a negative
carry upward.** Its carry can be -1, 0 or +1. The +1 goes on to the next
position as an ordinary unsigned carry. A -1 is not passed on: it leaves the
adder on an extra output bit. Every carry inside the adder is therefore a
plain 0/1 bit. The unsigned positions are textbook full adders, and a signed
cell's carry input is a single bit.

## Files

| file | contents |
|---|---|
| `rtl/mhsd_pkg.sv` | digit type `sd_digit_t`, function `is_signed_pos` |
| `rtl/rca_cell.sv` | unsigned position: full adder |
| `rtl/sd_cell.sv` | signed position: signed digit adder cell |
| `rtl/mhsd_interface.sv` | splits a signed cell's carry into "pass on" and "bring out" |
| `rtl/mhsd_adder.sv` | the N-digit adder, parameters `N` (default 32) and `D` (default 1) |
| `tb/mhsd_ref_pkg.sv` | reference model used by the testbenches |
| `tb/tb_*.sv` | self-checking testbenches |

## Number format

Each position of an operand is a two-wire `sd_digit_t {s, a}`:

| digit | s | a |
|---|---|---|
| -1 | 1 | 1 |
|  0 | 0 | 0 |
| +1 | 0 | 1 |

The code `10` is unused and must not be applied at a signed position.
Position `i` (0 is the LSB) is signed when `i mod (D+1) == D`. With `D = 1`,
the odd positions are signed. With `D = 15` on 32 digits, positions 15 and
31 are signed. At an unsigned position only `a` counts: the adder ignores
the input `s`, and it drives the output `s` to 0. All positions have the
same layout, so changing `D` never changes the port list.

The value of a word is `sum_i (a_i - 2*s_i) * 2^i`.

## The signed digit cell (`sd_cell`)

This is the part that needs care. The cell adds digits `x` and `y` and an
incoming carry `v_in`. Because of the MHSD rule above, `v_in` is always 0
or 1. The cell works in two steps:

1. It writes `x + y = 2c + t`, with the intermediate digit `t` in {-1, 0}.
   Since `v_in >= 0`, this is the choice that guarantees `t + v_in` stays in
   {-1, 0, +1}. `t` is non-zero exactly when one input is zero and the other
   is not, so `|t| = x.a ^ y.a`.
2. The output digit is `z = t + v_in`, which gives
   `z.a = (x.a ^ y.a) ^ v_in` and `z.s = (x.a ^ y.a) & ~v_in`.

The carry `c` in {-1, 0, +1} travels as the difference of two bits, `c = v - w`:

* `w = x.s | y.s`. If an input is negative, the carry is in {-1, 0}.
* `v = ~((x.s & y.s) | ~(x.a | y.a))`. `v` is 0 only for 0+0 and for -1+-1.

| x + y | t | c | v | w |
|---|---|---|---|---|
| 0 + 0 | 0 | 0 | 0 | 0 |
| 0 + 1 | -1 | +1 | 1 | 0 |
| 1 + 1 | 0 | +1 | 1 | 0 |
| -1 + 0 | -1 | 0 | 1 | 1 |
| -1 + 1 | 0 | 0 | 1 | 1 |
| -1 + -1 | 0 | -1 | 0 | 1 |

`v` and `w` do not depend on `v_in`. This independence is what bounds the
carry chains.

`tb_sd_cell` checks this cell exhaustively, over all 18 valid input
combinations.

## Interface logic and the result format (`mhsd_interface`)

After each signed cell at position `i`:

* `c = v & ~w` is the unsigned carry into position `i+1`.
* `nl = w & ~v` flags a carry of -1. It leaves the adder as `nl[i]`, with
  weight `-2^(i+1)`.

So the result is not in the operand format. It has one extra, negatively
weighted bit per signed position:

    value(z) - sum_i nl[i] * 2^(i+1) + cout * 2^N  =  value(a) + value(b) + cin

This RTL does not convert the result back to the operand format. A
downstream user must either consume this form or add a digit-set converter.
Such a converter is a separate design task and is not included here.

## Unsigned positions (`rca_cell`)

These are plain full adders: `s = a ^ b ^ ci` and
`co = a&b | ci&(a|b)`. Every carry that reaches them is 0 or 1.

## Word ends

`cin` (a 0/1 carry into position 0) and `cout` (the carry out of the top
position) are additions of this design. They make the adder exact and let
words be chained. If the top position is signed, its positive carry goes to
`cout` and its negative carry to `nl[N-1]`.

## Timing

The adder is purely combinational: no clock, no registers, no reset. The
longest path is: signed cell (or `cin`), then `D` full adders, then the
signed cell above them. The critical path therefore grows linearly in `D`.

Two adjacent positions of the `D = 1` adder take 62 transistors at gate
level, against 74 for the classic HSD cells. Published gate-level results for
32-bit adders of this kind show the same trend: power changes only a little across the whole `D`
range (about 115 to 175 uW). Delay changes a lot (about 11 ns down to
0.5 ns). The most redundant end is therefore the best in energy and in
energy-delay product. This RTL makes no power or delay claims of its own.

## Where this RTL departs from the reference description, or adds to it

* A -1 carry arises only for -1 + -1. Loose wording sometimes says "any
  negative input gives a -1 carry". That is true only of `w`, which limits
  the carry to {-1, 0}.
* Added by this design: `cin`/`cout`, the uniform two-wire operand layout,
  and the top-position behaviour.
* The classic HSD adder (signed carries into unsigned positions), which the
  MHSD adder improves on, is not included.

## Verification

| testbench | what it does |
|---|---|
| `tb_rca_cell` | all 8 input cases |
| `tb_mhsd_interface` | all 4 `(v, w)` cases |
| `tb_sd_cell` | all 18 valid cases: the sum identity, digit code validity, carry range by input sign, intermediate digit in {-1, 0}, and that `v`, `w` do not depend on `v_in` |
| `tb_mhsd_adder` | default `N = 32`, `D = 1`, no overrides; 20,000 random operand pairs plus directed words; details below |
| `tb_mhsd_sweep` | every `D` from 0 to 32 at `N = 32`, random operands, and a directed word whose carry ripples from `cin` through the full unsigned run |

`tb_mhsd_adder` checks each result three ways:

* digit by digit against an arithmetic reference model (`mhsd_ref_pkg`),
  which uses digit values, not the cell equations;
* by value;
* for locality: it rewrites all digits below a random signed position and
  checks that nothing above it changes.

It also counts each mechanism and fails if one never occurred:

* negative carry brought out;
* positive carry passed on;
* full-length ripple;
* output digits -1 and +1;
* carry out.

## Simulating

With Verilator 5, from the directory that holds `rtl/` and `tb/`:

    verilator --binary --timing --assert -Irtl -Itb \
        rtl/mhsd_pkg.sv tb/mhsd_ref_pkg.sv tb/tb_mhsd_adder.sv \
        --top tb_mhsd_adder -y rtl
    ./obj_dir/Vtb_mhsd_adder

Every testbench ends with a line `TB_RESULT checks=<n> failures=<m>`. To build
another distance, instantiate `mhsd_adder #(.N(32), .D(d))`. The reference
model handles words of up to 62 digits.
