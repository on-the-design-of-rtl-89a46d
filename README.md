# Modular adder with a carry-save stage and two parallel binary adders

This is a combinational adder that computes `R = (X + Y) mod m` for a fixed
modulus `m`. Both operands and the result are `n = ceil(log2 m)` bits wide, and
both operands must be below `m`. Adders like this are the basic cell of
residue-number-system (RNS) datapaths, modular multipliers and
residue-to-binary converters.

The usual approach adds `X + Y`, then subtracts `m` and picks one of the two
results. That puts two carry chains in series. This design removes the series
chain. Both candidate results are computed at the same time, and the
comparison comes for free from one of them:

```
           | X + Y + M  (mod 2^n)   if X + Y + M >= 2^n
 R   =     |
           | X + Y                  otherwise

 where M = 2^n - m   (the n-bit two's complement of m)
```

`X + Y + M >= 2^n` holds exactly when `X + Y >= m`. So the carry of weight
`2^n` from the adder that forms `X + Y + M` is also the select signal for the
output. The critical path is one `(n-1)`-bit carry-propagate adder, one OR gate
and one 2:1 multiplexer.

## Block structure

```
             x  y                           x  y   M (constant)
             |  |                           |  |   |
             |  |        +------------------v--v---v-----------------+
             |  |        | Adder B  (adder_b)                        |
             |  |        |   CSA row (csa_stage, n x csa_cell)       |
             |  |  S, C  |        | S      | C                       |
             |  +<-------+--------+--------+                         |
             v  v        |   Adder D (adder_d)                       |
        +-----------+    |     (n-1)-bit adder (prefix_adder)        |
        | Adder A   |    |     + OR gate -> weight-2^n bit           |
        | (adder_a) |    +----------+---------------------+----------+
        +-----+-----+               | low n bits          | weight 2^n
              | X+Y                 | X+Y+M mod 2^n       |
              v 0                   v 1                   |
          +---------------------------------+             |
          |  n 2:1 multiplexers (result_mux)|<------------+ sel
          +----------------+----------------+
                           v
                           R
```

| Module | Role |
|---|---|
| `modular_adder` | Top. Parameters `MOD` (default 19) and `N` (default `$clog2(MOD)`). |
| `adder_b` | Three-operand adder `X + Y + M`: CSA row plus Adder D. Also outputs the CSA vectors. |
| `csa_stage` | Row of `n` cells that reduces `X`, `Y` and the constant `M` to vectors `S` and `C`. |
| `csa_cell` | One CSA bit: an HA cell where `M_i = 0`, an HA* cell where `M_i = 1`. |
| `adder_d` | Adds `S` and `C` with an `(n-1)`-bit adder. The top bit is an OR gate. |
| `adder_a` | `n`-bit adder for `X + Y` that reuses the CSA outputs as its propagate and generate bits. |
| `prefix_adder` | Generic `W`-bit adder, used as the `(n-1)`-bit adder in Adder D. |
| `lf_carry_unit` | Ladner-Fischer parallel-prefix carry computation, used by both adders. |
| `result_mux` | `n` 2:1 multiplexers. Input 0 is Adder A, input 1 is Adder B. |

Every module is combinational. There is no clock, reset or handshake. The
result is valid one combinational delay after the operands change.

## The carry-save row: HA and HA* cells

`M` is a constant, so a full carry-save adder for three operands is wasted.
At each bit position one of the three inputs is a known 0 or 1, and the cell
becomes a two-input cell:

| `M_i` | cell | identity | `s_i` | `c_i` (weight `2^(i+1)`) |
|---|---|---|---|---|
| 0 | HA  | `x + y = 2(x AND y) + (x XOR y)`      | `x XOR y`  | `x AND y` |
| 1 | HA* | `x + y + 1 = 2(x OR y) + (x XNOR y)`  | `x XNOR y` | `x OR y`  |

After the row, `X + Y + M = S + 2C`. For the default modulus 19: `n = 5` and
`M = 13 = 01101b`. From bit 4 down to bit 0 the row is HA, HA*, HA*, HA, HA*.

The top bit of `M` is always 0, because `m > 2^(n-1)`. So bit `n-1` is always
an HA cell and `c_{n-1} = x_{n-1} AND y_{n-1}`.

## Adder D and why its top gate is an OR

`C` has weight one place above `S`. Adder D therefore:

* takes bit 0 of the result straight from `s_0`;
* adds `s[n-1:1]` and `c[n-2:0]` in an `(n-1)`-bit adder, giving result bits
  `n-1..1` and a carry out `cout`;
* forms the bit of weight `2^n`.

By plain arithmetic, the bit of weight `2^n` is `c_{n-1} XOR cout`. Bit
`n+1` would be `c_{n-1} AND cout`. The design uses `c_{n-1} OR cout`, which
is correct because the two are never 1 together when `X, Y < m`.

If `c_{n-1} = 1`, then both `x_{n-1}` and `y_{n-1}` are 1. The `(n-1)`-bit
adder then sees what is left of `X + Y + M` after removing `2^n` and `s_0`:
`X + Y - m - s_0`. This is below `m < 2^n`, so the `(n-1)`-bit part cannot
carry out, and `cout = 0`.

The OR therefore adds no delay beyond the XOR. `adder_d` on its own has
another property, which its testbench checks for every `S` and `C`: the OR
equals `S + 2C >= 2^n`. That is exactly the select condition.

This is the one place where the operand range matters in the hardware. With
operands outside `[0, m)`, the result is undefined.

## Adder A shares work with the CSA row

Adder A needs a propagate bit `p_i = x_i XOR y_i` and a generate bit
`g_i = x_i AND y_i` at every position. The CSA row has already formed most of
them:

* where `M_i = 0` (HA): `p_i = s_i` and `g_i = c_i`, with no extra gates;
* where `M_i = 1` (HA*): `p_i = NOT s_i`, and only `g_i` needs its own AND gate.

`adder_a` takes `S` and `C` as inputs and does this sharing explicitly, so
Adder A costs little more than its carry tree and sum XORs. That is why the
architecture is small for narrow operands even though it has two full
adders. Because of the sharing, lint reports some bits of `x`, `y` and `c`
in `adder_a` as unused. Which bits those are depends on `M`.

Adder A's carry out is not needed. If `X + Y >= 2^n`, then `X + Y >= m` too,
and Adder B's result is selected. `modular_adder` has an immediate assertion
that checks this.

## Carry computation

Both binary adders use `lf_carry_unit`, a parallel-prefix tree of the
Ladner-Fischer family. The prefix operator is
`(g, p) o (g', p') = (g | p&g', p&p')`. The tree has `ceil(log2 W)` levels.
At level `l`, every bit `i` whose bit `l-1` is set combines with bit
`j = (i >> l << l) + 2^(l-1) - 1`. This is the minimum-depth member of the
family, also known as the Sklansky tree. The carry into bit 0 is always zero,
so neither adder has a carry input.

## Parameters and sizes

`modular_adder #(.MOD(m))` builds the adder for any modulus `m >= 3`. `N` is
derived from it and should not be set by hand. Elaboration reports an error
if `MOD < 3` or `N != ceil(log2 MOD)`.

The default is `MOD = 19`, the small worked example of the architecture. The
moduli used to compare delay, area and power against an earlier
design are 29, 41, 97, 211 and 453 (`n` = 5 to 9). All of them are tested
exhaustively (see below). Powers of two work (`M = 0`, all HA cells), and so do
moduli of the form `2^k + 1`.

With yosys coarse synthesis, the default build is about 40 word-level cells
and contains no flip-flops.

## Where this RTL makes its own choices

These points are this implementation's own, not part of the architecture:

* The Sklansky member of the Ladner-Fischer family. The architecture names
  only the family.
* Adder A takes its propagate and generate bits from `S` and `C` in RTL. The
  architecture describes this sharing as an area saving. Its block diagram
  draws Adder A fed from `X` and `Y`, and the two give the same function.
* A default of `MOD = 19`.
* No registers. If the adder is placed in a pipeline, register its inputs or
  outputs outside it.
* Operands at or above `m` are not detected.

The published delay, area and power figures came from a 0.25 µm standard-cell
flow. Simulation cannot reproduce them, and this RTL makes no claim about them.

## Verification

Each module has a self-checking testbench in `tb/`. Each one ends with a line
`TB_RESULT checks=<n> failures=<n>` and has a watchdog.

| Testbench | What it checks |
|---|---|
| `tb_csa_cell` | Both cell kinds, all inputs: `s + 2c = x + y + M_i`. |
| `tb_csa_stage` | All 32x32 operand pairs for the modulo-19 row: `S + 2C = X + Y + 13`, plus the bitwise cell equations. |
| `tb_lf_carry_unit` | Exhaustive at width 4. Random at widths 9 and 16. Reference is a ripple recurrence. |
| `tb_prefix_adder` | Exhaustive at widths 1, 4, 5 and 8. |
| `tb_adder_a` | All operand pairs at `n = 5, M = 13` and `n = 6, M = 23`, with `S` and `C` computed independently. |
| `tb_adder_d` | All `S`, `C` at `n = 5`: low bits, and weight-2^n bit = `S + 2C >= 32`. Both OR inputs are seen set. |
| `tb_adder_b` | All operand pairs below 19: `X + Y + 13`, the select bit, and `S + 2C`. |
| `tb_result_mux` | Random data, both select values. |
| `tb_modular_adder` | Default build, all 361 pairs, zero latency. Counts each mechanism and fails if one never occurs. |
| `tb_modular_adder_moduli` | Exhaustive for m = 29, 41, 97, 211, 453, 19, 3, 16, 256, 17, 257, 31. |

`tb_modular_adder` counts these mechanisms: the Adder A result selected, the
Adder B result selected, `c_{n-1}` set, Adder D's carry out set, and Adder A
overflowing. It also fails if both inputs of the OR are ever 1 together.

`tb_modular_adder_moduli` uses the helper `modadd_checker`, which applies
every pair `X, Y < m`. That is about 395,000 checks in total.

To run a testbench with Verilator 5:

```
verilator --binary --timing --assert -Wall -Wno-fatal -y rtl -y tb +libext+.sv \
          --top-module tb_modular_adder tb/tb_modular_adder.sv
./obj_dir/Vtb_modular_adder
```

Replace the top module name to run any other testbench. Lint reports a few
`UNUSEDSIGNAL` warnings:

* in `adder_a`, the operand and carry bits that the sharing makes unnecessary;
* in `lf_carry_unit`, low propagate bits of the last tree level, which nothing
  reads once a group reaches bit 0.

Synthesis removes both.
