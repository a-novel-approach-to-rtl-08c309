# Ternary reversible barrel shifter

A barrel shifter that works on ternary digits (trits, values 0, 1, 2) and is
built only from *reversible* gates. A reversible gate maps its inputs to its
outputs one-to-one, so no information is lost. Two rules follow from that:

- a wire may never fan out, so every copy of a value has to be made by a gate;
- every gate output the function does not need leaves the circuit as a
  *garbage output*, and every constant a gate needs enters as an *ancilla* input.

The circuit rotates an `N`-trit word left or right by 0 to `2^K - 1`
positions in one combinational pass. The default size is the worked example,
`N = 4` data trits and `K = 2` control trits. Any size with `K >= 2` can be
set by parameters.

## Function and interface

`ternary_barrel_shifter #(N = 4, K = 2)`:

| port        | dir | width (trits)          | meaning |
|-------------|-----|------------------------|---------|
| `data_in`   | in  | `N`                    | data trits `n_0 .. n_{N-1}` |
| `ctrl`      | in  | `K`                    | shift-control trits `K_0 .. K_{K-1}` |
| `dir_right` | in  | 1 bit                  | 0 = rotate left, 1 = rotate right |
| `data_out`  | out | `N`                    | result `p_0 .. p_{N-1}` |
| `garbage`   | out | `garbage_count(N, K)`  | every unused gate output (24 trits at 4, 2) |

Each trit is an unsigned 2-bit value. Code 3 is not a trit and must not be
driven. The shift amount is `s = sum_i b_i * 2^i`, where `b_i = 0` if
`ctrl[i] = 0` and `b_i = 1` if `ctrl[i]` is 1 or 2. Indices wrap modulo `N`:

- left:  `data_out[i] = data_in[i - s]`
- right: `data_out[i] = data_in[i + s]`

Example, `N = 4`: `data_in = (n0..n3) = (2,0,1,1)` with `ctrl = (1,0)`
(`s = 1`) rotated left gives `(1,2,0,1)`, and rotated right gives `(0,1,1,2)`.

There is no clock and no reset. The result settles after one pass through
`K + 1` rows of gates plus the copy chains.

The `garbage` port is there because the circuit is reversible. Together,
`data_out` and `garbage` determine every input. Many garbage trits are
constant or equal to a control input, so synthesis keeps only the
multiplexers behind `data_out`.

## The two gates

**Ternary Feynman gate (`tfg`)**: `P = A`, `Q = (A + B) mod 3`. With `B = 0`
it copies `A`. With `A = B = 0` it outputs two constant zeros.

**Modified Fredkin Gate (`tmfg`)**: `P = A`, `Q = B`. The data pair passes
(`R = C`, `S = D`) when `A < B`; otherwise it is exchanged (`R = D`, `S = C`).
Applying the gate twice gives back the input. If `A` is held at a constant,
`B` becomes a select line, and the gate acts as two 2:1 multiplexers with
opposite selections.

## How the shifter is put together

```
data_in ──► tbs_copy ──► level 1 ──► level 2 ... level K ──► tbs_final ──► data_out
            2^K copies   (tbs_level rows, one control trit each)  direction
            + zeros                                               select
```

### 1. Copy network (`tbs_copy`)

Each data trit goes through a chain of `2^K - 1` Feynman gates. Every gate's
second input is 0. Each gate passes the trit on to the next gate and drops one
copy. The last gate gives both of its outputs, so the chain yields `2^K`
copies. Another `N(K-1)` Feynman gates have both inputs at 0 and produce the
constant zeros that the first MFG row needs.

### 2. Shift levels (`tbs_level`): the part that needs care

A level is a row of MFGs. Each gate has a constant 0 on `A`. The level's
control trit enters `B` of the first gate and is handed along through `Q`.
Every gate in the row therefore passes when `ctrl[l-1] != 0` and exchanges
when it is 0.

For each output trit and each direction there is a binary selection tree over
the `2^K` candidates `data_in[i -/+ t]`. Level `l` halves the candidates
using `b_{l-1}`. Name the nodes after level `l`:

- `L_l(i, m) = data_in[i - m*2^l - (s mod 2^l)]` (left)
- `R_l(j, m) = data_in[j + m*2^l + (s mod 2^l)]` (right)

Here `m = 0 .. 2^K/2^l - 1`.

**Level 1** has `N * 2^K / 2` gates. Gate `t = i*2^(K-1) + m` gets the data
pair `C = data_in[i-2m]` and `D = data_in[i-2m-1]`. Its `S` output is
`L_1(i, m)`. Its `R` output, which the usual multiplexer would throw away, is
exactly the right-direction node `R_1(i-4m-1, m)`. So one row serves both
directions with no garbage except the chain end. In the top module the index
is inverted: right node `(j, m)` reads gate `((j + 4m + 1) mod N)*2^(K-1) + m`.
The copy numbering makes each copy feed exactly one gate input: copy `m` of a
trit goes to a `C` input and copy `2^(K-1) + m` to a `D` input.

**Levels 2 .. K** have one row of `N * 2^K / 2^l` gates for each direction,
placed in the same `tbs_level` row: left gates first, then right gates. Gate
inputs are `C = node(i, 2m)` and `D = node(i, 2m+1)`, and `S` is the new node.
The left and right candidates are now different functions of the data, so no
single gate can make both. This is why these levels need twice as many gates
as the first-level rule would suggest (see *Departures*). The `R` outputs are
garbage. The constant 0 on `A` is not made again: it is the 0 that the level
above returns on `P`.

### 3. Direction stage (`tbs_final`)

`N` MFGs receive the right result on `C` and the left result on `D`. The
first gate's `(A, B)` is the constant pair `(0, 1)` for a right shift and
`(1, 0)` for a left shift, handed along the row through `P` and `Q`. `(0, 1)`
passes `C` to `R`, and `(1, 0)` passes `D`. `R` is `data_out`. `S`, which
carries the other direction, is garbage.

### Garbage bus layout

The bus is filled from index 0 upwards, one level at a time:

1. the chain end `q_end` of the level;
2. for levels 2 and up, that level's `R` outputs;
3. the returned zeros (`P`) that the next level does not use (after level
   `K`, all of them).

The direction stage adds last its `N` `S` outputs and its two chain ends.

## Cost

For the structure as built:

| quantity | formula | (4, 2) |
|---|---|---|
| Feynman gates | `N(2^K - 1) + N(K - 1)` | 16 |
| MFGs | `N*2^(K-1) + 2N*sum_{l=2..K} 2^(K-l) + N` | 20 |
| garbage outputs | `N*sum_{i=1..K-1} 3*2^(K-i-1) + 2(N+1) + K` | 24 |
| ancilla inputs | `(3/2)*N*2^K - N + 2` | 22 |

The ancilla count includes the `N(2^K-1)` zeros on the copy chains, the zeros
made or supplied for level 1, and the two direction constants. The package
`tbs_pkg` computes all four counts (`fe_count`, `mfg_count`,
`garbage_count`, `ancilla_count`), and `garbage_count` sets the width of the
`garbage` port. For every size from `(4,2)` to `(64,6)` with `K <= log2 N`,
the garbage and ancilla counts equal the closed forms above.

## Departures and choices

- **MFG count at levels 2..K.** A lower bound of `N * 2^(K-l)` MFGs per level
  (16 MFGs in all at (4, 2)) would be enough for one direction only. Level 1
  reaches that count for both directions, as shown above. Deeper levels need
  a second row for the other direction, so this design has 20 MFGs at (4, 2)
  instead of 16, and 36 gates in total instead of 32. The garbage and ancilla
  counts are not affected.
- **MFG input assignment.** The constant 0 goes on `A` and the control on
  `B`. Putting the control on `A` with a constant 0 on `B` would never pass
  the data, and putting data on `B` would compare data against the control.
- **Control trits.** A control trit is read as a binary "shift or not": 1 and
  2 both shift. Nothing defines what the value 2 should mean.
- **Rotation.** The shift is a rotation. The first-level pairs wrap
  (`n_0` is paired with `n_3`), and no fill value is defined.
- **Encoding.** A trit is a 2-bit unsigned code.
- **Ancillas and direction.** Ancillas are internal constants. For `K >= 4`
  the zero-generating Feynman gates make fewer zeros than level 1 needs, and
  the rest are plain constant zeros. The direction is a 1-bit input that
  chooses the constant pair.
- **Minimum size.** `K >= 2` is required; the module stops elaboration
  otherwise.
- **Garbage wiring.** The wiring of garbage lines and the order of copies
  follow from the construction above. They are not taken from a drawing.

## Files

| file | contents |
|---|---|
| `rtl/tbs_pkg.sv` | `trit_t`, GF(3) addition, count functions |
| `rtl/tfg.sv` | ternary Feynman gate |
| `rtl/tmfg.sv` | Modified Fredkin Gate |
| `rtl/tbs_copy.sv` | copy chains and zero generators |
| `rtl/tbs_level.sv` | one MFG row with its control chain |
| `rtl/tbs_final.sv` | direction stage |
| `rtl/ternary_barrel_shifter.sv` | top level: wiring of all levels, garbage bus |
| `tb/*_tb.sv` | one self-checking testbench per module, plus `tbs_workloads_tb` |

## Verification

Each testbench prints `TB_RESULT checks=<n> failures=<n>` and stops itself
through a watchdog if it hangs.

- `tfg_tb` and `tmfg_tb` test every input combination. `tmfg_tb` also checks
  that the gate is a bijection and its own inverse.
- `tbs_copy_tb`, `tbs_level_tb` and `tbs_final_tb` use random trits.
- `ternary_barrel_shifter_tb` runs the default (4, 2) shifter on all 1458
  inputs: 81 data words × 9 control words × 2 directions. It compares each
  result with a rotation computed in the testbench. It checks that all 1458
  `(data_out, garbage)` words are distinct, which shows the circuit is
  reversible. It also confirms that left, right, each shift amount 0..3 and
  control values 1 and 2 all occurred.
- `tbs_workloads_tb` builds the shifter at 15 sizes, from (4,2) to (64,6).
  It checks the garbage and ancilla counts and applies 300 random rotations
  per size.

Simulate with Verilator 5, for example:

```
verilator --binary --timing --assert -Irtl rtl/tbs_pkg.sv rtl/tfg.sv rtl/tmfg.sv \
  rtl/tbs_copy.sv rtl/tbs_level.sv rtl/tbs_final.sv rtl/ternary_barrel_shifter.sv \
  tb/ternary_barrel_shifter_tb.sv --top-module ternary_barrel_shifter_tb
./obj_dir/Vternary_barrel_shifter_tb
```

`tbs_workloads_tb` elaborates 15 shifters, up to 10 000 gates, and takes
a few minutes to compile. To try another size, override `N` and `K` on the
top module. The `garbage` port width follows `tbs_pkg::garbage_count(N, K)`.
