# Binary counters built from bit-sorting networks

A *counter* in the arithmetic sense is a circuit that takes n bits of equal
weight and outputs, in binary, how many of them are 1. A (7,3) counter takes
seven bits and produces a 3-bit count; a (15,4) counter takes fifteen bits and
produces a 4-bit count. Both are *saturated*: every count their inputs can
produce fits their outputs exactly. Multipliers and multi-operand adders use
such counters to shrink columns of partial-product bits. The usual way to build
one is a tree of full adders. Each full adder is a (3,2) counter, and the carry
and sum chains limit the speed.

This RTL takes a different route:

1. Split the inputs into two groups. The (7,3) counter uses groups of 4 and 3;
   the (15,4) counter uses groups of 8 and 7.
2. Sort each group with a bit-sorting network, so that all its 1s move to the
   top lines. A sorted group of k bits is a *thermometer code*. Line m is 1
   exactly when the group holds at least m ones.
3. Turn each thermometer code into a *one-hot code*. The sorted group
   `H1..H4` gives `P0..P4`, and `Pa = 1` means the group holds exactly `a`
   ones. The second group gives `Q0..Q3` in the same way.
4. The total count is `a + b`, where `Pa` and `Qb` are the two active bits.
   Each output bit is then an OR of two-input ANDs `Pa & Qb`. Sorting removed
   all the carry logic.

## Sorting bits with OR and AND

A bit sorter for two inputs needs no comparator. For single bits,
`max(a,b) = a | b` and `min(a,b) = a & b`. `sorter2` is that gate pair. Every
network below is built from `sorter2` cells, and its depth in sorter layers
equals its depth in gate levels. All networks sort in descending order. Line
`s[0]` is the top (H1 or I1) and collects the 1s.

| module | lines | sorters | layers | structure |
|---|---|---|---|---|
| `sn3` | 3 | 3 | 3 | (0,1), (1,2), (0,1) |
| `sn4` | 4 | 5 | 3 | (0,1)(2,3), (0,2)(1,3), (1,2) |
| `sn8` | 8 | 19 | 6 | Batcher odd-even merge sort |
| `sn7` | 7 | 16 | 6 | `sn8` with its bottom line removed |

The 8-line schedule is in the package `sn_pkg` as a table of
`{valid, upper line, lower line}` entries, one row per layer. `sn8` and `sn7`
expand it with generate loops. Each line of each layer becomes either the
upper end of a `sorter2` or a wire.

`sn7` uses the same table with line 7 declared absent. Every sorter that
touches line 7 is dropped: three of them, one each in layers 0, 1 and 3. This
is safe because a missing bottom line acts like a constant 0. In a descending
network, a sorter between any line and a constant-0 bottom line passes its
upper input straight through, so the remaining seven lines still sort
correctly, and the depth stays six.

## From sorted groups to the count

`onehot_code` turns a thermometer code of N lines into N+1 one-hot bits:

```
P0 = ~H1      Pa = Ha & ~H(a+1)   (0 < a < N)      PN = HN
```

The most significant output bit needs only the sorted lines. For the (7,3)
counter, C2 is 1 when the count reaches 4, which happens when
`a + b >= 4`:

```
C2 = H4 | H3&I1 | H2&I2 | H1&I3
```

This is the same function as the OR of all `Pa & Qb` with `a + b >= 4`, but
with four terms instead of ten. `count_encoder` produces this term for any
threshold `T = 2^(W-1)` as the OR over `m + k = T` of `Hm & Ik`, taking
`H0 = I0 = 1`.

Each lower bit k is the OR of `Pa & Qb` over all pairs (a, b) whose sum has
bit k set. For the (7,3) counter:

```
C1 = OR of Pa&Qb for a+b in {2, 3, 6, 7}
S  = OR of Pa&Qb for a+b in {1, 3, 5, 7}
```

The (15,4) counter uses the same encoder with `NH=8, NI=7, W=4`:

- C3 is `count >= 8`, taken from H and I.
- C2, C1 and S are ORs of products `Pa & Qb`.

Synthesis is free to share and reduce these OR terms. The RTL lists them in
their plain form.

## Modules and timing

All of the logic is combinational: there is no clock, no reset and no state.
A result is valid one propagation delay after its input changes.

| module | role | depth (gate levels) |
|---|---|---|
| `sorter2` | OR/AND compare-exchange | 1 |
| `sn3`, `sn4` | 3- and 4-way sorters | 3 |
| `sn7`, `sn8` | 7- and 8-way sorters | 6 |
| `onehot_code #(N)` | thermometer to one-hot | 1 |
| `count_encoder #(NH,NI,W)` | output equations | AND level + OR tree |
| `counter_7_3` | `x[3:0]` to `sn4`, `x[6:4]` to `sn3`; `cnt = {C2,C1,S}` | |
| `counter_15_4` | `x[7:0]` to `sn8`, `x[14:8]` to `sn7`; `cnt = {C3,C2,C1,S}` | |
| `sn_counters_top` | both counters side by side, separate ports | |

The top's ports are `x7[6:0] -> cnt7[2:0]` and `x15[14:0] -> cnt15[3:0]`.
The two counters share nothing. Synthesized, the (7,3) counter is about 70
word-level cells and the (15,4) counter about 280, before any technology
mapping.

`count_encoder` stops elaboration with an error if `NH + NI` does not lie
between `2^(W-1)` and `2^W - 1`. Outside that range the threshold form of the
top bit would be wrong.

## What is fixed by the method and what is a choice here

These parts come from the method itself:

- the asymmetric 4 + 3 and 8 + 7 splits;
- sorting each group with a network of three (4- and 3-way) or six (8- and
  7-way) sorter layers;
- the 7-way network derived from the 8-way one by removing one line;
- the one-hot codes;
- taking the top bit from the condition "the two subscripts add up to at
  least the threshold".

These parts are this design's own choices:

- **Comparator placement.** The 3- and 4-way networks are the standard
  minimal ones. The 8-way network is Batcher's odd-even merge sort, and it has
  the required depth of six.
- **Line removed for `sn7`.** It is the bottom line.
- **Input split.** The low input bits go to the larger network. The count does
  not depend on this.
- **Lower output bits.** Their equations are derived as described above and
  have not been hand-minimized.
- **Output packing.** Outputs are packed as one vector with the LSB (S) at
  bit 0.

This RTL does not model power or delay. Circuit-level results for this style
of counter come from a transistor-level implementation. In a standard-cell
flow, the delay depends on how synthesis maps the OR trees. The conventional
full-adder (7,3) compressor, which this method is meant to replace, is not
included.

## Verification

Every module has a self-checking testbench in `tb/`. Each one ends by
printing `TB_RESULT checks=N failures=M`, and each has a watchdog.

- `tb_sorter2`, `tb_sn3`, `tb_sn4`, `tb_sn7` and `tb_sn8` apply every input
  pattern. For each pattern they check that line k is 1 exactly when more
  than k inputs are 1.
- `tb_onehot_code` checks every thermometer code for N = 4 and N = 8.
- `tb_count_encoder` checks every pair of partial counts in both the (7,3)
  and the (15,4) configuration.
- `tb_counter_7_3` checks all 128 input patterns and `tb_counter_15_4` all
  32768. The results are compared against a bit-by-bit population count in
  the same time step, so the latency is zero cycles.
- `tb_sn_counters_top` runs both counters exhaustively through the top at
  default size. For each counter it also counts four cases, and fails if any
  of them never occurs:
  - the top bit set by the first group alone (for example `P4 & Q0`);
  - the top bit set by both groups together;
  - the top bit not set;
  - saturation, with all inputs 1.

Each testbench fails when a deliberate bug is introduced into its module, for
example a swapped sorter output, a missing final layer, or a dropped
threshold term.

## Simulating

With Verilator 5, from the directory that holds `rtl/` and `tb/`:

```
verilator --binary --timing --assert -Irtl rtl/sn_pkg.sv tb/tb_sn_counters_top.sv \
          --top-module tb_sn_counters_top
./obj_dir/Vtb_sn_counters_top
```

Any other testbench runs the same way: replace the file and top-module names.
`sn_pkg.sv` must come first, because `sn7` and `sn8` import it. For lint, run
`verilator --lint-only -Wall -Irtl rtl/sn_pkg.sv rtl/<module>.sv`.

To build a different counter, instantiate sorting networks for the two groups
and `onehot_code` for each sorted output, then set `count_encoder`'s `NH`,
`NI` and `W` to match. A sorting network for other sizes can be derived the
same way as `sn7`: take a larger schedule and declare its bottom lines absent.
