# Modified Kogge-Stone adder (8 bits)

A Kogge-Stone adder computes every carry of an N-bit addition in parallel,
through a prefix tree of log2(N) levels. It is among the fastest adder
structures, but it pays for its speed with many cells and long, dense wiring.
This design is an 8-bit Kogge-Stone adder from which the three *black cells*
whose results are redundant have been removed. The cells that used those
results are rewired to take equivalent spans from elsewhere in the tree. The
tree keeps its three levels and computes the same carries with 14 cells
instead of 17.

The RTL is purely combinational: `{cout, sum} = a + b + cin` for 8-bit `a`
and `b`.

## The three stages

Like every parallel-prefix adder, `mksa8` is split into three stages:

| stage | module | what it computes |
|---|---|---|
| pre-processing | `pg_preprocess` | per bit: propagate `p_i = a_i ^ b_i`, generate `g_i = a_i & b_i` |
| carry generation (PG) network | `mksa_pg_network` | `G(i:0)` for every bit i: the carry out of bit i |
| post-processing | `sum_postprocess` | `sum_i = p_i ^ G(i-1:0)` (bit 0 uses `cin`), `cout = G(7:0)` |

`mksa_pkg` holds the operand width (`WIDTH = 8`) and `pg_t`, a packed struct
that carries a (generate, propagate) pair between cells.

## Prefix cells

The network is built from two cells. A *span* `i:j` stands for bits j to i.
Its group generate `G(i:j)` says that the span produces a carry by itself.
Its group propagate `P(i:j)` says that it passes on an incoming carry.

* **Black cell** (`black_cell`) merges an upper span `i:k+1` with the
  adjacent lower span `k:j`:
  `G(i:j) = G(i:k+1) | P(i:k+1) & G(k:j)`, `P(i:j) = P(i:k+1) & P(k:j)`.
* **Grey cell** (`grey_cell`) is used where the merged span reaches bit 0.
  Only the generate is needed there, since it is already the carry:
  `G(i:0) = G(i:k+1) | P(i:k+1) & G(k:0)`.

The prefix operator is associative, and it is also idempotent: the two spans
may overlap, as long as together they cover `i:j` and neither reaches above
bit i. Merging `7:4` with `6:0` gives `G(7:0)` just as `7:4` with `3:0` does.
The whole modification rests on this property.

## The modified carry network

In the regular 8-bit Kogge-Stone tree, level L merges spans at distance
2^(L-1). Its cells are:

```
level 1:  1:0g  2:1  3:2  4:3  5:4  6:5  7:6          (1 grey, 6 black)
level 2:  2:0g  3:0g 4:1  5:2  6:3  7:4               (2 grey, 4 black)
level 3:  4:0g  5:0g 6:0g 7:0g                        (4 grey)
```

Level 3 holds only grey cells, and every grey cell produces a carry, so none
can be removed. Three black cells can go:

* **5:2** fed only grey 5:0. Grey 5:0 now takes black 5:4 (level 1) with
  grey 3:0 (level 2). It used to take 5:2 with 1:0.
* **4:1** fed only grey 4:0. Grey 4:0 now takes black 4:3 (level 1) with
  grey 2:0 (level 2). It used to take 4:1 with 0:0.
* **2:1** fed only 4:1 and grey 2:0. Once 4:1 is gone, grey 2:0 takes bit 2
  itself with grey 1:0, which makes 2:1 redundant as well.

The network in `mksa_pg_network` is therefore:

```
level 1:  1:0g  3:2  4:3  5:4  6:5  7:6               (1 grey, 5 black)
level 2:  2:0g (bit 2 + 1:0)   3:0g (3:2 + 1:0)
          6:3  (6:5 + 4:3)     7:4  (7:6 + 5:4)       (2 grey, 2 black)
level 3:  4:0g (4:3 + 2:0)     5:0g (5:4 + 3:0)
          6:0g (6:3 + 2:0)     7:0g (7:4 + 3:0)       (4 grey)
```

The tree has 7 black and 7 grey cells, and the longest path is still three
AND-OR levels. Grey cells 2:0 and 3:0 both take their lower generate from
grey 1:0. The instance names in the RTL (`c5_0`, `c6_3`, ...) follow the
span they compute. The signals `s6_3`, `g2_0`, ... hold the span outputs.

The fan-out pattern changes. Grey 1:0 drives two cells, and grey 2:0, grey
3:0, black 4:3 and black 5:4 each drive two. Black 3:2 drives one. The
propagate outputs of black cells 3:2, 6:3 and 7:4 feed only grey cells and are
left unconnected, so synthesis trims them.

The modification was published with FPGA results for a Spartan-3 (XC3S400,
speed grade 4). The delay fell from 15.16 ns for the regular Kogge-Stone
adder to 13.67 ns, about 10 %. A variant that only rewires overlapping spans,
without removing cells, reached 15.02 ns. These figures are not reproduced
here: RTL simulation has no delays, and delay depends on the target.

## Carry in

The adder has a carry-in port. Grey cells produce no group propagate, so
there is no `P(i:0)` to gate `cin` with after the tree. Instead,
`pg_preprocess` folds the carry in into bit 0:
`g_0 = a_0 & b_0 | p_0 & cin`. Every `G(i:0)` from the tree then already
includes it, and `sum_postprocess` needs `cin` only for sum bit 0. This is a
choice of this implementation. The adder's equations use a carry in, but the
tree as described has no place for one. With `cin = 0` the circuit is exactly
the described 8-bit adder.

## Interface and timing

`mksa8`:

| port | dir | width | meaning |
|---|---|---|---|
| `a`, `b` | in | 8 | operands |
| `cin` | in | 1 | carry in |
| `sum` | out | 8 | `(a + b + cin) mod 256` |
| `cout` | out | 1 | carry out |

There is no clock or reset. The outputs settle one combinational delay after
the inputs change: three prefix levels, plus a pre-processing gate and a
sum XOR. To use it in a pipeline, register the operands or the results
around it.

`pg_preprocess` and `sum_postprocess` take a `WIDTH` parameter (default 8).
`mksa_pg_network` is written for 8 bits only, because the cell removal is
defined for the 8-bit tree. A wider adder needs its own network.

## Verification

Each module has a self-checking testbench in `tb/`. Each prints
`TB_RESULT checks=N failures=M` and has a watchdog.

| testbench | what it checks |
|---|---|
| `tb_black_cell` | all 16 input pairs, generate from carry composition, propagate |
| `tb_grey_cell` | all 8 inputs |
| `tb_pg_preprocess` | all 2^17 `a, b, cin`, against per-bit arithmetic |
| `tb_mksa_pg_network` | all 2^15 `g[7:0], p[7:1]` against a serial ripple; counts carries crossing the rerouted spans into grey 2:0, 4:0 and 5:0 |
| `tb_sum_postprocess` | all 2^17 `p, gpre, cin` |
| `tb_mksa8` | the worked example `11111110 + 11111111 = 1_11111101`, then all 2^17 `a, b, cin` against integer addition. It counts effective carry ins, carry outs, full 8-bit ripples and carries through each rerouted span, and fails if any never occurs |

`tb_mksa8` runs the adder at its default size with no parameter overrides.
All testbenches finish in well under a second.

To run one with Verilator:

```
verilator --binary --timing --assert -Irtl rtl/mksa_pkg.sv tb/tb_mksa8.sv \
          --top-module tb_mksa8 -Mdir obj_tb_mksa8
./obj_tb_mksa8/Vtb_mksa8
```

Replace `tb_mksa8` with any other testbench name. `-Irtl` lets Verilator find
the modules the testbench instantiates.

## Departures and open points

* **Carry-in folding** into `g_0`, as explained above, is this design's own
  choice.
* **Buffers.** A Kogge-Stone tree may place buffers to balance loading.
  They have no logic function and are plain wires here. Buffer insertion is
  left to synthesis.
* **Only 8 bits.** The removal of redundant cells is defined only for the
  8-bit tree, and the network is not generated for other widths.
* **Reconstructed from a description, not a drawing.** The network follows a
  written description of which cells are removed and how their consumers are
  rewired. One connection, grey 2:0 taking bit 2 directly, follows from the
  removal of black 2:1 rather than from an explicit statement. Exhaustive
  simulation confirms that the resulting network is a correct adder.
* **No timing model.** The speed advantage is a property of the mapped
  circuit and is not checked by the testbenches.
