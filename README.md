# Centralized Diamond matrix-vector multiplier

This design computes `R = A x U` for an `m x n` matrix `A` and an `n`-element
vector `U`. It produces one element of `R` per clock cycle. The hardware is a
*Centralized Diamond*: `N = 7n/4 + 1` processing elements (PEs) on four fixed
levels. The default is `n = 16`, which gives 29 PEs.

| level | PEs   | role                                                        |
|-------|-------|-------------------------------------------------------------|
| 3     | `n`   | leaves. Each one holds one `u_i` and multiplies it by `a_i` |
| 2     | `n/2` | adders. Each adds the products of two neighbouring leaves   |
| 1     | `n/4` | adders. Each adds two level-2 sums                          |
| 0     | 1     | central PE. It adds all `n/4` level-1 sums                  |

The depth is always four levels, whatever `n` is. The four levels work at the
same time on four consecutive rows of `A`, so `m` rows need `m + 3` steps.
A binary tree over `n` leaves would need about `log2 n` levels instead. The
price is that the central PE must add `n/4` values in one step.

## The diamond as four trees

Topologically, the diamond is `n/4` identical small trees joined at the
central PE. Each tree has four leaves, two level-2 adders and one level-1
adder: 7 PEs. For `n = 16` there are four trees, and 4 x 7 + 1 = 29. Tree
`t` serves elements `4t .. 4t+3` of each row and of `U`.

```
 a[4t]  a[4t+1] a[4t+2] a[4t+3]     (row of A, one row per step)
   |      |       |       |
 [x u0] [x u1]  [x u2]  [x u3]      level 3  cd_mul_pe  (U held locally)
     \   /          \   /
     [ + ]          [ + ]           level 2  cd_add_pe
          \        /
            [ + ]                   level 1  cd_add_pe     } cd_tree
              |
   ... n/4 trees ...
              |
        [ + n/4 inputs ]            level 0  cd_central_pe
              |
           R[row]
```

A full diamond also has links between neighbouring PEs of different trees.
The architecture uses them for sorting and searching. Matrix multiplication
does not use them, so they are not built here.

## Pipelining and the SIMD sequencer

The array is SIMD: in each step every PE of a level does the same operation.
`cd_ctrl` broadcasts one enable per level (`en_mul`, `en_l2`, `en_l1`,
`en_l0`). A row that enters the leaves in step `s` is then handled as follows:

| step | level at work | what happens                          |
|------|---------------|---------------------------------------|
| `s`   | 3            | the leaves multiply the row by `U`    |
| `s+1` | 2            | level 2 adds pairs of products        |
| `s+2` | 1            | level 1 adds pairs of level-2 sums    |
| `s+3` | 0            | the central PE adds the tree sums     |

Each PE registers its result, so one step is one clock cycle. The central PE's
output register holds the result in cycle `s+4`. While the central PE
finishes row `r`, level 1 works on row `r+1`, level 2 on `r+2` and the leaves
on `r+3`. The sequencer is a three-state machine:

- **IDLE** waits for `start`.
- **RUN** issues `num_rows` rows, one per cycle.
- **DRAIN** lets the last rows climb the levels, then raises `done`.

The per-level enables are a shift register fed by `en_mul`. Row indices
travel beside them, so every result comes out tagged with its row.

## Interface of the top, `cd_matmul`

| port        | dir | width                           | meaning |
|-------------|-----|---------------------------------|---------|
| `clk`, `rst_n` | in | 1                            | clock; synchronous reset, active low |
| `start`     | in  | 1                               | begin an operation. Ignored while `busy` |
| `num_rows`  | in  | `ROW_W`                         | `m`. Read with `start` |
| `u_vec`     | in  | `N_LEAVES` x `DATA_W`           | `U`, stored in the leaves in the `start` cycle |
| `a_ready`   | out | 1                               | a row is taken in this cycle |
| `a_row_idx` | out | `ROW_W`                         | which row of `A` to drive now |
| `a_row`     | in  | `N_LEAVES` x `DATA_W`           | row `a_row_idx` of `A` |
| `res_valid` | out | 1                               | `res_data` is a result |
| `res_row`   | out | `ROW_W`                         | row index of `res_data` |
| `res_data`  | out | `2*DATA_W + 2 + clog2(N_LEAVES/4)` | element of `R` |
| `busy`, `done` | out | 1                            | operation running; last result presented |

How an operation runs:

1. Pulse `start` for one cycle `t` in which the array is idle. Hold `u_vec` and
   `num_rows` valid in that cycle.
2. In cycles `t+1 .. t+m`, `a_ready` is high. The source must drive row
   `a_row_idx` on `a_row` in the same cycle. There is no back-pressure, so a
   source that cannot keep up must buffer `A` in front of the array.
3. Row `r` comes out in cycle `t+5+r`.
4. `done` rises with the last result, in cycle `t+m+4`. With `m = 0`, `done`
   rises in cycle `t+1`.
5. A new `start` is accepted in the cycle after `done`.

All data is signed two's complement. Each adder level widens its result so
that no sum can overflow. With the defaults, 16-bit operands give a 36-bit
result. `N_LEAVES` must be a multiple of 4, and elaboration stops with an
error otherwise. Shorter rows can be padded with zeros.

## Parameters

| parameter  | default | origin |
|------------|---------|--------|
| `N_LEAVES` | 16      | the 29-PE diamond that is the main configuration of the architecture |
| `DATA_W`   | 16      | this design's choice |
| `ROW_W`    | 16      | this design's choice. It allows up to 65535 rows per operation |

Setting `N_LEAVES = 8` gives the 15-PE diamond: 8 multipliers, 6 adders and
the central PE, which then adds just two values.

## What follows the architecture and what was chosen here

These points follow the architecture:

- the four levels and the PE count `7n/4 + 1`
- multipliers in the leaves, with `U` resident there
- two-input adders in levels 2 and 1
- a central PE that adds the level-1 results
- pairing of neighbouring leaves
- one row of `A` per step, with all levels overlapped, for `m + 3` steps

These points are this design's own choices:

- word widths and signed arithmetic
- a register at every PE output, so one step is one clock cycle
- the reset
- the start/done protocol, row tags and the `m = 0` behaviour
- the central PE as a single `n/4`-input combinational adder in front of its
  register. For large `n` this adder becomes the critical path. A faster
  clock would need a pipelined level 0, which the architecture does not have.
- no back-pressure on the `A` input

## Files

- `rtl/cd_pkg.sv`: width functions, the PE count and the sequencer's state type.
- `rtl/cd_mul_pe.sv`, `rtl/cd_add_pe.sv`, `rtl/cd_central_pe.sv`: the three
  kinds of PE.
- `rtl/cd_tree.sv`: one four-leaf tree.
- `rtl/cd_ctrl.sv`: the SIMD sequencer.
- `rtl/cd_matmul.sv`: the top.
- `tb/tb_<module>.sv`: one self-checking testbench per module. Each prints
  `TB_RESULT checks=N failures=F`.
  - `tb_cd_matmul` runs the default 29-PE array end to end on random data,
    extreme values and the zero-padded 8-element example. It checks every
    result, the 4-cycle latency and the `m + 3` step count. It also counts
    how often each mechanism occurred: U load, all four levels busy at once,
    drain, an empty operation and back-to-back operations.
  - `tb_cd_matmul_example` runs the 15-PE array on
    `U = [1 3 7 20 15 8 11 3]` with a 3 x 8 matrix `A`, and expects
    `[513 391 256]`.

## Simulating

The simulator needs the package first, and the library paths for the rest:

```
verilator --binary --timing --assert -Wall -Wno-fatal \
  -y rtl -y tb +libext+.sv -Irtl rtl/cd_pkg.sv tb/tb_cd_matmul.sv \
  --top-module tb_cd_matmul -o sim && obj_dir/sim
```

Substitute any other testbench name. The full-size run takes well under a
second. For a lint of the RTL alone, use
`verilator --lint-only -Wall -y rtl rtl/cd_pkg.sv rtl/cd_matmul.sv`.
