# Versatile GF(2^m) multiplier on a programmable cellular automaton

Most hardware multipliers for binary fields GF(2^m) are built for one field:
the reduction polynomial is wired into the XOR network, so a change of field
needs new hardware. This design is a multiplier whose field is an operand. It
computes

    C(x) = A(x) * B(x) mod P(x)

for any monic polynomial `P(x) = x^m + p_{m-1} x^{m-1} + ... + p_0`. The
coefficients of `P` and of the multiplicand `B` do not pass through a datapath.
They are the control bits of a row of identical cells: a *programmable
cellular automaton* (PCA). The multiplier `A` streams in one bit per cell
level, most significant bit first. After `m` cell iterations the automaton
state is the product.

The same cell array comes in three sizes, all in this RTL:

| variant  | cell levels `K` | cells   | clock cycles per product | critical path            |
|----------|-----------------|---------|--------------------------|--------------------------|
| serial   | 1               | m       | m                        | flip-flop + 1 cell       |
| improved | k (1 < k < m)   | k*m     | ceil(m/k)                | flip-flop + k cells      |
| parallel | m               | m*m     | 1                        | flip-flop + m cells      |

`k` is meant to be chosen from the clock period: as many cells as fit between
two clock edges, `k = floor((t_clock - t_flipflop) / t_cell)`.

## The arithmetic the cells perform

Write `A` in Horner form, most significant coefficient first:

    A*B mod P = ((...((a_{m-1} B) x + a_{m-2} B) x + ...) x + a_0 B) mod P

One iteration turns the partial result `C` into `(C*x + a*B) mod P`, where `a`
is the next bit of `A`. Multiplying by `x` shifts every coefficient up one
place. The coefficient pushed out at the top, `c_{m-1}`, stands for `x^m`,
which is congruent to `p_{m-1} x^{m-1} + ... + p_0`. So bit `j` of the new
partial result is

    c_j' = c_{j-1}  XOR  (c_{m-1} AND p_j)  XOR  (a AND b_j)        with c_{-1} = 0

Every bit `j` has the same form: a three-input XOR of gated values. Only the
gate controls `p_j` and `b_j` differ from bit to bit.

## The extended PCA cell (`ext_pca_cell`)

A standard three-neighbour PCA cell XORs the cell's own value and its two
nearest neighbours. Each of the three passes through a switch set by a control
bit (`Cl`, `Cm`, `Cr`), so one structure can run any additive rule. The
*extended* cell used here keeps the three switches and the XOR, but it changes
which neighbours they see:

| switch | control in the multiplier | neighbour                                   |
|--------|---------------------------|---------------------------------------------|
| `cl`   | constant 1                | nearest cell to the left, `c_{j-1}`         |
| `cm`   | `b_j`                     | left boundary line carrying the bit of `A`  |
| `cr`   | `p_j`                     | rightmost cell of the row, `c_{m-1}`        |

The cell's own old value is not an input. Two of its three neighbours are
lines that run the full width of the row: the `A` bit and `c_{m-1}`. This is
the one place where a row is not purely local. Here a switch is an AND gate,
so the cell is two AND gates and a 3-input XOR.

## From one row to the array

`pca_row` places `M` cells side by side. The cell at position 0 sees a
constant 0 as its left neighbour. The row is combinational and does exactly
one Horner iteration.

`pca_core` holds the state: `M` flip-flops for the coefficients of `C`. It
places `K` rows between the flip-flop outputs and inputs. Row `l` uses bit
`a_bits[K-1-l]`, so the most significant of the `K` bits consumed in a cycle
enters the first row. Each row's `c_{m-1}` line is that row's own top input,
not the register's. When `step` is high, the output of the last row is
clocked in. `clear` empties the state.

- `K = 1`: the serial PCA. It has `M` cells and `M` flip-flops, and it takes
  `M` cycles.
- `1 < K < M`: the improved PCA. It does `K` Horner iterations per cycle, so a
  product takes `ceil(M/K)` cycles.
- `K = M`: the optimal parallel PCA. It is an `M x M` array, and the whole
  product is done in one cycle.

**When `M` is not a multiple of `K`**, the operand `A` is padded with leading
zeros to `ceil(M/K)*K` bits. A leading zero entering a zero state leaves the
state at zero, so the padding does not change the product. It only fills the
first cycle's unused levels.

## Operating the multiplier (`pca_mult`)

`pca_mult #(M, K)` wraps `pca_core` with operand registers and a small
controller:

```
 clk edge     0            1      2    ...    N            N+1
 start        1 (idle)
 captured     A, B, P      -
 PCA state    cleared      step   step        last step
 busy         -> 1                            -> 0
 done                                         -> 1 (1 cycle) -> 0
 c                                            = A*B mod P, held until next start
```

`N = ceil(M/K)`. At the edge where `start` is accepted, `A`, `B` and `P` are
registered and the PCA is cleared. This cleared state is the "reset" of the
automaton before a run. The `N` steps follow at the next `N` edges. `done` is
a one-cycle pulse, and `c` keeps the product until the next `start` is
accepted. A `start` while `busy` is ignored. The operand inputs may change as
soon as `start` has been taken.

The field polynomial is loaded with every operation, so each multiplication
can use a different field. `p` holds only the `M` low coefficients, because
the `x^M` term is implied. The hardware works for any monic `P` of degree `M`.
It does not check that `P` is irreducible or primitive. Choosing a valid field
polynomial is the user's job.

Two properties hold: exactly `N` steps separate an accepted start from `done`,
and `done` follows a busy cycle. `pca_mult` checks both with concurrent
assertions.

Ports of `pca_mult` (all widths `M` unless noted):

| port    | dir | meaning                                                    |
|---------|-----|------------------------------------------------------------|
| `clk`, `rst_n` | in | clock, active-low synchronous reset                  |
| `start` | in (1) | begin a multiplication                                  |
| `a`     | in  | multiplier `A`, bit `j` = coefficient of `x^j`             |
| `b`     | in  | multiplicand `B`                                           |
| `p`     | in  | `p_0 ... p_{M-1}` of `P(x)`                                |
| `busy`  | out (1) | PCA running                                            |
| `done`  | out (1) | product just became valid                              |
| `c`     | out | `A*B mod P`                                                |

## Top level (`pca_versatile_top`)

The top places the three variants side by side on shared `a`, `b` and `p`
inputs:

- `u_serial`: `K = 1`.
- `u_improved`: `K = K_IMPROVED`, default 4.
- `u_parallel`: `K = M`.

Each variant has its own `*_start`, `*_busy`, `*_done` and `*_c`, so they can
run at the same time, each in its own field. The defaults are `M = 6` (the
size of the worked example below) and `K_IMPROVED = 4`. With these values
`M` is not a multiple of `K`, so the default build uses the zero padding.
For a cryptographic size, set `M` to the field degree, for example 163 or 233.
Cell count and area grow linearly with `M` for the serial variant and as
`M^2` for the parallel one.

Worked example: `B = x^5 + x + 1` and `P = x^6 + x^5 + x^4 + x^3 + 1`. The
cells 0 to 5 then have controls `cm = 1,1,0,0,0,1` and
`cr = 1,0,0,1,1,1`. The serial multiplier produces `A*B mod P` six cycles
after the start is accepted.

## Source files

| file | contents |
|------|----------|
| `rtl/pca_pkg.sv` | step count `ceil(M/K)`, controller state type |
| `rtl/ext_pca_cell.sv` | one extended PCA cell |
| `rtl/pca_row.sv` | one level of `M` cells |
| `rtl/pca_core.sv` | `M` state flip-flops and `K` levels |
| `rtl/pca_mult.sv` | operand registers, controller, assertions |
| `rtl/pca_versatile_top.sv` | serial, improved and parallel variants |
| `tb/gf2m_ref_pkg.sv` | reference `A*B mod P` (full product, then long division) |
| `tb/pca_core_check.sv`, `tb/pca_mult_check.sv` | reusable checkers for one instance |
| `tb/tb_*.sv` | self-checking testbenches |

## Verification

Every testbench checks itself and ends by printing
`TB_RESULT checks=N failures=F`. The reference model multiplies in full and
then reduces by long division from the top bit. This is a different order of
operations from the interleaved shift-and-reduce that the hardware performs.

| testbench | what it covers |
|-----------|----------------|
| `tb_ext_pca_cell` | all 64 input combinations of the cell |
| `tb_pca_row` | one iteration, `(C*x + a*B) mod P`: exhaustive for the worked-example `B`, `P`, plus random values |
| `tb_pca_core` | state after every step against the partial products, hold and clear; `M` = 6 and 17, `K` = 1, 4 or 5 and `M` |
| `tb_pca_mult_serial` | `M` = 6, 17 and 64: products, latency of exactly `M` cycles, ignored busy starts, field changes, operands changed during a run |
| `tb_pca_mult_improved` | the same for `M`/`K` = 6/4, 6/2 and 17/5 (latency `ceil(M/K)`) |
| `tb_pca_mult_parallel` | the same for `K = M` with `M` = 6, 17 and 64 (latency 1) |
| `tb_pca_versatile_top` | the top at its default parameters, end to end; it counts each mechanism and requires each to occur |
| `tb_worked_example` | all 64 values of `A` with the worked-example `B` and `P` on all three variants |
| `tb_large_field` | `M = 163` with `K` = 1, 8 and 41 |

`tb_pca_versatile_top` counts these mechanisms: products from each variant,
changes of the field polynomial, starts ignored while busy, padded runs of the
improved variant, and two variants running at the same time in different
fields.

To run one testbench with Verilator 5:

```
verilator --binary --timing --assert -Irtl -Itb \
    rtl/pca_pkg.sv tb/gf2m_ref_pkg.sv tb/tb_pca_versatile_top.sv \
    --top-module tb_pca_versatile_top -y rtl -y tb +libext+.sv -o sim
./obj_dir/sim
```

Replace the testbench name to run another. Most build in seconds;
`tb_large_field` takes about a minute, most of it for the 163 x 41 cell array.

## What follows the published architecture and what is added

These parts follow the published architecture:

- the cell rule and its three switched neighbours;
- the control assignment `cl = 1`, `cm = b_j`, `cr = p_j`;
- the row, with a constant 0 into cell 0;
- cascading `k` rows between the state flip-flops;
- the cycle counts `m`, `ceil(m/k)` and 1;
- the worked example.

These are choices of this RTL:

- **Control and operand handling.** The design adds operand registers for
  `A`, `B` and `P`, the `start`/`busy`/`done` handshake, and an `A` shift
  register on the boundary line. The published architecture is only the
  automaton, plus "configure, reset, run m cycles".
- **Clearing the state.** The PCA is cleared with a synchronous clear in the
  cycle that accepts `start`. A product therefore takes one extra cycle
  before its `N` computing cycles.
- **Zero padding.** `A` is padded with leading zeros when `K` does not divide
  `M`.
- **Reset.** The reset is synchronous and active low.
- **Gates.** Each switch is an AND gate.
- **Default `K_IMPROVED = 4`.** The published `k` depends on gate and
  flip-flop delays and has no fixed value.

Not built:

- Pipeline registers between the levels of the parallel array. The published
  comparison calls the parallel form pipelinable, but no pipeline is
  described.
- Cascading several multiplier chips to make one for wider operands. This is
  mentioned but not specified.
