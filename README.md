# Chained Kogge-Stone adder

A Kogge-Stone adder computes every carry of an N-bit addition with a
parallel-prefix tree of log2(N) full-width stages. It is fast, but the tree's
area and wiring grow as N·log2(N). This design takes a different path. It keeps
the Kogge-Stone structure only inside small **2-bit cells**, then chains the
cells the way a ripple-carry adder chains full adders: the carry-out of one
cell is the carry-in of the next. The area grows linearly with the word size,
and each cell resolves its own two carries in parallel.

The RTL is purely combinational: no clock, no reset, no registers.

```
        a[1:0] b[1:0]     a[3:2] b[3:2]            a[N-1:N-2] b[N-1:N-2]
           |    |            |    |                     |    |
   0 --> [ks_block] --c--> [ks_block] --c--> ... --> [ks_block] --> cout
             |                 |                          |
          sum[1:0]          sum[3:2]                 sum[N-1:N-2]
```

## Inside one cell

Each cell (`ks_block`) is a complete small Kogge-Stone adder built from three
stages:

1. **Pre-processing** (`ks_preprocess`). One half adder per bit gives
   propagate `p = a ^ b` and generate `g = a & b` (`ks_half_adder`).
2. **Carry processing** (`ks_carry_network`). A Kogge-Stone prefix tree
   merges the (g, p) pairs with the dot operator
   `G = G_hi | (P_hi & G_lo)`, `P = P_hi & P_lo` (`ks_pkg::ks_combine`). In
   stage s, bit i merges with bit i − 2^s, so after clog2(W) stages bit i holds
   the group pair of bits i..0. The carry-in then enters once:
   `carry_out[i] = G[i:0] | (P[i:0] & cin)`.
3. **Post-processing** (`ks_postprocess`). Each sum bit is `s[i] = p[i] ^ c[i]`,
   where `c[i]` is the carry into bit i.

In the default 2-bit cell, the tree is a single dot cell:

```
s0   = p0 ^ cin
c1   = g0 | (p0 & cin)
s1   = p1 ^ c1
cout = g1 | (p1 & g0) | (p1 & p0 & cin)
```

On its own, a 2-bit Kogge-Stone adder with no carry-in needs two half adders,
two ANDs, one XOR and one OR: `s0 = p0`, `s1 = p1 ^ g0`,
`cout = g1 | p1&g0`, and group propagate `p1 & p0`. Chaining cells requires a
carry-in, which costs a few more gates per cell. This design spends them so
that the chain adds correctly. The gate count of the bare cell is therefore a
lower bound, not what is built here.

The three stage modules are generic in their width `W`. A `ks_block` with
`BLOCK_W = 4` is the classic 4-bit Kogge-Stone adder with two prefix stages.
The testbenches check that size too.

## The chain and its timing

`mks_adder` is the top. It places `WIDTH / BLOCK_W` cells side by side and
ties the first cell's carry-in to 0. The worst path starts when a carry is
generated in cell 0 and ripples through every cell above it, for example
`a = all ones` and `b = 1`. That path crosses `WIDTH/2` cells, with two gate
levels (AND-OR) each. In return, the area is a fixed amount per cell.

| Port   | Dir | Width | Meaning                     |
|--------|-----|-------|-----------------------------|
| `a`    | in  | WIDTH | operand                     |
| `b`    | in  | WIDTH | operand                     |
| `sum`  | out | WIDTH | `(a + b) mod 2^WIDTH`       |
| `cout` | out | 1     | carry out of the top bit    |

Parameters:

- `WIDTH` (default 64): the word size. It must be a nonzero multiple of
  `BLOCK_W`, or elaboration stops with an error. The adder is meant to be
  used at 8, 16, 32 and 64 bits. These are the same chain with 4, 8, 16 and
  32 cells.
- `BLOCK_W` (default 2): the cell width. Raising it trades ripple length for
  larger prefix trees inside each cell.

## Where this design makes its own choices

- **No carry-in port.** The top adds only `a + b`. For a carry-in, expose
  `carry[0]` in `mks_adder`; every cell already accepts one.
- **Carry-out kept at every width.** `cout` is always present, even where
  only `a`, `b` and `sum` might be needed.
- **Carry-in folded in after the prefix tree.** The carry-in is applied after
  the tree rather than placed as an extra prefix position. The results are
  the same; only the gate arrangement differs.
- **Default width of 64 bits.** This is the widest size the adder is
  evaluated at. Narrower words can also run zero-extended on the 64-bit
  build, with the carry appearing in `sum[WIDTH]`.
- **No pipeline registers.** Add them around the instance if a clocked
  interface is needed.

## Files

- `rtl/ks_pkg.sv`: the `pg_t` pair type, the `ks_combine` dot operator, and
  the default sizes.
- `rtl/ks_half_adder.sv`, `rtl/ks_preprocess.sv`, `rtl/ks_carry_network.sv`,
  `rtl/ks_postprocess.sv`: the three stages of a Kogge-Stone adder.
- `rtl/ks_block.sv`: one cell.
- `rtl/mks_adder.sv`: the chained adder (top).
- `tb/tb_<module>.sv`: one self-checking testbench per module.
  - `tb_mks_adder` runs 8-, 16-, 32- and 64-bit adders together. The 8-bit
    adder is checked over all 65536 operand pairs. The run also counts
    in-cell carry generation, carries crossing between cells, a full-length
    ripple and carry-out, and fails if any of them never happens.
  - `tb_mks_adder_full` runs the default 64-bit adder on its own.

Every testbench compares against integer arithmetic, or a bit-serial ripple
recurrence, computed inside the testbench. Each ends by printing
`TB_RESULT checks=N failures=M`.

## Simulating

The package must come first on the command line. Everything else is found
through `-y`:

```
verilator --binary --timing --assert -Wall -Wno-fatal -y rtl \
    rtl/ks_pkg.sv tb/tb_mks_adder.sv --top-module tb_mks_adder -o sim
./obj_dir/sim
```

Replace `tb_mks_adder` with any other testbench name. Each one finishes in
well under a second.

## How far it is verified

- The 2-bit and 4-bit cells are checked exhaustively (all `a`, `b`, `cin`).
- The 2-bit and 4-bit carry networks are checked exhaustively over all
  `p`, `g`, `cin`, including combinations a half adder cannot produce.
- The 8-bit adder is checked exhaustively.
- The 16-, 32- and 64-bit adders get directed vectors and 20,000 random
  pairs. Half of those pairs are biased toward long propagate runs.
- Each testbench was also run against a deliberately broken copy of its
  module, and reported failures every time.
- Lint and elaboration are clean in Verilator and in Yosys with the slang
  front end.
- Timing and area were not characterised for any FPGA or cell library.
