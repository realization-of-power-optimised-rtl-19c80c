# Carry skip adder with AND-OR skip logic

A ripple-carry adder is small but slow: a carry made at bit 0 may have to pass
through every full adder before the top bit settles. A carry skip adder cuts
the operands into short groups. For each group it checks whether every bit of
the group *propagates* (`a_i ^ b_i = 1`). When it does, the carry leaving the
group is simply the carry that entered it, so that carry can jump over the
group instead of rippling through it.

Carry skip adders usually make that choice with a 2:1 multiplexer per group.
This design makes it with two AND gates, an inverter and an OR gate instead
(called "AOI" skip logic here). The aim is a smaller, lower-power skip stage
with the same function. The adder is 32 bits wide and is built from eight
4-bit groups.

It is purely combinational: no clock, no reset, no registers.

## Module hierarchy

```
cska32bit            32-bit adder: WIDTH/BLOCK_W groups chained carry to carry
└─ cska_block4       one group (4 bits): ripple chain + group AND + skip logic
   ├─ cska_full_adder   x4   sum, propagate, ripple carry
   └─ cska_aoi_skip         AND-OR skip logic choosing the group carry out
```

| module            | ports                                                           |
|-------------------|-----------------------------------------------------------------|
| `cska32bit`       | `a[WIDTH-1:0]`, `b[WIDTH-1:0]`, `cin` → `sum[WIDTH-1:0]`, `cout` |
| `cska_block4`     | `a[BLOCK_W-1:0]`, `b[BLOCK_W-1:0]`, `cin` → `s[BLOCK_W-1:0]`, `grp_p`, `cout` |
| `cska_full_adder` | `a`, `b`, `cin` → `s`, `p`, `cout`                               |
| `cska_aoi_skip`   | `grp_p`, `cin`, `c_rca` → `cout`                                 |

Parameters: `WIDTH = 32` and `BLOCK_W = 4` on `cska32bit`, and `BLOCK_W = 4` on
`cska_block4`. `WIDTH` must be a non-zero multiple of `BLOCK_W`. Elaboration
stops with an error otherwise.

## The full adder cell

Each cell computes

```
p    = a ^ b
s    = p ^ cin
cout = a & b | cin & p
```

and brings out `p` next to the sum. The cell is written with XOR/AND/OR
operators. The multiplexer-based full adder of the conventional carry skip
adder is not used.

## The skip logic

This is the part that differs from a textbook carry skip adder.

Inside a group, the four cells FA0..FA3 form a ripple chain. `cin` enters FA0,
and the carry out of FA*i* is called C*i*, so `C3` leaves the last cell. One AND
gate combines the four propagates into the group propagate
`grp_p = P0 & P1 & P2 & P3`. The skip logic then forms

```
A1   = cin & grp_p        // group propagates: pass the incoming carry on
A2   = C3  & ~grp_p       // otherwise: use the carry made by the ripple chain
cout = A1 | A2
```

This is exactly the function of a 2:1 multiplexer with `grp_p` as its select
input, `cin` on input 1 and `C3` on input 0.

Two points are easy to get wrong:

* **Which term gets the inverter.** The inverted group propagate must gate
  `C3`, not `cin`. If the inverter is put on the other AND gate, the group
  passes `cin` exactly when it should not. The fault tests use this swap.
* **No output inversion.** Despite the "AND-OR-INVERTER" name, the output is
  not inverted: the group carry out must equal the selected carry. "Inverter"
  here means the inverter on `grp_p`.

Skipping never changes the result. When `grp_p = 1`, every cell propagates, so
`C3` already equals `cin`. The skip path only gives the carry a shorter route.
`cska32bit` holds a deferred assertion per group that states this rule: a
group whose `grp_p` is 1 must leave its carry unchanged.

### Worked example

Take a group with `a = 1010`, `b = 0110`, `cin = 0`:

| bit | a | b | P |
|-----|---|---|---|
| 0   | 0 | 0 | 0 |
| 1   | 1 | 1 | 0 |
| 2   | 0 | 1 | 1 |
| 3   | 1 | 0 | 1 |

- `grp_p = 0`, so `A1 = 0`.
- The ripple chain gives `C3 = 1`, so `A2 = 1`.
- The carry out is 1 and the sum is `0000` (10 + 6 = 16).

## The 32-bit adder and its carry paths

`cska32bit` chains the groups. Group *k*'s carry out drives group *k+1*'s
carry in, and the last group's carry out is `cout`. Sum bits always come
straight from the full adders.

The longest carry path:

1. A carry is generated at bit 0 and ripples through the rest of group 0.
2. It skips through groups 1 to 6, one AND-OR stage each.
3. It ripples through group 7 up to bit 31.

Example: `0x7FFF_FFFF + 1`.

The carry out of a group that does not propagate comes from its own ripple
chain, which does not depend on the carry in from below. That is why a carry
never needs to ripple through more than the first and last groups.

## Where this RTL is its own

- **Group size of the 32-bit adder.** The published description gives the
  4-bit group in detail. It does not give the group sizes of the 32-bit adder.
  Its 32-bit drawing suggests stages of varying size, each with an
  "incrementation block" that turns intermediate ripple results into the final
  sum. Neither the stage sizes nor how those blocks work is described.
  - Built here: eight uniform 4-bit groups, with sums taken straight from the
    ripple chains.
  - Not built: incrementation blocks.
  - Other uniform group sizes can be tried through `BLOCK_W`.
- **Port names.** The operands are named `a` and `b` as in the original. The
  carry-in, sum and carry-out names (`cin`, `sum`, `cout`) are chosen here.
- **`grp_p` output of `cska_block4`.** This output lets the enclosing adder
  (and tests) see whether a group skipped.
- **Skip terms.** Which of the two AND terms takes the inverted propagate
  follows the published worked example. It is also the only choice that
  matches the multiplexer it replaces.
- **Not included.** The conventional multiplexer-based carry skip adder and
  its multiplexer-built full adder are only the comparison baseline of the
  original work. No area, power or delay figures are reproduced or checked.

## Verification

Each module has a self-checking testbench in `tb/`. Each testbench prints
`TB_RESULT checks=N failures=M` at the end and has a watchdog.

| testbench            | what it does |
|----------------------|--------------|
| `tb_cska_full_adder` | all 8 input combinations, checked against `a+b+cin` and `a^b` |
| `tb_cska_aoi_skip`   | all 8 combinations: `cout` must be `cin` when `grp_p=1`, else `c_rca` |
| `tb_cska_block4`     | the worked example, then all 512 combinations of `a`, `b`, `cin` (sum, carry, `grp_p`). It counts how often the skip and ripple paths are used and fails if either is never used. |
| `tb_cska32bit`       | the full 32-bit adder at its default parameters: directed cases, then 20,000 random additions checked against 33-bit arithmetic. |

`tb_cska32bit` runs these directed cases:

- the worked example;
- extremes;
- every group propagating with `cin = 1`;
- the longest carry path;
- each group in turn made to skip an incoming carry of 1.

Half of the random vectors are biased towards `b ≈ ~a`, so that groups
propagate often. For every group the test counts how often a carry of 1 took
the skip path and how often the group made its own carry. Independently of
the adder, it also counts full-length skips and carry outs of 1. Any counter
left at zero is a failure.

To run one testbench with Verilator:

```
verilator --binary --timing --assert -Wall -Irtl --top-module tb_cska32bit \
          tb/tb_cska32bit.sv -Mdir obj_tb -o sim
./obj_tb/sim
```

Replace the module name to run another testbench. All four run in well under
a second.

## Changing the design

- **Wider or narrower adder.** Set `WIDTH` on `cska32bit`. It must stay a
  multiple of `BLOCK_W`. The testbench assumes 32 bits and 4-bit groups.
- **Different group size.** Set `BLOCK_W`. `cska_block4` is written for any
  width: the AND gate becomes a reduction over all the group's propagates.
  Wider groups skip fewer times, but their ripple chains are longer.
