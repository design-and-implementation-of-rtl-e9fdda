# ALU-style carry select adder

A carry select adder (CSLA) is fast because it does not wait for the carry
coming into a group of bits. It computes the group's result twice, once for
carry-in 0 and once for carry-in 1, and picks one when the real carry arrives.
The classic form pays for this in area. It keeps two complete ripple-carry
adders per group plus a row of 2:1 multiplexers for the sum and carry bits.

This design keeps the speed idea and drops most of the duplication. Only the
carry chain depends on the carry-in, so only the carry chain is duplicated:

* the half adders (propagate and generate) are built once;
* the sum XOR is done once, after the right carries have been selected.

The result is a 4-bit adder slice of five small units. Wider adders are
chains of slices. The default build is an 8-bit adder made of two slices.

## The five units of a slice

All signals are N bits wide (N = 4). Bit `i` of every vector belongs to
operand bit `i`.

| Unit | Module | Gates per bit | Computes |
|------|--------|---------------|----------|
| HSG, half sum generator | `csla_hsg` | XOR, AND | `s0 = a ^ b` (propagate), `c0 = a & b` (generate) |
| CG0, carry generator, carry-in 0 | `csla_cg` with `CARRY_IN=0` | AND, OR | `g0[i] = c0[i] \| (s0[i] & g0[i-1])`, `g0[-1] = 0` |
| CG1, carry generator, carry-in 1 | `csla_cg` with `CARRY_IN=1` | AND, OR | `g1[i] = c0[i] \| (s0[i] & g1[i-1])`, `g1[-1] = 1` |
| CS, carry selector | `csla_cs` | AND, OR | `c = g0 \| (cin & g1)`, `cout = c[N-1]` |
| FSG, full sum generator | `csla_fsg` | XOR | `sum = s0 ^ {c[N-2:0], cin}` |

Data flows HSG → (CG0 ∥ CG1) → CS → FSG. `csla_alu_slice` wires the five units
together.

### Why the carry selector has no multiplexer

The selector has to produce `cin ? g1 : g0`. It does this with one AND and one
OR per bit, with no inverter on `cin`. That works because of a monotonicity
property. If the bit carries out with carry-in 0, it also carries out with
carry-in 1 (`g0[i]` implies `g1[i]`). So:

* with `cin = 0` the AND term is 0 and `c = g0`;
* with `cin = 1`, `c = g0 | g1 = g1`.

`csla_cs` holds an assertion for this rule. It fires if any bit has a CG0
carry without a CG1 carry. The rule cannot break when the carry generators
are fed from a real half adder row. It matters only if the selector is
reused with other inputs.

### Where the speed comes from

The carry-in of a slice reaches its carry out through a single AND/OR pair in
CS. Both carry chains (CG0 and CG1) ripple in parallel and depend only on `a`
and `b`. When slices are chained, each slice's chains settle at the same
time. The carry then crosses each slice in one AND/OR level instead of N
levels. Inside a slice the chains still ripple, so slices are kept short.

### Gate count

Counted without optimisation, one 4-bit slice has:

* 8 XOR (4 in HSG, 4 in FSG);
* 16 AND (4 each in HSG, CG0, CG1 and CS);
* 12 OR (4 each in CG0, CG1 and CS).

This count treats the bit-0 cells of CG0 and CG1 as full AND-OR cells, even
though their input carry is a constant. Synthesis folds those constants away,
so a synthesized slice is a little smaller (8 XOR, 14 AND, 11 OR). The 8-bit
adder is twice a slice.

For comparison: a ripple-carry CSLA of the same width needs two full
ripple-carry adders plus N+1 multiplexers per group. Variants that replace
the carry-in-1 adder with a binary-to-excess-1 converter, or with shared
XOR/inverter logic, are smaller, but still larger than this slice. Those
variants are not part of this code.

## Top level: `csla_alu_adder`

```
a[7:4] b[7:4]                 a[3:0] b[3:0]
     │                              │
┌────▼────────┐  carry[1]   ┌──────▼──────┐
│  slice 1    │◄────────────┤  slice 0    │◄── cin
└──┬──────┬───┘             └──────┬──────┘
 cout  sum[7:4]                 sum[3:0]
```

Parameters:

| Parameter | Default | Meaning |
|-----------|---------|---------|
| `WIDTH` | 8 | operand width |
| `SLICE` | 4 | bits per slice; `WIDTH` must be a multiple of it (an elaboration error otherwise) |

The defaults live in `csla_pkg` (`ADDER_W`, `SLICE_W`).

Ports: `a`, `b` (`WIDTH` bits), `cin` in; `sum` (`WIDTH` bits), `cout` out.
Together, `{cout, sum} = a + b + cin`. The whole adder is combinational: it
has no clock, no reset and no latency in cycles.

## What is the design's and what is a choice made here

Taken from the design description:

* the five units and their order;
* the gate types in each unit: AND+XOR for HSG, AND/OR for CG and CS, XOR
  for FSG;
* the two carry generators that assume carry-in 0 and 1;
* the 4-bit slice width and the 4- and 8-bit sizes.

The per-gate counts above (8 XOR, 16 AND, 12 OR per 4-bit slice) agree with
the figures given for the design.

Choices made here:

* **The exact Boolean recurrences of CG and CS.** The description names only
  the gate types. The forms above are the natural ones, and they reproduce
  its per-gate counts.
* **Building the 8-bit adder from two chained 4-bit slices.** The description
  gives the 8-bit size exactly twice the 4-bit one, which fits this reading.
* **One parameterized module for CG0 and CG1.**
* **A pure combinational adder.** The description mentions no clock, register
  or pipeline.

The design is described as part of a bit-sliced ALU with an arithmetic part
and a logic part. Only the arithmetic part, the adder, is specified.
No logic operations, opcodes or result selection are given, so no logic unit
is included.

## Files

| File | Contents |
|------|----------|
| `rtl/csla_pkg.sv` | default sizes |
| `rtl/csla_hsg.sv`, `csla_cg.sv`, `csla_cs.sv`, `csla_fsg.sv` | the four unit modules (CG used twice) |
| `rtl/csla_alu_slice.sv` | one slice |
| `rtl/csla_alu_adder.sv` | top level |
| `tb/tb_<module>.sv` | one self-checking testbench per module |
| `tb/tb_csla_workloads.sv` | 4-bit and 8-bit adders side by side |

## Verification

Every testbench checks its module against values worked out independently
from integer arithmetic. All of them are exhaustive:

* `tb_csla_hsg`: all 4-bit operand pairs, bit by bit.
* `tb_csla_cg`: CG0 and CG1 at N = 4 and N = 6. Each carry bit is compared
  with the carry out of that bit position of `a + b + CARRY_IN`.
* `tb_csla_cs`: every reachable pair of carry vectors, with both carry-ins.
* `tb_csla_fsg`: every combination of inputs.
* `tb_csla_alu_slice`: all 512 cases of `a`, `b` and `cin`. It also counts
  the cases where the carry-in decides the carry out.
* `tb_csla_alu_adder`: all 131072 cases at the default 8-bit size. It counts
  how often each mechanism happened and fails if any never did. The
  mechanisms are: carry-in 1 applied, a carry passed between slices, a carry
  out of the adder, and a carry propagated through every bit of the upper
  slice.
* `tb_csla_workloads`: a 4-bit build (one slice) and the 8-bit build. The
  4-bit additions are also run on the 8-bit build, zero-extended.

Each testbench prints `TB_RESULT checks=N failures=M` and stops itself. A
watchdog ends it with a failure if it hangs. Every run finishes in well under
a second.

To run one with Verilator 5:

```
verilator --binary --timing --assert -Irtl -Itb \
    rtl/csla_pkg.sv tb/tb_csla_alu_adder.sv --top-module tb_csla_alu_adder
./obj_dir/Vtb_csla_alu_adder
```

Use the same command with another testbench name for the other modules.
Verilator finds the modules through `-Irtl`, since each lives in a file of
its own name.

## Changing it

* **Another width:** set `WIDTH` on `csla_alu_adder`. It must be a multiple
  of `SLICE`.
* **Longer or shorter slices:** set `SLICE`. Longer slices make the CG ripple
  longer but cut the number of slice-to-slice hops.
* **Lint note:** Verilator's `-Wall` reports the top selected carry `c[N-1]`
  as unused inside `csla_fsg`. That is expected: that bit leaves the slice as
  `cout`, not through the sum.
