# A 16-bit carry look-ahead adder with run-time configurable accuracy

Many signal- and image-processing workloads tolerate small arithmetic errors,
and some need exact results only part of the time, for example after an event
has been detected. This adder lets the user choose, on every operation, how
exact the sum has to be. Its idea is small: it is a carry look-ahead adder whose
half adders can be told, four bits at a time, to stop *creating* carries. A
group told to do so adds each bit pair as an OR, still passes on any carry that
reaches it from below, and never starts a carry of its own. Fewer carries are
created, so less of the carry logic switches, and the run-time choice costs
only one AND input per bit.

Everything is combinational: there is no clock, no reset and no handshake.

## Interface

| port      | dir | width | meaning |
|-----------|-----|-------|---------|
| `a`       | in  | 16    | first operand |
| `b`       | in  | 16    | second operand |
| `m`       | in  | 3     | mask, one bit per low group: `m[k]` = 1 makes bits 4k+3..4k exact, 0 masks them |
| `sum_out` | out | 17    | sum; bit 16 is the carry out |

`m = 3'b111` gives the exact `a + b`. Bits 15..12 have no mask bit and are
always computed exactly. That does not make the top four bits of the result
always right, because a masked lower group can withhold a carry from them.

## The carry-maskable half adder

Each bit starts in a carry-maskable half adder (`cmha`). It has a mask input
`m_x` and the usual outputs: propagate `p` and generate `g`.

| `m_x` | `p`       | `g`       |
|-------|-----------|-----------|
| 1     | `a XOR b` | `a AND b` |
| 0     | `a OR b`  | 0         |

The RTL writes this as `g = m_x & a & b` and `p = (a | b) & ~g`, which gives both
rows. The two outputs are never 1 at the same time.

The masked row is the only new element in the design. A masked bit with
`a = b = 1` gives `p = 1, g = 0`. That is exactly what an exact half adder gives
for `a = 1, b = 0`. So a masked bit treats 1 + 1 as if it were 1 + 0. All other
input pairs behave exactly as in an exact adder, including a carry passing
through a bit where `a OR b` is 1.

## What a masked result is worth

It follows that the adder always computes an exact sum, only of modified
operands:

    sum_out = a + (b & ~(a & b & M))

Here `M` has ones in every bit of a masked group: `M = 16'h0F0F` for
`m = 3'b010`. So:

* The result is never larger than `a + b`.
* The error is the value of `a & b` in the masked bits. With all three low
  groups masked it is at most `16'h0FFF`. A masked group that never sees
  `a = b = 1` costs nothing.
* The error of each group depends on its own bits only, so `m` sets the worst
  case error directly. Masking group 0 alone costs at most 15. Masking group 2
  alone costs at most 3840.

This identity is derived here from the half-adder table, not taken from the
original description. The end-to-end testbench checks it on every vector.

Worked example (these operands appear in the original publication's
simulation): `a = 16'h6524`, `b = 16'h5361`, `m = 3'b010`.

* Groups 0 and 2 are masked, so `p = 16'h3745` and `g = 16'h4020`.
* The exact sum is `17'h0B885`. The adder returns `17'h0B785`.
* The missing `16'h0100` is `a & b = 16'h4120` restricted to the masked bits.

The publication's waveform shows the same `p` and `g`. But it shows all carries
as 0 and `sum_out` equal to `p` (`17'h03745`). That contradicts its own
architecture, in which look-ahead units feed carries into the sum XORs. This RTL
follows the architecture. A version wired like the waveform, with the carries
left out of the sum, is what the end-to-end testbench's fault check catches.

## Structure

The adder has three stages. Each stage is its own module, and each has a
`WIDTH` (default 16) and `GROUP` (default 4) parameter.

1. **`pg_stage`: propagate/generate.** It holds four `cmha_group`s of four
   `cmha`s each. The groups cover bits 3-0, 7-4, 11-8 and 15-12. All four
   cells of a group share one mask bit: group k takes `m[k]`. The top group's
   mask is tied to 1. Masking a group at a time, instead of a bit at a time,
   keeps the mask to three wires.
2. **`carry_stage`: carries.** It holds four 4-bit look-ahead units
   (`cla4_unit`). Within a unit, each carry is a two-level sum of products of
   the unit's `p`, `g` and carry in:
   `c_i = g_{i-1} | p_{i-1}g_{i-2} | ... | p_{i-1}...p_0 cin`.
   The units are chained: unit k's carry out is unit k+1's carry in, and the
   carry into unit 0 is 0.

   A classic two-level 16-bit carry look-ahead adder adds a fifth unit. That
   unit builds the group carries from group propagate/generate signals. This
   design leaves it out and accepts a short ripple across the four units. The
   stage outputs `cg[i]`, the carry into bit i, plus the carry out of bit 15.
3. **`sum_stage`: sum.** It computes `sum_out[i] = p[i] XOR cg[i]`.
   `sum_out[16]` is the carry out.

`cma_16bit` is the top module; it wires the three stages together.
`cma_pkg` holds the default sizes. `pg_stage` stops elaboration if `WIDTH` is
not a multiple of `GROUP`, or if there are fewer than two groups.

## Where this RTL departs from, or adds to, the original

* The module name `cma_16bit` and its port names and widths are the published
  ones. Its 52 I/O bits match the published FPGA implementation's 52 bonded
  pins.
* `sum_out[16]` as the carry out is a choice made here. The original gives a
  17-bit sum without saying what bit 16 holds.
* The original does not give the equations inside the look-ahead units. The
  textbook sum-of-products form is used.
* The original's example sum is not reproduced; see above.
* The original gives an FPGA delay of 9.169 ns and a lower figure of 4.936 ns
  in different places, plus slice and LUT counts. None of these is reproduced
  or checked here.
* The baseline it compares against is not included. That baseline is a
  conventional two-level carry look-ahead adder with five units.

## Simulating

Every module has a self-checking testbench in `tb/`. Each prints
`TB_RESULT checks=N failures=M` and stops. For example:

    verilator --binary --timing --assert -Irtl rtl/cma_pkg.sv tb/tb_cma_16bit.sv \
        --top-module tb_cma_16bit -Mdir obj && obj/Vtb_cma_16bit

Swap in another testbench name to run it. The `-Irtl` flag lets verilator find
the modules by file name.

| testbench        | what it checks |
|------------------|----------------|
| `tb_cmha`        | all 8 input combinations against the half-adder table |
| `tb_cmha_group`  | all 512 combinations against the group's XOR/AND and OR/0 outputs |
| `tb_pg_stage`    | random operands under every mask; the top group stays exact |
| `tb_cla4_unit`   | all 512 combinations against a bit-serial ripple model |
| `tb_carry_stage` | long propagate runs and random `p`/`g`, against a ripple model |
| `tb_sum_stage`   | random inputs, rebuilt one bit at a time |
| `tb_cma_16bit`   | the full adder at default size, see below |

`tb_cma_16bit` runs the worked example and some hand-computed corner cases.
It then runs 20,000 random additions, cycling through all eight masks. Every
result must match both a bit-serial model and the closed form above. With
`m = 3'b111` it must also equal `a + b`.

The testbench counts how often each behaviour happened:

* each low group masked, and each low group exact;
* a carry out of bit 15;
* a carry running through a masked group;
* an approximate result that differs from the exact one.

If any of these never happened, that counts as a failure. All testbenches
finish in well under a second.
