# Carry select adder with 4-bit Brent-Kung groups

A carry select adder speeds up addition by computing each slice of the
result twice in parallel: once assuming no carry comes in from below and
once assuming one does. The right copy is picked by a multiplexer as soon as
the real carry arrives. The classic form builds those copies from ripple
carry adders. Here each copy is a 4-bit Brent-Kung parallel prefix adder
instead, so the carries inside a slice take two prefix levels rather than a
four-stage ripple.

The default adder is 16 bits wide and purely combinational:

    {cout, sum} = a + b + cin

It has no clock, no registers and no reset, so it has no latency in cycles.
Its logic is built from three two-input gate cells (AND, OR, XOR) and a 2:1
mux. In the circuit this design targets, those cells are small modified
gate diffusion input (MGDI) transistor structures that save area and power.
That is a property of the transistor implementation; the RTL keeps the cells
as separate leaf modules so the structure stays visible, but it models only
their logic.

## Module hierarchy

```
modified_csa                 16-bit carry select adder (top)
├── bka4          x7         4-bit Brent-Kung adder with carry-in
│   ├── pre_processing       g = a & b, p = a ^ b per bit
│   ├── grey_cell            folds cin into bit 0 (see below)
│   ├── carry_generation     Brent-Kung prefix network
│   │   ├── black_cell  x1
│   │   └── grey_cell   x3
│   └── post_processing      sum = p ^ incoming carry
└── mux2          x15        4 sum bits + 1 carry per upper group
leaf cells: mgdi_and2, mgdi_or2, mgdi_xor2
package:    mcsa_pkg (BKA_BITS = 4)
```

## The 4-bit Brent-Kung group (`bka4`)

This is the part that needs the closest reading. It works in three stages.

**Generate and propagate** (`pre_processing`). Bit i *generates* a carry
when both operand bits are 1 (`g[i] = a[i] & b[i]`). It *propagates* an
incoming carry when exactly one is 1 (`p[i] = a[i] ^ b[i]`).

**Prefix network** (`carry_generation`). The pair (G, P) of a span of bits
says whether the span generates a carry by itself and whether it passes one
through. Two adjacent spans, high (i:k) and low (k-1:j), combine as

    G(i:j) = G(i:k) | P(i:k) & G(k-1:j)
    P(i:j) = P(i:k) & P(k-1:j)

A *black cell* computes both outputs. A *grey cell* computes only G. It is
used once the joined span reaches bit 0: from then on G(i:0) is the carry
out of bit i and P is no longer needed. For four bits the network is:

| level | cell  | inputs                    | output              |
|-------|-------|---------------------------|---------------------|
| 1     | black | (G3,P3) with (G2,P2)      | G(3:2), P(3:2)      |
| 1     | grey  | (G1,P1) with G0           | C1 = G(1:0)         |
| 2     | grey  | (G(3:2),P(3:2)) with C1   | C3 = G(3:0) = cout  |
| 2     | grey  | (G2,P2) with C1           | C2 = G(2:0)         |
| —     | wire  | G0                        | C0                  |

In the transistor circuit the paths that skip a level go through buffer
cells (inverter pairs) to balance load. Logically those are wires, and the
RTL treats them as wires.

**Sum** (`post_processing`). `sum[0] = p[0] ^ cin` and
`sum[i] = p[i] ^ C(i-1)` for i = 1..3.

**Carry-in.** The network above has no carry input, and in the reference
arrangement the carry-in reaches only `sum[0]`. That gives wrong carries for
cin = 1, e.g. 1 + 0 + 1 would give sum bit 1 = 0. The carry select scheme
needs one adder of each pair to really add the extra 1. So `bka4` puts one
extra grey cell in front of the network:

    g0' = g[0] | p[0] & cin

The network then sees cin as a carry generated below bit 0. This extra cell
is this design's own addition; the rest of the group follows the reference
structure.

## The carry select stage (`modified_csa`)

The operands are cut into `WIDTH/4` groups of four bits.

* **Group 0** (bits 3:0) is a single `bka4` fed by the external `cin`.
* **Each higher group k** has two `bka4`s on the same operand bits. One has
  its carry-in tied to 0 and the other to 1. Five `mux2`s pick the four sum
  bits and the group carry. The carry out of group k-1 drives their select
  line: 0 picks the tied-0 adder (`in0`), 1 picks the tied-1 adder (`in1`).

All the group adders work at the same time. After the first group, the
carry moves up through one mux per group, not through a full adder. The
group's selected carry becomes `cout` after the top group.

`WIDTH` (default 16) may be any non-zero multiple of 4; other values stop
elaboration with an error. The group size is fixed at 4 (`mcsa_pkg::BKA_BITS`)
because `carry_generation` is the hand-laid 4-bit network and not a general
prefix-tree generator.

## Where this RTL departs from or goes beyond the reference design

* The carry-in fold in `bka4` described above.
* The lowest group's carry-in is an input port, `cin`. The reference circuit
  drives it from a source whose value is not specified.
* Which adder of a pair is the carry-in-0 one is a naming choice (`u_bka_c0`
  and `u_bka_c1`).
* Buffer cells are omitted, because they are logically wires. `carry_generation`
  therefore wires `c[0]` and `p0_out` straight from its inputs.
* The MGDI cells, the transistor-level mux and all sizing are modelled by
  their Boolean function only. Nothing here reflects transistor count, area,
  power or analog delay. The reported results for the 16-bit adder (17.83 nW
  and a delay of 3.73 µs, against 25 nW and 4.584 µs for an
  RCA-based carry select adder) cannot be reproduced from RTL.
* The RCA-based carry select adder is only a comparison baseline and is not
  included.

## Verification

Every module has a self-checking testbench in `tb/`. Each one prints
`TB_RESULT checks=N failures=M` and has a time-based watchdog.

| testbench                  | what it checks |
|----------------------------|----------------|
| `tb_mgdi_and2/or2/xor2`    | truth tables, exhaustive |
| `tb_mux2`                  | all 8 input combinations |
| `tb_black_cell`, `tb_grey_cell` | all input combinations against the span-merging rule |
| `tb_pre_processing`, `tb_post_processing` | all 256 input combinations |
| `tb_carry_generation`      | all 256 (g, p) patterns against a serial carry chain |
| `tb_bka4`                  | all 512 (a, b, cin) against integer addition; requires full-ripple carry-in cases |
| `tb_modified_csa`          | default 16-bit top: directed corners and 200,000 random vectors (every 8th with b = ~a, to get long carry chains) |
| `tb_modified_csa_widths`   | 8-bit top exhaustively (2^17 vectors) and 32-bit top on 50,000 random vectors |

`tb_modified_csa` also counts how often each mechanism occurred, and fails if
one never did:

* each upper group selecting its carry-in-0 result;
* each upper group selecting its carry-in-1 result;
* a carry passed through a propagating group by its carry mux;
* a carry-in travelling from bit 0 to `cout`;
* a carry out of the top bit.

Each testbench was also run against a deliberately broken copy of its module
(for example, swapped mux inputs, the carry-in left out of the prefix
network, or every group selected by group 0's carry). Every one of those
faults was caught.

## Simulating

The package must come first. Everything else is found through `-y rtl`:

```
verilator --binary --timing --assert -y rtl rtl/mcsa_pkg.sv \
    tb/tb_modified_csa.sv --top-module tb_modified_csa -o sim
./obj_dir/sim
```

Swap in any other testbench name to run it. To lint a single module:

```
verilator --lint-only -Wall -y rtl rtl/mcsa_pkg.sv rtl/modified_csa.sv
```

Verilator prints an unused-parameter warning when it lints a module that
does not use `mcsa_pkg`. The warning is harmless.
