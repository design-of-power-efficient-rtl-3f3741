# 4-bit magnitude comparator by 2's-complement subtraction, in GDI logic

A magnitude comparator usually works bit by bit: compare the MSBs, and only if they
are equal look at the next bit down. That takes a chain of per-bit equality and
greater-than cells. This design does something else. It subtracts, and reads the
relation off the difference. It computes `B - A` as `B + ~A + 1` with a plain
four-stage ripple-carry adder. Then:

| condition on the adder result                | relation | output   |
|----------------------------------------------|----------|----------|
| no carry out of the last stage               | A > B    | `a_gt_b` |
| all four sum bits zero                       | A = B    | `a_eq_b` |
| neither of the above (carry, nonzero sum)    | A < B    | `a_lt_b` |

Apart from the adders, the hardware is small: four inverters on A, one inverter on
the carry, a 4-input NOR on the sum bits and a 2-input NOR that joins the two flags.

The main configuration builds every gate from **gate-diffusion-input (GDI)**
cells, a two-transistor cell style. The full adder is then only ten transistors, and
the whole comparator has 62. The RTL keeps that structure, cell for cell. Four other
full-adder circuit styles can be selected with a parameter, so the same comparator
can be built five ways.

The RTL is purely combinational: there is no clock, no reset and no state.

## Why the carry tells the relation

For 4-bit unsigned `A` and `B`, the adder computes `B + (15 - A) + 1 = 16 + (B - A)`.

- If `B >= A`, that sum is between 16 and 31. Bit 4, the carry out, is 1.
- If `B < A`, the sum is below 16 and the carry out is 0.

So the carry out means `A <= B`, and its inverse is `A > B`. The low four bits are
`(B - A) mod 16`. They are all zero only when `A = B`. A `<` relation is whatever
is left, which is `NOR(A>B, A=B)`. For every input pair exactly one flag is high.

The `+1` of the 2's complement costs no extra hardware: it is the carry in of
the first adder, tied to 1. The operands are unsigned. Comparing signed
values would need different flag logic, and this design does not do that.

## The GDI cell

A GDI cell looks like a CMOS inverter: one PMOS and one NMOS share a gate input
`G`. The difference is that the two source terminals are not tied to VDD and GND.
They are signal inputs, `P` on the PMOS and `N` on the NMOS. When `G` is low the
PMOS conducts and `Q = P`. When `G` is high the NMOS conducts and `Q = N`:

    Q = ~G & P | G & N        (a 2:1 multiplexer selected by G)

Tying `P` and `N` to constants or signals gives the basic gates:

| function | G | P  | N  | Q          |
|----------|---|----|----|------------|
| OR       | A | B  | 1  | A + B      |
| AND      | A | 0  | B  | A · B      |
| MUX      | A | B  | C  | A'B + AC   |
| XOR      | A | B  | B' | A ⊕ B      |
| NOT      | A | 1  | 0  | A'         |

`gdi_cell` models the cell as an ideal multiplexer. The gates of the comparator
are all built from it:

- `gdi_inv`: one cell, the NOT row (2 transistors).
- `gdi_nor2`: an OR cell followed by an inverter (4 transistors).
- `gdi_nor4`: two OR cells give `a|b` and `c|d`. A third OR cell joins them, and an
  inverter follows (8 transistors).

## The ten-transistor GDI full adder (`fa_gdi`)

This is the least obvious part of the design. It uses five cells:

| cell | G     | P     | N     | output                      |
|------|-------|-------|-------|-----------------------------|
| 1    | a     | 1     | 0     | `a_n = ~a`                  |
| 2    | b     | a     | a_n   | `x = a ^ b`                 |
| 3    | x     | 1     | 0     | `xn = ~(a ^ b)`             |
| 4    | cin   | x     | xn    | `sum = cin ? ~(a^b) : a^b`  |
| 5    | xn    | cin   | b     | `cout = (a == b) ? b : cin` |

The sum cell follows from the sum equation. The carry cell uses a simple fact.
When `a` and `b` agree, the carry out equals either one of them. When they differ,
it equals the carry in. The `P`/`N` wiring of cells 4 and 5 was worked out from
the original schematic. `tb_fa_gdi` checks it against the full-adder truth table.

Transistor budget of the comparator: 4 adders × 10, plus 5 inverters × 2, plus the
NOR2 (4) and the NOR4 (8). That is 62, the count given for the original circuit.

## The other full-adder styles

`FA_STYLE` (type `mc_pkg::fa_style_e`) selects the adder style that `full_adder`
instantiates. All five styles compute `sum = a^b^cin` and `cout = MAJ(a,b,cin)`.
Each module's internal nodes follow its circuit style:

| value    | module   | structure modelled                                                               |
|----------|----------|----------------------------------------------------------------------------------|
| `FA_MGL` | `fa_mgl` | majority-gate static CMOS, 32 T: input inverters, inverting majority gate on the complemented inputs for `cout`, a 16-T gate for `sum` |
| `FA_MAL` | `fa_mal` | mirror adder, 28 T: inverted carry node, inverted sum node built from it (`sum = abc + (a+b+c)·~cout`), output inverters |
| `FA_CPL` | `fa_cpl` | complementary pass-transistor logic: dual-rail NMOS pass networks steered by `b` then `cin`, output inverters; has both output rails |
| `FA_TGL` | `fa_tgl` | transmission-gate adder, 20 T: XOR/XNOR stage steered by `b`, then transmission-gate muxes `sum = x ? ~cin : cin`, `cout = x ? cin : a` |
| `FA_GDI` | `fa_gdi` | the GDI adder above (default)                                                    |

In the GDI configuration the inverters and NORs of the comparator are GDI cells.
In the other four configurations they are written as plain operators, as static
CMOS gates.

## Files

| file                      | contents                                                           |
|---------------------------|--------------------------------------------------------------------|
| `rtl/mc_pkg.sv`           | `fa_style_e`, the adder-style enumeration                          |
| `rtl/mag_comp4.sv`        | top: the comparator, parameter `FA_STYLE` (default `FA_GDI`)       |
| `rtl/full_adder.sv`       | chooses one adder style per stage                                  |
| `rtl/fa_*.sv`             | the five full adders                                               |
| `rtl/gdi_cell.sv`, `gdi_inv.sv`, `gdi_nor2.sv`, `gdi_nor4.sv` | GDI cell and gates               |
| `tb/tb_<module>.sv`       | self-checking testbench per module                                 |
| `tb/tb_mag_comp4_styles.sv` | all five comparator styles side by side                          |

Top-level ports of `mag_comp4`: `a[3:0]`, `b[3:0]` in, and `a_gt_b`, `a_eq_b`,
`a_lt_b` out.

## Simulating

Each testbench is self-checking. It prints `TB_RESULT checks=N failures=M` and
finishes. With Verilator 5:

    verilator --binary --timing --assert -Irtl -y rtl -y tb \
        rtl/mc_pkg.sv tb/tb_mag_comp4.sv --top-module tb_mag_comp4
    ./obj_dir/Vtb_mag_comp4

Replace the testbench name to run another one. `mc_pkg.sv` must come first, because
every module that uses the style enumeration imports it.

What the testbenches cover:

- `tb_mag_comp4`: the default (GDI) comparator, with no parameter override, on all
  256 operand pairs. It checks the three flags against integer comparison, and
  checks that exactly one flag is high. It counts how often each relation occurred:
  120 A>B, 16 A=B, 120 A<B. It fails if any relation never occurs.
- `tb_mag_comp4_styles`: all five styles on all 256 pairs.
- Full adders: all 8 input combinations against `a+b+cin`. For CPL the
  complementary rails are checked too.
- GDI cell: its equation and all five gate configurations. GDI gates: every input
  combination.

Each vector is held for 1 ns. The model has no delays, so the time is only for
ordering. A watchdog in each testbench ends a hung run with a failure.

## What the model does not capture

- **Electrical behaviour.** Each cell is modelled as an ideal logic function. The
  original circuits were designed at transistor level in a 180 nm CMOS process
  at 1.8 V, with NMOS 1 µm / 500 nm and PMOS 2.5 µm / 500 nm (W/L). Transistor
  sizes, power (about 1.2 nW for the GDI comparator), delay (about 0.93 ns) and
  how power varies with temperature and supply voltage cannot be expressed in RTL.
  The weak output levels of GDI and pass-transistor cells are also not modelled.
- **Synthesised netlists.** A synthesis tool reduces every style to the same
  Boolean function. The multiplexer structure survives only as the RTL's
  hierarchy and its node names. To get the transistor-level circuit, map the cells
  by hand or with a GDI or pass-transistor library.

## Choices made in this RTL

- The sum and carry formulas of the MGL and MAL adders come from the majority relation
  and from `sum = abc + (a+b+c)·~cout`. The pass-network data assignments in
  `fa_cpl` and `fa_tgl` are one consistent reading of those circuits. In `fa_tgl`
  the carry passes `a` when the operands agree; passing `b` would work the same.
  Each variant is checked exhaustively.
- In `gdi_nor4`, the `c|d` partial drives the gate of the joining cell. Using
  `a|b` instead gives the same function.
- The port names, the style parameter and its enumeration belong to this RTL. The
  figures of the original design label the outputs G, E and L.
