# TPS reversible array multiplier

An unsigned 8 x 8 multiplier (width is a parameter) whose netlist consists of
nothing but one kind of reversible logic gate, the four-input, four-output
**TPS gate**. Reversible gates map each input pattern to a distinct output
pattern, so no information is erased while computing; that is the property
behind the interest in reversible logic for very low-power, optical and
quantum computing. The RTL here models such a circuit at the gate level: it
is ordinary synthesizable combinational logic, but every gate instance is a
TPS gate, its unused outputs (the *garbage outputs* of reversible design) are
kept and brought out, and the gate count and quantum cost of the netlist can
be read off a package.

## The TPS gate

Inputs A, B, C, D; outputs P, Q, R, S:

    P = A
    Q = A ^ B ^ C
    R = C
    S = (A&B ^ D) ^ ((A^B) & C)

The gate is a permutation of its 16 input patterns (the bench checks this).
Two settings of its constant inputs make it useful for arithmetic:

| setting | Q | S | use |
|---|---|---|---|
| D = 0 | A ^ B ^ C (sum) | majority(A, B, C) (carry) | full adder |
| C = D = 0 | A ^ B | A & B | partial product (AND) |

`rtl/tps_gate.sv` builds the gate the way its reversible circuit does, as a
cascade of four in-place operations on the four lines:

1. Toffoli, controls A and B, target D (D ^= AB)
2. CNOT, control A, target B (B now holds A^B)
3. Toffoli, controls B and C, target D (D ^= (A^B)C)
4. CNOT, control C, target B (B now holds A^B^C)

In a quantum realisation the gate takes four controlled-V gates and two
CNOTs, a quantum cost of 6; `rev_mult_pkg::TPS_QUANTUM_COST` holds that
number. The V gates have no Boolean meaning and are not modelled.

## Multiplier structure

The multiplier has two stages, both combinational.

**Partial product generation circuit** (`ppgc`). One TPS gate per partial
product a_i·b_j, with A = a_i, B = b_j, C = D = 0; the product bit appears on
S. A reversible circuit may not fan a signal out, so each multiplicand bit
a_i enters once and travels down a chain of WIDTH gates, each gate's P output
(which restores A) feeding the A input of the next. The multiplier bits b_j
go to every chain. WIDTH² gates in all: 16 for 4 x 4, 64 for 8 x 8.

**Parallel adder circuit** (`pac`). A classic array multiplier built from
TPS full adders. Row 0 of partial products is used as it is; its low bit is
product bit 0. Each later row j is a ripple-carry adder of WIDTH TPS full
adders, carry-in 0, that adds partial product row j to the running sum
shifted down one place (the upper WIDTH-1 sum bits of the row above, plus that
row's carry out as the new top bit). The low sum bit of row j is product
bit j; the last row supplies the remaining WIDTH bits plus the final carry
as product bits WIDTH-1 .. 2·WIDTH-1. WIDTH·(WIDTH-1) adders: 12 for 4 x 4,
56 for 8 x 8.

```
 a ─┬─> ppgc ──pp[j][i] = a_i·b_j──> pac ──> p = a·b   (2·WIDTH bits)
 b ─┘     └── garbage (Q, R, chain ends)      └── garbage (P, R of adders)
```

The longest path runs through about 2·WIDTH adder cells (down the rows and
along the last row's ripple carry), plus the partial product chain.

### Size

| width | PPGC gates | PAC gates | TPS gates | quantum cost | unused gate outputs |
|---|---|---|---|---|---|
| 4 | 16 | 12 | 28 | 168 | 60 |
| 8 | 64 | 56 | 120 | 720 | 248 |

`rev_mult_pkg::mult_gate_count()` and `mult_quantum_cost()` compute the first
two totals. The 4-bit totals agree with the published figures for this
multiplier (28 gates, quantum cost 168). The published garbage count for the
4-bit circuit is 42, lower than the 60 unused outputs counted here; how that
figure was counted is not stated, and this netlist does not reproduce it.

### Garbage outputs

`rev_multiplier.garbage` (4·WIDTH² − WIDTH bits) carries every gate output
that no later gate uses. Bits [2·WIDTH² + WIDTH − 1 : 0] come from the PPGC:
{Q, R} of gate (i, j) at bit 2(i·WIDTH + j), then the chain end of each a_i
(which equals a). The rest come from the PAC: {P, R} of adder k of row j at
offset 2((j−1)·WIDTH + k). They carry no result. In a conventional flow leave them unconnected: the P
and R outputs are plain copies of gate inputs, and synthesis removes the
unused Q outputs of the PPGC.

## Where this design departs from, or goes beyond, its source

- **Unsigned.** The design is described as a signed multiplier, and a signed
  partial-product scheme (complemented sign bits, correction rows) is
  sketched, but no circuit for it is given; the array, the gate-level partial
  product circuit and the published simulation results (12·12 = 144 and
  15·14 = 210 on 4-bit operands) are all unsigned. This RTL is unsigned.
- **Width 8 by default.** The multiplier is presented as 8-bit and its array
  is drawn 8 x 8, while the published cost figures and simulation are for the
  4-bit case. `WIDTH` covers both.
- **16-bit product.** The drawn array labels outputs up to P14; the final
  carry is needed for a full 8 x 8 product and is output as p[15].
- **Array, not tree.** Partial products are summed with a linear array of
  ripple rows, as drawn and as the 28-gate count requires; a binary-tree
  adder is mentioned in passing but not described.
- **Own choices:** chaining a_i through the P outputs of the PPGC gates;
  putting the carry on input C of each adder; carry-in 0 at the low end of
  each row; bringing garbage outputs out as a port.
- **Not built:** the transistor-level CMOS version of the gate, and a
  design-for-test scheme for stuck-at and missing-gate faults, which is named
  but not described.

## Files

| file | contents |
|---|---|
| `rtl/rev_mult_pkg.sv` | TPS quantum cost, gate-count and quantum-cost functions |
| `rtl/tps_gate.sv` | the TPS gate as a Toffoli/CNOT cascade |
| `rtl/tps_full_adder.sv` | one TPS gate with D = 0 used as a full adder |
| `rtl/ppgc.sv` | partial product generation, WIDTH² TPS gates |
| `rtl/pac.sv` | array of TPS full adders |
| `rtl/rev_multiplier.sv` | top: `a`, `b` → `p`, plus `garbage` |
| `tb/*_tb.sv` | one self-checking bench per module |
| `tb/rev_multiplier_w4_tb.sv` | 4-bit configuration against the published results |

## Simulating

Each bench prints `TB_RESULT checks=N failures=M` and stops; a watchdog
stops it with a failure if it runs too long. For example, the full 8 x 8
multiplier, all 65 536 operand pairs:

    verilator --binary --timing -Wall -Wno-fatal -y rtl -y tb +libext+.sv \
        rtl/rev_mult_pkg.sv tb/rev_multiplier_tb.sv --top-module rev_multiplier_tb
    ./obj_dir/Vrev_multiplier_tb

Swap the bench file and `--top-module` for the others:

- `tps_gate_tb`: all 16 input patterns against the gate equations; checks
  that outputs never repeat and that D = 0 gives a full adder.
- `tps_full_adder_tb`: all 8 input patterns.
- `ppgc_tb`: corner and random operands; every partial product and every
  fixed-value garbage output.
- `pac_tb`: arbitrary bit matrices as partial products, compared with the
  weighted sum of the rows.
- `rev_multiplier_tb`: all 65 536 pairs at the default width. Also counts
  that the final carry, zero and full partial product rows, and the largest
  operands all occur.
- `rev_multiplier_w4_tb`: `WIDTH = 4`. Checks the published trace values,
  all 256 pairs and the 28-gate / 168 quantum-cost totals.

All benches finish in well under a second.

## Changing it

`WIDTH` is the only parameter and works for any value of 2 or more. The
garbage port width follows from it. Every module is combinational: to
pipeline the multiplier, register `pp` between `ppgc` and `pac`, or register
the running sum between adder rows inside `pac`. That would no longer be a
reversible circuit.
