# 4x4 parity-preserving reversible-logic multiplier

This is a 4-bit by 4-bit unsigned multiplier. It is built only from
*reversible* gates, and every one of those gates is also *parity-preserving*.

- A reversible gate has as many outputs as inputs and maps input patterns to
  output patterns one to one. No information is erased, which is the route
  to computing without the Landauer energy cost of kT ln 2 per erased bit.
- Because the gates have to be reversible, they produce extra *garbage*
  outputs that the computation does not need. They also take extra
  *constant* inputs, tied to 0 here.
- A gate is parity-preserving when the xor of its outputs always equals the
  xor of its inputs. A network of such gates keeps the same property. A
  single flipped bit anywhere on the outputs therefore shows up as a parity
  mismatch, and that is the basis for fault detection.

The multiplier uses only two kinds of gate: the 3x3 Fredkin gate (FRG) and
the 4x4 IG gate. It works in two stages, and it is purely combinational.

```
 x[3:0] y[3:0]
    |      |
 +--v------v---------+   16 pp bits    +------------------------+
 |  ppg_frg_array    |---------------->|  rftpa                 |--> p[7:0]
 |  16 FRG "AND"s    |                 |  4 IG half adders      |
 +---------+---------+                 |  8 two-IG full adders  |
           | 32 garbage                +-----------+------------+
           v                                       | 32 garbage
      ppg_garbage                                  v add_garbage
```

## The two gates

| gate | inputs | outputs |
|------|--------|---------|
| FRG (`frg_gate`) | A, B, C | P = A, Q = A'B ^ AC, R = A'C ^ AB |
| IG (`ig_gate`)   | A, B, C, D | P = A, Q = A ^ B, R = AB ^ C, S = BD ^ B'(A ^ D) |

The Fredkin gate is a controlled swap: A passes through, and B and C are
exchanged when A is 1. The IG gate's Q and R outputs together form a half
adder when C = 0.

## Stage 1: partial products (`ppg_frg_array`)

A Fredkin gate with C = 0 gives R = AB, so it serves as an AND gate. Its P
(= A) and Q (= A'B) outputs are garbage. Sixteen such gates form all
products x_i·y_j in parallel:

- x_i drives the gate's A input and y_j drives B.
- The output `pp[i][j]` has weight 2^(i+j).
- The gate for x_i·y_j owns garbage bits `8i+2j+1` (= x_i) and `8i+2j`
  (= x_i'·y_j). The cell for x0y0 produces g1 g0, and the cell for x3y3
  produces g31 g30.

Each operand bit drives four gates. Strictly reversible circuits forbid
fan-out, but this architecture accepts it at the operand inputs.

## Stage 2: the parallel adder (`rftpa`)

This is the part that takes the most effort to follow. The partial products
fall into columns of weight 0 to 6, holding 1, 2, 3, 4, 3, 2 and 1 bits. The
adder reduces them with 12 cells:

- **Half adder (`ig_half_adder`)**: one IG gate with C = D = 0. Q is the sum
  and R is the carry. The garbage is G1 = A and G2 = AB'.
- **Full adder (`ig_full_adder`)**: two IG gates.
  - The first gate is a half adder on A and B. It gives A^B and AB.
  - The second gate takes A^B on its A input, the carry-in on B and AB on C.
    Its Q output is A^B^Cin (the sum). Its R output is (A^B)Cin ^ AB (the
    carry).
  - The cell has two constant inputs and three garbage outputs: G1 = AB',
    G2 = A^B and G3 = Cin ? A : B.

The cells sit in three ripple chains. A carry always moves one column
left. In the table, "col" is the column weight.

| chain | cell | col | inputs | sum goes to | carry goes to |
|-------|------|-----|--------|-------------|---------------|
| upper right | ha0 | 1 | x1y0, x0y1 | **P1** | fa0 |
| | fa0 | 2 | x0y2, x2y0, ha0.c | ha1 | fa1 |
| | fa1 | 3 | x0y3, x3y0, fa0.c | fa4 | ha3 |
| | ha3 | 4 | x1y3, fa1.c | fa5 | fa6 |
| upper left | ha2 | 3 | x1y2, x2y1 | fa4 | fa2 |
| | fa2 | 4 | x3y1, x2y2, ha2.c | fa5 | fa3 |
| | fa3 | 5 | x2y3, x3y2, fa2.c | fa6 | fa7 |
| lower | ha1 | 2 | x1y1, fa0.s | **P2** | fa4 |
| | fa4 | 3 | fa1.s, ha2.s, ha1.c | **P3** | fa5 |
| | fa5 | 4 | ha3.s, fa2.s, fa4.c | **P4** | fa6 |
| | fa6 | 5 | ha3.c, fa3.s, fa5.c | **P5** | fa7 |
| | fa7 | 6 | x3y3, fa3.c, fa6.c | **P6** | **P7** |

P0 is x0y0 and needs no adder. The upper chains reduce columns 2 to 5 to two
bits each. The lower chain then works as an ordinary ripple-carry adder on
those bits. The stage gives the correct weighted sum for *any* 16 input
bits, not only for real partial products, because the largest possible sum
(225) fits in 8 bits.

The longest path runs fa0 → fa1 → ha3 → fa5 → fa6 → fa7. That is one FRG
plus up to 11 IG gate levels. Implemented on a Spartan-3E FPGA (speed
grade -4), this architecture is reported at about 19 ns worst-case delay.
That figure is not checked here.

## Garbage outputs and parity

The top module `rev_mult4x4` brings all 64 garbage bits out as ports:

- `ppg_garbage`: 32 bits from the partial-product stage.
- `add_garbage`: a packed struct `rftpa_garbage_t` from the adder stage.
  `ha[k]` holds {G1, G2} of half adder k. `fa[k]` holds {G1, G2, G3} of
  full adder k. The cell numbers are the ones in the table above.

Every gate preserves parity, and every internal wire is used exactly once.
Each operand bit enters four gates, so each contributes an even number of
times. As a result:

    xor of p[7:0], ppg_garbage and add_garbage == 0   for every x, y

A stuck or flipped output bit breaks this identity. No checker is built
into the hardware; `rev_mult4x4` states the identity as an immediate
assertion, which only a simulator evaluates. A user who wants fault
detection in silicon can add a 72-input xor tree outside.

## Where this RTL makes its own choices

The gate equations, the gate counts, the constant and garbage counts of
each cell, and the cell inputs in the table above follow the published
design. The following points are choices made here:

- **Full adder wiring.** The line that drives the second IG gate's D input
  in the full adder is the first gate's pass-through output A. This fixes
  G1 and G3 as listed above. Sum and carry do not depend on the choice.
- **Partial-product cells.** x_i, not y_j, drives the Fredkin gate's control
  input. This fixes which operand bit appears in the garbage.
- **Inter-chain wiring.** The links between the upper chains and the lower
  chain follow from the column weights. Every sum goes to the lower cell of
  its own column, and every carry goes to the cell one column up.
- **Port layout.** The cell numbering ha0..ha3 and fa0..fa7, the bit order
  of all garbage ports, and having garbage ports at all are choices made
  here.
- **Technology.** The circuit is written as ordinary combinational logic.
  It has no clock, reset or registers. Synthesis maps it to normal
  irreversible gates, so the energy argument applies only to a reversible
  implementation technology. Parity preservation and the function hold in
  any technology.

## Files

`rtl/`:

| file | content |
|------|---------|
| `rev_mult_pkg.sv` | widths, `operand_t`, `product_t`, `pp_array_t`, `ppg_garbage_t`, `rftpa_garbage_t` |
| `frg_gate.sv`, `ig_gate.sv` | the two gates |
| `ig_half_adder.sv`, `ig_full_adder.sv` | adder cells |
| `ppg_frg_array.sv` | stage 1 |
| `rftpa.sv` | stage 2 |
| `rev_mult4x4.sv` | top |

`tb/` has one self-checking testbench per module, `tb_<module>.sv`. Each
prints `TB_RESULT checks=N failures=M` and has a watchdog.

- The gate testbenches compare against the gates' truth tables, which are
  written out as constants. They also check parity preservation and that
  every output pattern occurs once.
- `tb_rftpa` is exhaustive over all 65,536 input patterns.
- `tb_rev_mult4x4` covers all 256 operand pairs. It checks the product, the
  stage-1 garbage and the parity identity, and it confirms that flipping
  any single output bit is detected. It also counts carries in each of the
  12 adder cells, and it fails if any cell never carries.

## Simulating

With Verilator 5, from the directory that holds `rtl/` and `tb/`:

```
verilator --binary --timing --top-module tb_rev_mult4x4 \
    -y rtl -y tb +libext+.sv rtl/rev_mult_pkg.sv tb/tb_rev_mult4x4.sv
./obj_dir/Vtb_rev_mult4x4
```

To run another testbench, replace `tb_rev_mult4x4` with its name. Every
testbench finishes in well under a second. Linting a module works the same
way:

```
verilator --lint-only -Wall -y rtl +libext+.sv rtl/rev_mult_pkg.sv rtl/rftpa.sv
```

The design has no parameters. Its structure (which cell adds which column)
is specific to 4-bit operands, so other widths need a new adder stage.
