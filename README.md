# Pipelined five-bit modular adder, z = |x + y|ₘ

Residue number system (RNS) processors split every number into small residues
and work on each residue channel with its own modulus m. The most frequent
operation in such a channel is the two-operand modular adder (TOMA): given two
residues x, y in 0..m−1, produce (x + y) mod m. This RTL implements a TOMA for
five-bit moduli (17..31, reference case m = 29) that is built to be pipelined
cheaply: its logic splits into four short layers with only **three register
rows holding 30 flip-flops** for m = 29, and it accepts one operand pair per
clock.

The structure is the "new TOMA" of M. Czyżak, J. Horiszny and R. Smyk,
*Pipelined Two-Operand Modular Adders*. This is an independent
SystemVerilog rendering of it; the choices made where the published
description stops are listed under [Departures and own choices](#departures-and-own-choices).

## The arithmetic

Let Z = 32 − m, written m̃ (the two's complement of −m without its sign bit).
The adder runs two five-bit additions in series:

1. s = (x + y) mod 32, with carry-out **c5** ("carry A");
2. s + m̃ mod 32, with carry-out **c′5** ("carry B").

Since x, y ≤ m − 1, x + y ≤ 2m − 2 and x + y + m̃ < 64. So

* x + y ≥ 32 sets c5; then x + y ≥ m anyway;
* 32 > x + y ≥ m sets c′5 only, since s + m̃ = x + y + 32 − m ≥ 32;
* x + y < m sets neither.

Hence **carry = c5 | c′5** is exactly "x + y ≥ m", and
z = carry ? (s + m̃) mod 32 : s. For m = 29, m̃ = 00011.

The result is only correct for operands that are residues (below m); the top
module asserts this on every clock.

## The X+Y adder: transfer functions and two carry groups

Each bit pair gives the usual generate gᵢ = aᵢbᵢ and propagate pᵢ = aᵢ ⊕ bᵢ,
plus the **transfer** tᵢ = aᵢ + bᵢ (OR). Because tᵢ = gᵢ + pᵢ,

    c(i+1) = gᵢ + cᵢ·pᵢ = gᵢ + cᵢ·tᵢ

and the carry logic can use the OR instead of the XOR, which is faster and
available one gate earlier. The carries are formed in two parallel groups
rather than a ripple (carry-in is 0):

    c1 = g0
    c2 = g1 + g0·t1
    c3 = g2 + g1·t2 + g0·t1·t2          (logic layer 1)
    c4 = g3 + c3·t3
    c5 = g4 + g3·t4 + c3·t3·t4          (logic layer 2, from registered c3)

All are written as NAND–NAND networks. The sum bits are s0 = p0 and
sᵢ = pᵢ ⊕ cᵢ for i = 1..4.

## The X+Y−m adder: a constant operand

The second adder adds the constant m̃, so its carry equations lose most of
their terms. In general form (m̃ᵢ abbreviated mᵢ):

    c′1 = s0·m0
    c′2 = s1·m1 + s0·s1·m0 + s0·m0·m1
    c′3 = s2·m2 + s1·s2·m1 + s0·s1·s2·m0 + s0·s2·m0·m1
          + s1·m1·m2 + s0·s1·m0·m2 + s0·m0·m1·m2
    c′4 = s3·m3 + c′3·(s3 + m3)
    c′5 = s4·m4 + (s4 + m4)·(s3·m3 + c′3·(s3 + m3))

`toma_mod_carry` writes exactly these and lets elaboration fold in the
constant. What remains per modulus:

| m  | m̃     | c′1 | c′2      | c′3            | c′4        | c′5              |
|----|-------|-----|----------|----------------|------------|------------------|
| 17 | 01111 | s0  | s1+s0    | s2+s1+s0       | s3+c′3     | s4·(s3+c′3)      |
| 19 | 01101 | 0   | s1       | s2+s1          | s3+c′3     | s4·(s3+c′3)      |
| 21 | 01011 | s0  | s1+s0    | s2·(s1+s0)     | s3+c′3     | s4·(s3+c′3)      |
| 23 | 01001 | s0  | s1·s0    | s2·s1·s0       | s3+c′3     | s4·(s3+c′3)      |
| 25 | 00111 | s0  | s1+s0    | s2+s1+s0       | s3·c′3     | s4·s3·c′3        |
| 27 | 00101 | s0  | s1·s0    | s2+s1·s0       | s3·c′3     | s4·s3·c′3        |
| 29 | 00011 | s0  | s1+s0    | s2·(s1+s0)     | s3·c′3     | s4·s3·c′3        |
| 31 | 00001 | s0  | s1·s0    | s2·s1·s0       | s3·c′3     | s4·s3·c′3        |

For m = 29 the whole carry network of the second adder is one OR, one AND2
and two gates fed from c′3. Its sum bits are sᵢ ⊕ m̃ᵢ ⊕ c′ᵢ: for bits with
m̃ᵢ = 1 the half sum sᵢ ⊕ m̃ᵢ is just an inverter, placed in front of the
third register row so that the last layer has a single XOR per bit.

## Pipeline map

With `PIPELINED = 1` (default) the adder has four logic layers and three
register rows:

| layer | logic | module(s) | register row after it (m = 29) |
|-------|-------|-----------|--------------------------------|
| 1 | half adders, four ORs, c1..c3 | `toma_ha_stage`, `toma_carry_low` | 12 FFs: t4 g4 p4 t3 g3 p3 c3 p2 c2 p1 c1 p0 |
| 2 | c4, c5 from c3; sum XORs | `toma_carry_high`, `toma_sum_unit` | 6 FFs: c5 s4..s0 |
| 3 | carries c′1..c′5 of s + m̃ | `toma_mod_carry` | 12 FFs: c5 c′5 s4..s0 c′4..c′2 ¬s1 ¬s0 |
| 4 | sum XORs of s + m̃, carry = c5 \| c′5, five 2:1 MUX | `toma_mod_select` | output |

12 + 6 + 12 = 30 flip-flops. The top module checks this count for m = 29 at
elaboration. c′1 is never registered: it is s0 (when m̃0 = 1) or 0, so
layer 4 takes it from the s0 flip-flop. Moduli whose m̃ has more ones need one
more inverted-sum flip-flop per extra one (up to 32 for m = 17). The first two
rows are typed as the packed structs `layer1_t` and `layer2_t` in `toma_pkg`.

The published estimate for this structure, in a 130 nm standard-cell
library, is a slowest layer of about 0.22 ns (layer 4), i.e. roughly 3.2 GHz
once the flip-flop delay is added. A Bayoumi–Jullien adder built from two
ripple-carry adders needs six register rows and 66 flip-flops for the same
job. Those are cell-level figures; the RTL only fixes the
partition that makes them possible.

## Interface and timing

`toma_new_pipelined #(M = 29, PIPELINED = 1)`

| port | dir | width | meaning |
|------|-----|-------|---------|
| clk | in | 1 | rising-edge clock |
| x, y | in | 5 | operands, residues 0..M−1 |
| z | out | 5 | (x + y) mod M |

* Throughput: one operand pair per clock, no stalls.
* Latency: z shows the result for the x, y present before a rising edge
  three edges later (edges 1, 2, 3 load rows 1, 2, 3; layer 4 is
  combinational to z).
* There is no reset, enable or valid flag. The first three outputs after
  power-up are meaningless; a surrounding design that needs to know when z is
  valid carries its own three-stage valid bit.
* `PIPELINED = 0` turns the three rows into wires: the same logic as a
  combinational adder (x, y to z in one path).
* `M` must be 17..31; anything else stops elaboration with an error.

## Departures and own choices

* **c′3 term.** The c′3 equation is the exact expansion of the carry
  recurrence, with the product s1·m̃1·m̃2. A variant with an extra s2 factor
  in that product gives the same carries for m = 29 but wrong ones for
  m = 17 and m = 25; the per-modulus table above follows the exact form.
* **Register-row contents.** The number of flip-flops per row (12, 6, 12)
  matches the published structure. The assignment of signals to the third row
  (in particular that c′1 is rebuilt from s0 and that ¬s1, ¬s0 are
  registered) is inferred from what layer 4 needs.
* **Select buffer.** The published structure drives the five multiplexer
  selects through a buffer cell; in RTL that is a wire.
* **Generic moduli.** The published structure is drawn for m = 29. Here the
  modulus is a parameter and the constant is folded at elaboration, so the
  gate-level shape for other moduli is whatever synthesis makes of the
  equations above.
* **No reset / valid, operand assertion, PIPELINED switch.** All three are
  additions of this RTL.
* **Not included.** The comparison adders the structure is measured against
  (ripple-carry, Hiasat and Brent–Kung based TOMAs) are not part of this
  design. Area in gate equivalents and delays in ns are cell-library
  estimates and are not reproduced.

## Files

`rtl/`

* `toma_pkg.sv`: width N = 5, `residue_t`, the constant `neg_m_bits(m)` = 32 − m,
  register-row structs.
* `toma_ha_stage.sv`: gᵢ, pᵢ, tᵢ.
* `toma_carry_low.sv`, `toma_carry_high.sv`: carries c1..c3 and c4, c5.
* `toma_sum_unit.sv`: s = (x + y) mod 32.
* `toma_mod_carry.sv`: carries of s + m̃.
* `toma_mod_select.sv`: s + m̃ sum bits, carry = c5 | c′5, multiplexers.
* `toma_pipe_reg.sv`: one register row, or a wire.
* `toma_new_pipelined.sv`: the top.

`tb/`: one self-checking testbench per module, plus two for the whole adder.

* `tb_toma_new_pipelined`: the adder for every odd modulus 17..31, each fed
  all m² operand pairs back to back, checked three edges later. Also the
  combinational form for m = 29. Counts uncorrected results, carry-A and
  carry-B corrections; fails if any never occurs.
* `tb_toma_full_size`: the top with default parameters, all 841 pairs of
  m = 29.
* The module-level testbenches are exhaustive over their inputs and compare
  with integer arithmetic (carries as ((x mod 2ⁱ) + (y mod 2ⁱ)) >> i). The
  `toma_mod_carry` test also compares m = 29 against the reduced table row.

Every testbench prints `TB_RESULT checks=N failures=F` and stops itself; a
watchdog ends a hung run with a failure.

## Simulating

With Verilator 5:

    verilator --binary --timing --assert -Irtl -Itb -y rtl -y tb +libext+.sv \
        rtl/toma_pkg.sv tb/tb_toma_new_pipelined.sv \
        --top-module tb_toma_new_pipelined -o sim
    ./obj_dir/sim

Replace the testbench name to run any other. Lint a module with
`verilator --lint-only -Wall -y rtl +libext+.sv rtl/toma_pkg.sv rtl/<module>.sv`.
The remaining lint note is that bit 1 of `toma_mod_carry`'s output is unused in
the top, because c′1 is rebuilt after the third register row.
