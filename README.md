# Carry select adder without redundant logic

A carry select adder (CSLA) hides carry propagation by computing two
outcomes in parallel, one for a carry input of 0 and one for 1, and then
picking one once the real carry is known. The textbook version uses two
complete ripple carry adders and a row of sum multiplexers. Both adders
compute the same half-sum (`a ^ b`) and half-carry (`a & b`) words, so half
of that logic is wasted.

This adder removes the duplication and changes the order of the work:

1. the half-sum and half-carry words are computed **once**;
2. two carry chains, one per assumed carry input, run from those shared words;
3. the **carry** word is selected by `cin`, rather than the sum word;
4. the sum is formed once, with a single XOR row, from the selected carries.

The result is `{cout, s} = a + b + cin` for N-bit `a` and `b`. The adder is
purely combinational.

## Data flow

```
 a,b ──► HSG ──s0,c0──┬──► CG0 ──c01──┐
                      │                ├──► CS ──c──► FSG ──► s
                      └──► CG1 ──c11──┘     ▲  └──► cout      ▲
                      s0 ───────────────────┼─────────────────┘
 cin ───────────────────────────────────────┴─────────────────┘
```

| Unit | Module | Equations (bit i, 0 ≤ i < N) |
|------|--------|------------------------------|
| HSG: half-sum generation | `csla_hsg` | `s0(i) = a(i) ^ b(i)`, `c0(i) = a(i) & b(i)` |
| CG0: carry generator, input carry 0 | `csla_cg0` | `c01(0) = c0(0)`; `c01(i) = c01(i-1)&s0(i) \| c0(i)` |
| CG1: carry generator, input carry 1 | `csla_cg1` | `c11(0) = s0(0) \| c0(0)`; `c11(i) = c11(i-1)&s0(i) \| c0(i)` |
| CS: carry selection | `csla_cs` | `c(i) = c01(i) \| (cin & c11(i))`, `cout = c(N-1)` |
| FSG: final-sum generation | `csla_fsg` | `s(0) = s0(0) ^ cin`; `s(i) = s0(i) ^ c(i-1)` |
| Top | `csla` | wires the five units together |

`c01(i)` and `c11(i)` are the carries **out of** bit i. The selected word
`c` is therefore already shifted by one position relative to the sum bit it
feeds.

## The carry generators and the fixed carry input

Both generators use the same recurrence, `carry(i) = carry(i-1)·s0(i) + c0(i)`.
The only difference is the carry that enters bit 0, which is a constant:

* CG0 assumes 0 entering bit 0. Bit 0 can then only carry if it generates,
  so `c01(0) = c0(0)`. It needs no gate, and `s0(0)` is not read. Synthesis
  reports this output bit as a wire from an input. That is expected.
* CG1 assumes 1 entering bit 0. Bit 0 then carries if either operand bit is
  set, so `c11(0) = s0(0) | c0(0)`.

Each bit above 0 costs one AND-OR stage. The chains are plain ripple
chains, so the delay from the operands to `cout` grows linearly with N. This
is the adder's critical path. From `cin` there is no chain at all: the path
is one AND-OR in CS and one XOR in FSG. This is the selling point of any
carry select adder: in a wider datapath `cin` can arrive late.

## Why the carry select is an AND-OR and not a multiplexer

The two carry words are not independent. Adding 1 at the bottom can only
create carries, never remove them. So wherever `c01(i)` is 1, `c11(i)` is
also 1. Given that ordering, `cin ? c11 : c01` reduces to
`c01 | (cin & c11)`, which is one AND-OR per bit instead of a 2:1 multiplexer.
`csla_cs` relies on this. It carries a deferred assertion that reports any
input pair that breaks the ordering. That can only happen if the unit is
driven by something other than the two generators.

The proposal says the carry words follow a fixed bit pattern that lets the
selection logic be reduced, but it does not spell out the pattern or the
reduced gates. The ordering above is this design's reading of it. It is
exact for every word pair the generators can produce.

## Parameters

Every module has one parameter, `N` (`int unsigned`), the operand width.
It defaults to `csla_pkg::CSLA_WIDTH = 32`. The 32-bit default is a choice
made here: the proposal leaves the width open as "n". Any N ≥ 1 elaborates.
A one-bit adder has no ripple stage.

## How far it has been checked

Each unit has its own self-checking testbench in `tb/`. The expected values
come from integer addition (`tb/csla_ref_pkg.sv`), not from the equations
above.

| Testbench | What it does |
|-----------|--------------|
| `tb_csla_hsg` | bitwise half-adder check, corner and 5,000 random operand pairs |
| `tb_csla_cg0`, `tb_csla_cg1` | carry words against the carries of `a + b + 0` / `a + b + 1`, including walking-zero patterns that ripple through every bit |
| `tb_csla_cs` | selection with both `cin` values over real carry-word pairs; counts pairs where the choice matters |
| `tb_csla_fsg` | sums from consistent words, and the per-bit XOR rule on arbitrary words |
| `tb_csla` | end-to-end at the default 32 bits: about 40,000 vectors. It also counts each mechanism: a select with `cin=0` and with `cin=1` where the words differ, a carry out, a carry rippling through the full chain, and a sum changed by `cin` alone. A mechanism never seen is a failure. |
| `tb_csla_exhaustive` | every input combination at N = 1, 2, 5 and 8 bits |

Each testbench ends by printing `TB_RESULT checks=<n> failures=<n>`.

None of this includes timing. The design has not been synthesized for an
FPGA or a cell library, so no path delay or area figure is claimed. A
synthesis run of the 32-bit top gives about 160 one-bit-equivalent gates:
2N in HSG, about 2N in each CG, 2N in CS and N in FSG.

## Running it

With Verilator 5, from the directory that holds `rtl/` and `tb/`:

```
verilator --binary --timing --assert -Irtl -Itb -y rtl -y tb +libext+.sv \
  rtl/csla_pkg.sv tb/csla_ref_pkg.sv tb/tb_csla.sv --top-module tb_csla -o sim
./obj_dir/sim
```

To run another testbench, substitute its name. Lint a module with
`verilator --lint-only -Wall -Irtl -y rtl rtl/csla_pkg.sv rtl/csla.sv`.
Two unused-bit warnings are expected and harmless:

* `s0[0]` is unused in CG0, as explained above.
* `c[N-1]` is unused in FSG. That bit leaves the adder as `cout` instead.

## Where this departs from, or adds to, the proposal

* **Width.** The width is fixed at 32 by default. The proposal does not
  state the width it evaluated.
* **Chain start.** The proposal writes the chain start as `c(0) = 0` for
  CG0 and `c(0) = 1` for CG1. Here that is read as the carry *entering*
  bit 0. Taken literally, the carry *out of* bit 0 would be a constant, and
  the circuit would not add.
* **Select logic.** The reduced select logic in CS is this design's own,
  as described above.
* **Not included.** The conventional two-ripple-adder CSLA and the
  binary-to-excess-1 variant are used only as comparison points. They are
  not included.
