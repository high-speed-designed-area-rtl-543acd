# rcpa8bit — a three-operand adder built from reversible gates

Several cryptographic and pseudorandom-bit-generator kernels add three numbers
at a time, often modulo 2^n. The usual hardware for this is a carry-save adder
followed by a two-operand adder. `rcpa8bit` does the same sum,

    {cout, sum} = a + b + c + cin        (a, b, c: N bits, N = 8 by default)

but writes every cell of it in *reversible logic*. Each elementary gate maps
its inputs one-to-one onto its outputs, so nothing it is given is lost. Only
two gate types are used:

| gate    | inputs | outputs                                   | used for                     |
|---------|--------|-------------------------------------------|------------------------------|
| Feynman | A, B   | P = A, Q = A ^ B                          | XOR, and copying a signal (B = 0) |
| Fredkin | A, B, C| P = A, Q = A ? C : B, R = A ? B : C       | a 2:1 multiplexer steered by A, and AND (one data input = 0) |

A circuit made of such gates is reversible only if no wire feeds two gate
inputs. Wherever a signal is needed twice, it therefore goes through a Feynman
gate with B = 0, which makes a copy. Each cell also has outputs that nobody
reads ("garbage") and inputs tied to 0 ("constant inputs"). Keeping both counts
small is the design goal of reversible cells.

## The two stages

```
 a ─┐   ┌──────────────┐ ps ┌─────────────────┐
 b ─┼──▶│ rev_csa_row  │───▶│ rev_carry_chain │──▶ sum[N-1:0]
 c ─┘   │ N rev FAs,   │ pc │ HA, N-1 FAs, HA │──▶ cout[1:0]
        │ no carries   │───▶│ ripple carry    │
        └──────────────┘    └─────────────────┘
                         cin ───────┘
```

1. **Carry-save row (`rev_csa_row`).** Bit i of a, b and c goes into
   reversible full adder i. Its sum bit is `ps[i]` (weight 2^i) and its carry
   bit is `pc[i]` (weight 2^(i+1)). No signal crosses between bit positions,
   so all N bits settle in parallel after one full-adder delay.
   Afterwards `a + b + c == ps + 2*pc`.
2. **Carry cascade (`rev_carry_chain`).** This stage adds `ps`, `pc` shifted
   left by one, and `cin`:
   - Bit 0 is a reversible half adder on (`ps[0]`, `cin`).
   - Bits 1 to N-1 are reversible full adders on (`ps[i]`, `pc[i-1]`, carry).
   - A last half adder on (`pc[N-1]`, carry) gives result bits N and N+1.

   The carry ripples through all of these, so this stage's delay grows
   linearly with N.

The whole adder is combinational. It has no clock, no reset and no registers.

### Why `cout` is two bits

Three 8-bit operands plus a carry-in can total 3·255 + 1 = 766, which needs
ten bits. The block symbol this design follows shows a single pin named
`cout` next to `sum[7:0]`, without a printed width. Here `cout` keeps its
name but is 2 bits wide, `{result[N+1], result[N]}`, so no part of the sum is
lost. For modulo-2^N use, take `sum` and ignore `cout`.

## The reversible cells

**Full adder (`rev_full_adder`).** This cell has three Feynman gates and one
Fredkin gate, one constant input and two garbage outputs. It relies on one
fact: when a and b differ the carry equals ci, and when they agree it equals
a. A Fredkin gate controlled by x = a ^ b therefore selects the carry
directly:

```
Feynman(a, b)          -> a,  x = a ^ b
Feynman(ci, 0)         -> ci, ci_copy
Fredkin(x, a, ci)      -> x,  co = x ? ci : a,  garbage
Feynman(x, ci_copy)    -> garbage, s = x ^ ci
```

**Half adder (`rev_half_adder`).** This cell has two Feynman gates and one
Fredkin gate, two constant inputs and two garbage outputs. A Fredkin gate
with data inputs (0, b) and control a gives a & b. A copy of b, made
beforehand, is XORed with a to give the sum.

Both cells bring their garbage outputs out on a `garbage[1:0]` port, so that
the reversible bookkeeping stays visible. The rows tie those ports to local
wires that nothing reads, and lint reports them as unused signals.

## What to expect from it, and what not to

- **It is exact.** The 8-bit adder is checked against an integer model for
  every one of the 2^25 input combinations of `a`, `b`, `c` and `cin`.
  Widths of 16 and 32 bits are checked with random operands.
- **Reversible logic is a structural property here, not a physical one.** The
  netlist is a network of bijective gates in which no wire fans out. A
  synthesis tool reads each Feynman gate as an XOR and each Fredkin gate as
  two multiplexers, and it is free to merge them. A synthesized 8-bit
  instance comes out as about 32 XORs and 17 multiplexers. The low-power
  argument for reversible computing applies to adiabatic or quantum
  realisations, not to a standard-cell CMOS flow.
- **Its carry path is a ripple.** The motivation for this architecture is to
  avoid the ripple-carry delay of a plain carry-save adder. However, no
  faster carry network is specified for it, so the second stage here is the
  simplest cascade that adds correctly. Its critical path is about N
  full-adder carry steps. That equals the delay of a carry-save adder with
  ripple completion, and is slower than a parallel-prefix completion (for
  example Han–Carlson). To get a faster adder, replace `rev_carry_chain`: its
  ports are the usual carry-save-to-binary interface.
- **This design's own choices.** Three things are choices made here, not
  given:
  - the gate-level netlists of both adder cells;
  - the half adders at both ends of the cascade;
  - the 2-bit `cout`.

  The module name `rcpa8bit`, the port names `a`, `b`, `cin`, `sum`, `cout`
  and the 8-bit width follow the design's published block symbol. The third
  operand is named `c`.

## Files

| file | contents |
|------|----------|
| `rtl/feynman_gate.sv`, `rtl/fredkin_gate.sv` | the two reversible gates |
| `rtl/rev_half_adder.sv`, `rtl/rev_full_adder.sv` | reversible adder cells |
| `rtl/rev_csa_row.sv` | stage 1, parameter `N` |
| `rtl/rev_carry_chain.sv` | stage 2, parameter `N` |
| `rtl/rcpa8bit.sv` | top level, parameter `N` (default 8) |
| `tb/*_tb.sv` | one self-checking testbench per module, plus `rcpa_wide_tb.sv` (N = 16 and 32) |

## Simulating

Every testbench prints `TB_RESULT checks=<n> failures=<m>` and calls `$finish`.
For example, to run the exhaustive 8-bit test (about 6 s):

```
verilator --binary --timing -Irtl -y rtl -y tb tb/rcpa8bit_tb.sv \
          --top-module rcpa8bit_tb -o sim
./obj_dir/sim
```

Besides checking results, this testbench counts how often each case occurs:
a carry-out of 0, 1 and 2, a set `cin`, a carry that ripples through all N
bits, and a carry out of the top bit of the carry-save row. If any of these
never occurs, the testbench counts a failure. To run any other testbench,
replace its name in the command. To lint, run:

```
verilator --lint-only -Wall -Wno-fatal -Irtl -y rtl rtl/rcpa8bit.sv
```

Lint reports only the unused garbage outputs, as UNUSEDSIGNAL warnings.

To build a different width, set `N`. The module keeps the name `rcpa8bit`
whatever its width.
