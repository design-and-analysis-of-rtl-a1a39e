# Delay-controllable reconfigurable ALU

A small combinational ALU whose adder and subtractor use a "hybrid" carry
chain. Most of the chain is an ordinary ripple of multiplexer-based full
adders. Every second pair of bits, though, is a *reconfiguration block*: the
lower cell of the pair gives a cheap early guess of its carry, and the upper
cell uses that guess, not the rippled carry, whenever the guess is known to
be right. The carry into the upper bit then skips one ripple stage. How many
stages are skipped depends on the operands, which is what makes the delay
data-controlled. The width is set by a parameter: an N-bit unit has
(N-2)/2 reconfiguration blocks between two plain full adders.

The ALU does four things, chosen by a two-bit code:

| `s[1:0]` | operation | `result`              | `carry`                        |
|----------|-----------|-----------------------|--------------------------------|
| `00`     | add       | `a + b` (mod 2^N)     | carry out of the adder         |
| `01`     | subtract  | `a - b` (mod 2^N)     | 1 if `a >= b` (no borrow)      |
| `10`     | AND       | `a & b`               | 0                              |
| `11`     | OR        | `a \| b`              | 0                              |

The default width is N = 4, the size at which the circuit was characterised.
The RTL models logic only. The original cells are full-swing
gate-diffusion-input (GDI) gates in carbon-nanotube (CNTFET) and FinFET
technology, and the power and delay figures reported for them have no
counterpart here.

## Structure

```
dcr_alu                      top: four units in parallel + output mux
├── dc_adder   (cin = 0)     MFA | reconfig_block x (N-2)/2 | MFA
│   ├── mfa                  bit 0 and bit N-1
│   └── reconfig_block       bits 2j+1 (COPFA) and 2j+2 (CISFA)
│       ├── copfa
│       └── cisfa
├── dc_subtractor            N inverters on b, then dc_adder with cin = 1
├── gdi_and_nbit             one GDI AND cell per bit
├── gdi_or_nbit              one GDI OR cell per bit
└── alu_mux4                 tree of 2:1 mux cells, steered by s
leaf cells: cnt_xor, cnt_not, cnt_mux21, cnt_xor_and
package:    dcr_alu_pkg      alu_op_e (the s encoding), ALU_WIDTH = 4
```

Every module is written structurally down to the four leaf cells, so that the
netlist matches the cell-level drawings: XOR, inverter, 2:1 multiplexer, and
a combined XOR/AND cell. Each leaf cell is described by its Boolean function.

## The three full-adder cells

All three are built from the same parts: an XOR of `a` and `b`, its
complement from an inverter, and 2:1 multiplexers. None uses a majority
gate.

**MFA (modified full adder, `mfa`).**
`s = cin ? ~(a^b) : (a^b)`, and `cout = ~(a^b) ? b : cin`. When `a == b` the
carry out is simply `b` (two ones generate, two zeros kill). Otherwise the
carry in passes through.

**COPFA (carry-output-predictable full adder, `copfa`).** An MFA whose XOR is
replaced by the XOR/AND cell. Besides the sum and the rippled carry `cout` it
gives:

* `coutp = a & b`, the *predicted* carry. It is ready as soon as `a` and `b`
  are, and it equals the true carry out whenever `a == b`.
* `axb = a ^ b`, which tells the cell above whether the prediction can be
  trusted.

**CISFA (carry-input-selectable full adder, `cisfa`).** It has two carry
inputs, the rippled `cin` and the predicted `cins`. Its first multiplexer
(MUX21-A) picks one of them as `OUTA`, steered by `csel`: 1 takes `cin`,
0 takes `cins`. `OUTA` then does the job the carry input does in an MFA.
It steers the sum multiplexer, and it is the pass-through input of the carry
multiplexer.

### Reconfiguration block and the two carry paths

In `reconfig_block` the COPFA's `axb` drives the CISFA's `csel`:

* **High-speed path** (`fast = 1`). The lower bit does not propagate
  (`a[0] == b[0]`), so its carry out is `a[0] & b[0]`, whatever the carry
  into the block. The CISFA uses `coutp`, and the upper bit's inputs no
  longer depend on the ripple through the COPFA.
* **Normal path** (`fast = 0`). The lower bit propagates, so the CISFA takes
  the rippled carry `cout` of the COPFA.

The result is exact either way. Only the path the carry travels changes. The
`fast` output reports which path was taken. In the adder it is
`a[2j+1] == b[2j+1]`, and in the subtractor (where `b` is inverted)
`a[2j+1] != b[2j+1]`. It has no effect on the result, and the ALU leaves it
unconnected.

**This is the main place where the RTL departs from the original drawing.**
There, MUX21-A of the CISFA is steered by the CISFA's *own* `a ^ b`: it takes
the predicted carry whenever its own two inputs are equal. That gives the
right carry out, but a wrong sum whenever the lower bit propagates a carry
of 1. For example, in 4 bits, 3 + 1 comes out as 0. Wired that way, a 4-bit
adder gets 64 of its 512 input combinations wrong. The select is therefore taken from the lower bit's XOR,
which the COPFA already computes.

## Adder and subtractor

`dc_adder` is an MFA on bit 0, the reconfiguration blocks on bits 1 to N-2,
and an MFA on bit N-1. Because there are (N-2)/2 blocks, N must be even and
at least 2; other values stop elaboration with an error. At N = 2 there is no
block and `fast` is a constant 0. At N = 4 there is one block on bits 1 and 2.

`dc_subtractor` is two's-complement subtraction on the same chain. A bank of
N inverter cells forms `~b`, and the adder runs with its carry input tied
to 1. Its carry out is called `brout`. Because it is the carry of
`a + ~b + 1`, it is **1 when no borrow occurs** (`a >= b`). The original does
not state this polarity.

## Logic units and output multiplexer

`gdi_and_nbit` and `gdi_or_nbit` give each bit one two-transistor GDI cell,
modelled by what it passes. In the AND cell, `a = 0` passes ground and
`a = 1` passes `b`. In the OR cell, `a = 0` passes `b` and `a = 1` passes
VDD.

`alu_mux4` selects per bit with three 2:1 multiplexer cells: `s[0]` within
{add, sub} and within {and, or}, then `s[1]` between the pairs. The encoding
is fixed by the selection table above. The tree structure is this design's
own choice.

## Timing and interface

Everything is combinational. There is no clock, no reset and no state, and
each output is valid one settling time after its inputs change (zero clock
cycles). `s` is of type `dcr_alu_pkg::alu_op_e`, so a plain 2-bit value can
be cast to it.

```systemverilog
dcr_alu #(.N(8)) u_alu (.a(a), .b(b), .s(dcr_alu_pkg::OP_SUB), .result(y), .carry(no_borrow));
```

## Choices made in this design, not in the original

* The CISFA carry select comes from the lower bit's `a ^ b`, as described
  above. To carry it, `copfa` has an extra `axb` output and `cisfa` an extra
  `csel` input.
* The `carry` output of the ALU: the original ALU diagram shows only the
  N-bit result.
* The adder's carry input inside the ALU is tied to 0. The diagram has no
  carry input.
* The polarity of the subtractor's `brout` is 1 for no borrow.
* The `fast` observation outputs of `reconfig_block`, `dc_adder` and
  `dc_subtractor`.
* Which data pin of each multiplexer gets which signal. The drawings show
  the connections but not the pin order; it was chosen so that each cell
  computes its arithmetic function.
* A mention of an extra OR gate in the CISFA was not followed: the cell
  drawing has none, and none is needed.
* Not built: a multiplier and a combined adder-subtractor are mentioned in
  the original, but neither their structure nor their operation codes are
  given, and the ALU diagram uses neither.

## Verification

Each module has a self-checking testbench in `tb/` (`tb_<module>.sv`). Each
one compares the outputs with values computed from integer or Boolean
arithmetic, prints `TB_RESULT checks=<n> failures=<n>`, and has a watchdog.

* The leaf cells, `mfa`, `copfa`, `cisfa` and `reconfig_block` are checked
  exhaustively.
* `dc_adder` and `dc_subtractor` are checked exhaustively at N = 4 and N = 2,
  and with 2000 random vectors at N = 8, including the `fast` flags.
* The AND, OR and multiplexer units are checked exhaustively at 4 bits, and
  with random data at 8 bits.
* `tb_dcr_alu` runs the ALU at its default width through all
  4 x 16 x 16 = 1024 operations, changing the operation on every step. It
  counts each mechanism and fails if one never occurs: each operation, mode
  switches, the high-speed and normal carry paths in both the adder and the
  subtractor, a carry out and a borrow.
* `tb_dcr_alu_nbit` checks the ALU at other widths: every operation at
  N = 2 (no reconfiguration block), and 5000 random operations at N = 16
  (seven blocks). The N = 16 vectors include equal operands and all-ones `b`,
  so that long carry and borrow ripples occur.

To run one testbench with Verilator:

```sh
verilator --binary --timing -Irtl -y rtl -y tb +libext+.sv \
    rtl/dcr_alu_pkg.sv tb/tb_dcr_alu.sv --top-module tb_dcr_alu -o sim
./obj_dir/sim
```
