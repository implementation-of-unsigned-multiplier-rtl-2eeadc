# Shift-and-add unsigned multiplier with a carry-selecting adder

This is a sequential N × N unsigned multiplier (N = 16 by default). It
multiplies the way long multiplication is done by hand: it looks at one
multiplier bit per clock cycle, from right to left. When that bit is 1 it adds
the multiplicand into a running partial product. Every cycle it shifts the
partial product right by one place. Almost all of the logic is in the adder,
so the adder is where the design makes its one real choice.

That adder is a variant of the carry-select adder. A classic carry-select
adder builds two complete sums, one for input carry 0 and one for input
carry 1, and a multiplexer then picks one. This adder selects earlier. It
builds only the two candidate carry words, picks one of those, and then forms
a single sum from it. One XOR row for the sum is saved, and the selection
collapses to one AND-OR gate per bit.

## The adder (`adp_adder`)

For W-bit operands `a`, `b` and carry input `cin`, five units in a row:

| unit | module | what it computes |
|------|--------|------------------|
| HSG: half-sum generation | `hsg_unit` | `s0 = a ^ b`, `c0 = a & b` |
| CG0: carry generation, cin = 0 | `cg0_unit` | `c1_0[0] = c0[0]`, `c1_0[i] = c0[i] \| (s0[i] & c1_0[i-1])` |
| CG1: carry generation, cin = 1 | `cg1_unit` | `c1_1[0] = c0[0] \| s0[0]`, `c1_1[i] = c0[i] \| (s0[i] & c1_1[i-1])` |
| CS: carry selection | `cs_unit` | `c = c1_0 \| (cin & c1_1)` |
| FSG: final-sum generation | `fsg_unit` | `s = s0 ^ {c[W-2:0], cin}`, `cout = c[W-1]` |

`c1_0[i]` and `c1_1[i]` are the carries out of bit i for each possible input
carry. Fixing the input carry makes bit 0 of each chain trivial. With
cin = 0, a carry leaves bit 0 only when both operand bits are 1 (`c0[0]`).
With cin = 1, a carry leaves bit 0 when either operand bit is 1
(`c0[0] | s0[0]`). Above bit 0 both chains use the same generate/propagate
recurrence.

**Why the carry selection is only an AND-OR.** A plain 2-to-1 multiplexer per
bit would be `cin ? c1_1 : c1_0`. But raising the input carry can never
remove a carry. So wherever `c1_0[i]` is 1, `c1_1[i]` is 1 as well. Given
that property, the multiplexer reduces to `c1_0[i] | (cin & c1_1[i])`:

- With cin = 0 this gives `c1_0`.
- With cin = 1 it gives `c1_0 | c1_1`, which equals `c1_1`.

`cs_unit` is only correct for input words that have this property. CG0 and
CG1 always produce such words. The unit is not a general multiplexer.

**Final sum.** Sum bit i is the half-sum XORed with the carry into bit i. For
bit 0 that carry is `cin`. For the higher bits it is the selected carry out
of bit i-1. The top carry bit is not used for the sum; it leaves the adder as
`cout`. This is why `fsg_unit` leaves `c[W-1]` unread.

The adder is purely combinational. Its longest path is the CG1 ripple chain
(W AND-OR stages), then one AND-OR and one XOR. The carry chains ripple; this
structure saves area and makes no attempt at carry lookahead. `adp_adder`
defaults to W = 32. The multiplier instantiates it with W = N.

## The multiplier datapath (`sa_multiplier`)

```
            multiplicand_reg (B)
                    |
   +------> adp_adder (cin = 0) <-- A
   |                | {cout, sum}
   |                v
   |   caq_register:  [C][A (N bits)][Q (N bits)]  --> shift right
   |                                          |
   +-- A                                      Q[0] --> sa_control --> load / add / shift
```

- **`multiplicand_reg`** keeps B for the whole operation.
- **`caq_register`** holds the carry flip-flop C, the accumulator A and the
  multiplier register Q as one 2N+1-bit shift register. A load clears C and A
  and puts the multiplier into Q. In one step:
  1. If `add` is high, `{C, A}` takes the adder output `{cout, A + B}`.
  2. Then the whole chain `{C, A, Q}` shifts right by one bit.

  The multiplier bit just used drops out of Q. The new low bit of the partial
  product moves into Q's top bit. After N steps, `{A, Q}` is the 2N-bit
  product.
- **`sa_control`** is a two-state sequencer (`SA_IDLE`, `SA_RUN`, from
  `sa_pkg`) with an N-step down counter. It raises `add` exactly when `Q[0]`
  is 1 during a step.

C catches the adder's carry out. It is shifted into A's top bit in the same
edge, so between steps C always reads 0 (an assertion in `sa_multiplier`
checks this).

Worked example with N = 4, 15 × 12 (B = 1111, Q = 1100):

| step | Q[0] | A + B (when adding) | after shift: C A Q |
|------|------|---------------------|--------------------|
| load | –    | –                   | 0 0000 1100 |
| 1    | 0    | –                   | 0 0000 0110 |
| 2    | 0    | –                   | 0 0000 0011 |
| 3    | 1    | 0 1111              | 0 0111 1001 |
| 4    | 1    | 1 0110              | 0 1011 0100 |

`{A, Q}` = 1011 0100 = 180.

## Interface and timing

| port | dir | width | meaning |
|------|-----|-------|---------|
| `clk` | in | 1 | clock, rising edge |
| `rst_n` | in | 1 | asynchronous reset, active low; clears all registers |
| `start` | in | 1 | begin a multiplication; sampled only while `busy` is low |
| `multiplicand`, `multiplier` | in | N | operands; captured on the edge that samples `start` |
| `product` | out | 2N | `{A, Q}`; valid while `done` is high, and held until the next start |
| `busy` | out | 1 | high during the N step cycles |
| `done` | out | 1 | one-cycle pulse, N+1 rising edges after the edge that sampled `start` |

The operands may change as soon as they have been captured. A new `start` may
be given in the cycle in which `done` is high. The multiplier then produces
one product every N+1 cycles (17 cycles at N = 16). A `start` raised while
`busy` is high is ignored.

## What comes from the published design and what is this design's own

Taken from the published design:

- The five-unit adder and its equations.
- The reduced AND-OR carry selection.
- The C/A/Q register chain with a right shift.
- The "add when the multiplier bit is 1, then shift" algorithm.
- The 16-bit multiplier size.
- The 32-bit adder width.

Chosen here, because the published description leaves them open:

- **Add and shift share one clock edge.** A step therefore takes one cycle,
  not separate add and shift cycles. The latency is fixed at N+1 cycles.
  There is no early exit for zero multiplier bits.
- **The adder's carry input is tied to 0** inside the multiplier. The CG1
  and CS logic is still present, so the adder stays general. Synthesis
  removes that logic inside the multiplier.
- **Handshake and reset.** The `start`/`busy`/`done` handshake, the
  asynchronous active-low reset and the clearing of C and A at load are
  this design's.
- **Multiplicand register.** It is a plain load-enabled register.

The published results are FPGA area, delay and power figures. They are not
reproduced here. The RTL is described behaviourally at the level of the
units' equations, so a synthesis tool is free to restructure the chains.

## Verification

Every module has a self-checking testbench in `tb/`. Each one prints
`TB_RESULT checks=<n> failures=<n>`, and each has a cycle watchdog.

- **Unit tests** (`tb_hsg_unit`, `tb_cg0_unit`, `tb_cg1_unit`,
  `tb_cs_unit`, `tb_fsg_unit`) take their expected values from wide integer
  addition of the operands' low bits, not from the unit equations.
  `tb_cs_unit` also confirms the carry-word property that the AND-OR
  selection relies on.
- **`tb_adp_adder`** checks 55 + 55 = 110 and the full-propagation corner
  cases at 32 bits. It also checks random operands, and all 131072 input
  combinations of an 8-bit instance.
- **Register and controller tests.** `tb_caq_register` and
  `tb_multiplicand_reg` compare against reference models. `tb_sa_control`
  checks the load/add/shift/done sequence cycle by cycle, and that `start`
  is ignored while busy.
- **`tb_sa_multiplier`** runs the 16-bit multiplier with default
  parameters:
  - It multiplies 15 × 12, 255 × 255 and 65535 × 65535, corner cases and
    2000 random pairs.
  - It checks every product and the N+1-cycle latency.
  - It counts add steps, shift-only steps, adds with a carry out, and
    ignored starts. It fails if any of them never happens.
- **`tb_sa_multiplier_n8`** multiplies all 65536 operand pairs of an 8-bit
  instance back to back.

Simulate with Verilator 5 (the package must come first):

```
verilator --binary --timing --assert --top tb_sa_multiplier \
    rtl/sa_pkg.sv rtl/*.sv tb/tb_sa_multiplier.sv
./obj_dir/Vtb_sa_multiplier
```

Replace the testbench name to run any other test. Lint a module with
`verilator --lint-only -Wall rtl/sa_pkg.sv rtl/*.sv --top <module>`.

## Changing the size

`sa_multiplier #(.N(n))` builds an n × n multiplier with a 2n-bit product. The
adder width follows N. The step counter is `$clog2(N+1)` bits wide. N must be
at least 2: the final-sum unit takes the carry word's bits `[W-2:0]`.
`adp_adder #(.W(w))` can also be used on its own as a general w-bit adder
with carry in and carry out.
