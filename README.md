# Early Completion for NULL Convention Logic: a self-timed 4x4 multiplier

A NULL Convention Logic (NCL) pipeline has no clock. Each register stage
waits for a handshake from the stage after it. In the usual scheme, stage *i*
knows a wavefront has been stored only after the wavefront has passed
through its register. A completion detector then looks at the register's
outputs, and only after that does the request go back to stage *i−1*. So
every handshake pays for the register delay and then the detector delay, one
after the other.

**Early Completion** moves the detector to the register's *inputs*. A
register passes a wavefront when the data has arrived and its own request
line allows it. So the detector can predict that the register is about to
latch. It watches the register's inputs together with that request line,
which is `Ko(i+1)`, the output of the next stage's detector. Detection then
overlaps with latching, and the handshake loop gets shorter. The forward data
path does not change, so latency does not change either.

This repository applies the technique to a fully pipelined 4x4 unsigned NCL
multiplier: 7 logic stages between 8 registers, with full-word completion.
The multiplier is written at gate level, in threshold gates. It is simulated
in a *unit-delay emulation*, where one clock period stands for one gate delay
(see [The unit-delay emulation](#the-unit-delay-emulation)). In that model:

| completion scheme | steady-state DATA-to-DATA cycle | throughput |
|---|---|---|
| standard (detect at register outputs) | 14 gate delays | 1 / 14 |
| Early Completion (this design) | 12 gate delays | 1 / 12 |

That is a speedup of 1.167 with identical latency. The technique was first
reported with a speedup of 1.21, measured with transistor-level delays in
0.25 µm CMOS. An equal-delay gate model
cannot be expected to reproduce that figure exactly.

---

## 1. NCL in brief

**Dual-rail data.** Each bit is carried on two wires, `rail0` and `rail1`
(`ncl_pkg::dr_t`):

| state | rail1 | rail0 |
|---|---|---|
| NULL (no data yet) | 0 | 0 |
| DATA0 | 0 | 1 |
| DATA1 | 1 | 0 |
| illegal | 1 | 1 |

Computation alternates between two kinds of wavefront. A DATA wavefront
brings every bit to DATA0 or DATA1. A NULL wavefront returns every bit to
NULL. A result is valid as soon as all of its bits are DATA. The time from
one DATA wavefront at the output to the next is `TDD`, which plays the role
of the clock period.

**Threshold gates with hysteresis** (`ncl_th`). A THmn gate has n inputs. Its
output goes high once at least m inputs are high. It goes low again only
once *all* inputs are low, and otherwise holds. So every gate is a small
state-holding element. Some special cases:

- THnn is an n-input C-element and TH1n is an OR gate.
- Weighted gates (for example TH34w2) count one input twice.
- Inverting gates have a bubble on the output.

Two non-threshold set functions are used: TH24comp, which sets on
(A+B)(C+D), and THxor0, which sets on AB+CD. Both have their own modules.

**Registers and handshake** (`ncl_register`). Each rail of each bit is a
TH22 gate of the input rail and the request line `ki`:

- with `ki` = RFD (request for DATA, `1`), a DATA wavefront passes;
- with `ki` = RFN (request for NULL, `0`), a NULL wavefront passes;
- otherwise the register holds.

Two DATA wavefronts are therefore always separated by a NULL wavefront.

**Completeness.** A logic block may not let all its outputs become DATA
until all its inputs are DATA, and likewise for NULL. Only then does "the
outputs are complete" prove that "the inputs are complete". This property is
what lets a detector on one side of a block stand in for the other side.

## 2. Where completion is detected

```
standard:   ... ─► logic_i ─► [reg_i] ─┬─► logic_i+1 ─► ...
                                      detector_i (on reg_i outputs)
                                       └──► Ko_i ──► ki of reg_i-1

early:      ... ─► logic_i ─┬─► [reg_i] ─► logic_i+1 ─► ...
                            │     ▲ ki = Ko_i+1
                     EC_i (on reg_i inputs, and Ko_i+1)
                            └──► Ko_i ──► ki of reg_i-1
```

### The Early Completion component (`ncl_ec_completion`)

For an N-bit register:

1. Each pair of bits feeds a **TH24comp** gate, with inputs
   (x[2j].rail0, x[2j].rail1, x[2j+1].rail0, x[2j+1].rail1). The gate goes
   high when both bits are DATA and low when both are NULL. For odd N the
   last bit uses a **TH12**. This gives ⌈N/2⌉ intermediate signals, half as
   many as one detector per bit would.
2. A **tree of TH44 gates** (4-input C-elements, `ncl_c_tree`) combines
   them.
3. An **inverting C-element** combines the tree with `Ko(i+1)`:
   - `Ko(i)` becomes RFN once all inputs are DATA **and** `Ko(i+1)` is RFD,
     that is, once register *i* is about to latch this DATA;
   - `Ko(i)` becomes RFD once all inputs are NULL **and** `Ko(i+1)` is RFN.

`MERGE_ROOT = 1` (the default) folds the final inverting TH22 into the root
of the tree when the root has room (at most 4 inputs), which saves one gate
level. For example, 16 bits give 8 TH24comp outputs, then two TH44s, then
one inverting TH33 that also takes `Ko(i+1)`. `MERGE_ROOT = 0` keeps the
separate TH22. With the default, every component in the multiplier is 3
gate levels deep.

**Final stage (`LAST = 1`).** The output environment is assumed to be
infinitely fast. Its request `Ki` becomes RFN the moment the output is DATA,
and RFD the moment it is NULL. So the prediction rule above would hardly
ever be true at the same time as `Ki`. The last component therefore:

- inverts the root of the tree instead;
- uses a non-inverting TH22 with `Ki`;
- requests DATA once its inputs are NULL and `Ki` is RFD, and requests NULL
  once its inputs are DATA and `Ki` is RFN.

**Reset.** Register outputs reset to NULL. A standard detector, which only
looks at those outputs, settles by itself in constant time. An Early
Completion component also depends on `Ko(i+1)`, so without help the reset
would ripple back through every stage. Instead, the final gate of every
component has a reset input and starts at RFD, matching the NULL registers.
The rest of each component has no reset and settles from its NULL inputs
while `rst` is held. The end-to-end testbench checks that all eight requests
are RFD on the first cycle after reset. A stage whose register resets to a DATA word uses
`RESET_RFN = 1`, so that its component starts at RFN instead.

### Why the cycle gets shorter

In the unit-delay model, a register costs 1 gate delay, an adder stage 2,
and a detector 3. One handshake half-cycle of a stage pair is:

- **standard:** previous register latches (1), logic (2), this register
  latches (1), detector on its outputs (3): 7, so `TDD` = 14;
- **early:** previous register latches (1), logic (2), detector on this
  register's inputs (3), with this register latching during the detection:
  6, so `TDD` = 12.

`tb_ncl_mult4x4_speedup` measures both numbers on all 256 operand pairs.

The root merge matters here. With `MERGE_ROOT = 0`, the components of the
registers wider than 8 bits are 4 levels deep, so early detection costs as
much as standard detection minus the register. The cycle then varies
between 12 and 16 gate delays and averages 13.73, a speedup of only 1.02.
In this equal-delay model, the gain comes from moving detection to the
register inputs *and* keeping the detector one level shallower.

### Timing assumptions introduced

Standard NCL only assumes isochronic forks. Early Completion adds two
relative-delay assumptions:

1. A DATA (or NULL) wavefront arriving at register *i* must not travel
   through register *i*, then logic *i+1*, then detector *i+1*, faster than
   it travels through detector *i* alone.
2. When `Ko(i+1)` turns to RFD while register *i*'s inputs are DATA, the
   resulting `Ko(i)` = RFN must not let a NULL wavefront through register
   *i−1* and into register *i*'s inputs before register *i*'s own TH22 gates
   have latched the DATA. That is two gate delays against one.

Both hold easily for gates of similar delay. The unit-delay emulation gives
every gate the same delay, so it satisfies them by construction. It does
**not** test the design under skewed or random gate delays.

## 3. The multiplier datapath (`ncl_mult4x4_datapath`)

Partial products `x_i·y_j` have weight *i+j*. The pipeline reduces them
column by column in carry-save style. A number such as "w3" means a bit of
weight 3.

| stage | logic | register after it | bits of the product finished |
|---|---|---|---|
| R1 | — | 8 bits: x, y | |
| 1 (1 gate) | 16 ANDs: the 4 diagonal `x_i·y_i` complete (`ncl_and_c`), 12 incomplete (`ncl_and_i`) | 16 | S0 |
| 2 (2 gates) | HA on w1; FA on w2, w3, w4; HA on w5 | 13 | S1 |
| 3 (2 gates) | HA on w2; FA on w3; HA on w4, w5, w6 | 12 | S2 |
| 4 (2 gates) | HA on w3 | 12 | S3 |
| 5 (2 gates) | FA on w4 | 11 | S4 |
| 6 (2 gates) | FA on w5 | 10 | S5 |
| 7 (2 gates) | FA on w6 gives S6; `ncl_gen_s7` gives S7 | 8 | S6, S7 |

Bits that are final, or that wait for a later stage, run straight through a
logic stage into the next register. The exact order of bits in each
register is listed in comments in `ncl_mult4x4_datapath.sv`.

Why the first stage is complete enough: an *incomplete* AND may output DATA0
as soon as one operand is DATA0. The stage as a whole is still complete,
because every input bit is observed by exactly one complete AND.

At the last stage, column 6 holds three bits x, y, z and column 7 holds one
bit c. S6 is the full-adder sum of x, y, z. S7 would be c plus that adder's
carry. A 4x4 product is below 256, so c and the carry are never both 1, and
S7 = c XOR majority(x, y, z). `ncl_gen_s7` computes this directly in two
gate levels and leaves the full adder's carry unused. S7 waits for c, but
the majority can be decided from two of x, y, z. The full adder beside it
observes all three, which keeps the stage complete.

### Gate-level cells (this design's choices)

The arithmetic cells are standard NCL constructions. Each has the depth the
pipeline needs: one level for the ANDs, two for the adders and for GEN_S7.

| cell | rail equations |
|---|---|
| complete AND | z1 = TH22(a1,b1); z0 = TH34w22(a0,b0,a1,b1) = a0b0+a0b1+a1b0 |
| incomplete AND | z1 = TH22(a1,b1); z0 = TH12(a0,b0) |
| half adder | c0 = TH12(a0,b0); c1 = TH22(a1,b1); s0 = TH23w2(c1,a0,b0); s1 = TH33w2(c0,a1,b1) |
| full adder | co0 = TH23(a0,b0,ci0); co1 = TH23(a1,b1,ci1); s0 = TH34w2(co1,a0,b0,ci0); s1 = TH34w2(co0,a1,b1,ci1) |
| GEN_S7 | m0 = TH23(x0,y0,z0); m1 = TH23(x1,y1,z1); s1 = THxor0(c1,m0,c0,m1); s0 = THxor0(c0,m0,c1,m1) |

In `wN` gates the first input has weight 2.

## 4. The unit-delay emulation

An NCL circuit is asynchronous. Each threshold gate is a small asynchronous
state machine. To make the design simulate deterministically, and
synthesize to ordinary flip-flops (for example for FPGA emulation), every
gate here is modelled as a flip-flop with a next-state rule:

```
next = (weighted count of inputs >= threshold) ? 1 : (all inputs low) ? 0 : current
```

This rule is evaluated on every rising edge of `clk`. So `clk` is not a
system clock. It is a time step, and one period is one gate delay. Plain
wires, such as the pass-through bits between registers, take no time.
Everything that involves time in this repository is measured in these
periods: latencies, `TDD` and the counts in the testbenches.

Consequences:

- Every gate has exactly the same delay, so the design shows its
  best-behaved timing (see the assumptions above).
- Latency and cycle time depend on the data. Several gates can set after one
  level for some input values. For example, a half adder whose operands are
  both 0 finishes its sum in one level. The 15×15 product, entering an empty
  pipeline, takes 16 gate delays; the worst-case forward path is 21.
- `rst` is synchronous and active high. Hold it for at least 8 periods with
  the inputs NULL. Gates without reset settle from NULL inputs during that
  time.

## 5. Interface of the top (`ncl_mult4x4_ec`)

| port | dir | meaning |
|---|---|---|
| `clk` | in | gate-delay time step |
| `rst` | in | registers to NULL, completion outputs to RFD |
| `x[3:0]`, `y[3:0]` | in | operands, `dr_t` each |
| `ko` | out | request to the producer: present DATA while RFD, NULL while RFN |
| `s[7:0]` | out | product, `dr_t` each |
| `ki` | in | request from the consumer: RFN once `s` is all DATA, RFD once it is all NULL |

The design has no size parameters: the multiplier is 4x4. The top's one
parameter, `MERGE_ROOT` (default 1), selects the component form.
`ncl_ec_completion` is parameterized by width (`N`), by `LAST`, by
`MERGE_ROOT` and by `RESET_RFN`, and can be reused for other NCL pipelines.

## 6. Files

| file | contents |
|---|---|
| `rtl/ncl_pkg.sv` | `dr_t`, RFD/RFN, completion-tree shape functions, register widths of the multiplier |
| `rtl/ncl_th.sv` | THmn gate: weighted, optionally inverting and resettable |
| `rtl/ncl_th24comp.sv`, `rtl/ncl_thxor0.sv` | TH24comp and THxor0 gates |
| `rtl/ncl_register.sv` | N-bit dual-rail register (TH22 per rail), reset to NULL or to a DATA word, with an illegal-state assertion |
| `rtl/ncl_c_tree.sv` | TH44 completion tree |
| `rtl/ncl_ec_completion.sv` | Early Completion component |
| `rtl/ncl_and_c.sv`, `rtl/ncl_and_i.sv`, `rtl/ncl_ha.sv`, `rtl/ncl_fa.sv`, `rtl/ncl_gen_s7.sv` | arithmetic cells |
| `rtl/ncl_mult4x4_datapath.sv` | registers and logic stages |
| `rtl/ncl_mult4x4_ec.sv` | top: datapath plus eight Early Completion components |
| `tb/ncl_std_completion.sv`, `tb/ncl_mult4x4_std.sv` | standard-completion reference, for comparison only |
| `tb/ncl_mult_env.sv` | producer and consumer environment used by the speedup bench |
| `tb/tb_*.sv` | self-checking testbenches |

## 7. Simulating

With Verilator 5, from the repository root:

```
verilator --binary --timing --assert -Irtl -y rtl -y tb \
    rtl/ncl_pkg.sv tb/tb_ncl_mult4x4_ec.sv --top-module tb_ncl_mult4x4_ec
./obj_dir/Vtb_ncl_mult4x4_ec
```

Use the same command with any other `tb/tb_*.sv`. Each testbench prints
`TB_RESULT checks=N failures=M` and has a watchdog. All of them finish in
well under a second.

| testbench | what it establishes |
|---|---|
| `tb_ncl_mult4x4_ec` | All 256 products through the top, streamed back to back. Steady-state `TDD` is exactly 12. First-product latency is within the forward path. All requests are RFD right after reset. No illegal output state. It counts early requests (RFN/RFD issued sooner after a register completes than an output detector could respond): about 590 of each. It also counts stalls, where a component's inputs are complete but it waits for `Ko(i+1)`. |
| `tb_ncl_mult4x4_speedup` | Early Completion against standard completion on the same datapath: 12 against 14 gate delays, with both correct. Also the separate-TH22 form (`MERGE_ROOT = 0`): correct, and with a mean cycle between the two. |
| `tb_ncl_mult4x4_datapath` | All 256 products through the datapath with the registers held transparent. NULL flow-through. DATA held at a register whose request is RFN. |
| `tb_ncl_ec_completion` | The merged, separate-TH22, odd-width and final-stage forms: hold rules, partial-input rejection, response times (3 or 4 levels; 1 level from `Ko(i+1)`), reset to RFD and, with `RESET_RFN`, to RFN. |
| `tb_ncl_c_tree`, `tb_ncl_register`, `tb_ncl_th`, `tb_ncl_th24comp` | Gates, tree and register against independent reference models under random or protocol-legal stimulus. The register is also tested with reset to a DATA word. |
| `tb_ncl_and_c`, `tb_ncl_and_i`, `tb_ncl_ha`, `tb_ncl_fa`, `tb_ncl_gen_s7` | Exhaustive values, completeness (partial inputs must not produce a result), hysteresis, depth. |

## 8. Where this design departs from or adds to the original description

- **Timing model.** Gates are unit-delay clocked emulations, not
  asynchronous cells. Throughput and latency are in gate delays, not ns, and
  the relative-timing assumptions of Early Completion are not exercised.
- **Wiring of the multiplier.** The register widths, the adder types and
  counts per stage, and the gate depths per stage follow the original
  multiplier. The assignment of particular partial products and carries to
  particular adders was reconstructed as the carry-save reduction in
  section 3, which reproduces all of those numbers. The choice of the
  diagonal products as the four complete ANDs is also this design's.
- **Arithmetic cells.** Their gate-level structure (section 3 table) is this
  design's own. The half adder is built two levels deep so that every adder
  stage is two gate delays.
- **Root merging.** The basic component has a separate inverting TH22 after
  the TH44 tree. By default this design merges it into the tree's root,
  which the technique allows as an optimization (`MERGE_ROOT = 0` restores
  the basic form).
- **Reset values.** In the multiplier, all registers reset to NULL and all
  completion outputs to RFD. A stage may instead reset its register to a
  DATA word (`ncl_register` with `RESET_DATA = 1` and `RESET_VALUE`). Its
  component must then reset to RFN (`ncl_ec_completion` with
  `RESET_RFN = 1`). Both options are tested on their own modules, but the
  multiplier does not use them.
- **Handshake polarity.** RFD = 1, RFN = 0. This is the polarity that
  results from a register-output detector built from an inverting TH12,
  which is high while the bit is NULL.
- **Standard completion** exists only as a testbench reference
  (`tb/ncl_std_completion.sv`, `tb/ncl_mult4x4_std.sv`). It is not part of
  the design.
